// tb_jep_crate: end-to-end test of one processor crate at full size
// (16 JEMs in two quadrants, 88 links each, both mergers).
//  - synchronises all 1408 links and checks every module locked;
//  - checks latency from link word to crate sum (8 + 1 bunch crossings);
//  - random link data in all modules: checks each module's codes and
//    multiplicities, including the jet elements shared with the eta
//    neighbours, and the crate ET/Ex/Ey sums and crate multiplicities
//    (dense events make the crate multiplicity saturate);
//  - fits the loopback device on one module and checks its duplicated-channel
//    sums;
//  - a TTC-broadcast playback/spy cycle in one module, read back over VME;
//  - a readout signal to all modules, one dropped while busy.
module tb_jep_crate;
  import jem_pkg::*;
  import tb_ref_pkg::*;
  localparam int NJ = 16;

  logic clk = 0, rst_n = 0, sync_mode = 0;
  link_t [NJ-1:0][N_LINKS-1:0] link_data;
  logic [NJ-1:0] loopback_fit = '0;
  logic [3:0] vme_slot = 0;
  logic [15:0] vme_addr = 0, vme_wdata = 0, vme_rdata;
  logic vme_we = 0, vme_re = 0, ttc_start = 0, ttc_l1a = 0;
  logic bc;
  logic [NJ-1:0][CODE_W-1:0] et_code, ex_code, ey_code;
  mult_t [NJ-1:0][N_THR-1:0] jet_mult;
  logic [CRATE_W-1:0] crate_et;
  logic signed [CRATE_W-1:0] crate_ex, crate_ey;
  mult_t [N_THR-1:0] crate_mult;
  logic [NJ-1:0][15:0] daq_word, roi_word, ro_lost;
  logic [NJ-1:0] daq_valid, roi_valid, ro_busy, all_locked;
  logic [1:0] bcount;
  int checks = 0, failures = 0;
  int thr[N_THR], win[N_THR];
  int n_sync = 0, n_lat = 0, n_share = 0, n_sat = 0, n_loop = 0, n_pb = 0, n_ro = 0, n_lost = 0;

  jep_crate dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) bcount <= 0; else if (bc) bcount <= bcount + 1'b1;

  task automatic step();
    @(posedge clk iff bc); #1;
  endtask
  task automatic wr(input int slot, input logic [15:0] a, input logic [15:0] d);
    vme_slot = 4'(slot); vme_addr = a; vme_wdata = d; vme_we = 1;
    @(posedge clk); #1;
    vme_we = 0;
  endtask
  task automatic rd(input int slot, input logic [15:0] a, output logic [15:0] d);
    vme_slot = 4'(slot); vme_addr = a; vme_re = 1;
    @(posedge clk); #1;
    vme_re = 0;
    d = vme_rdata;
  endtask

  function automatic grid_t own_grid(link_t [N_LINKS-1:0] l);
    grid_t g;
    g = '0;
    for (int p = 0; p < PHI_ALL; p++)
      for (int e = 0; e < ETA_CORE; e++)
        g[p][e+1] = je_t'(l[CH_PER_FPGA*p + e]) + je_t'(l[CH_PER_FPGA*p + e + 4]);
    return g;
  endfunction

  function automatic grid_t crate_grid(int j);
    grid_t g, lo, hi;
    int pos;
    pos = j % 8;
    g = own_grid(link_data[j]);
    if (loopback_fit[j]) begin
      for (int p = 0; p < PHI_ALL; p++) begin
        g[p][0] = g[p][4]; g[p][5] = g[p][1]; g[p][6] = g[p][2];
      end
    end else begin
      if (pos > 0) begin
        lo = own_grid(link_data[j-1]);
        for (int p = 0; p < PHI_ALL; p++) g[p][0] = lo[p][4];
      end
      if (pos < 7) begin
        hi = own_grid(link_data[j+1]);
        for (int p = 0; p < PHI_ALL; p++) begin g[p][5] = hi[p][1]; g[p][6] = hi[p][2]; end
      end
    end
    return g;
  endfunction

  task automatic check_crate(string what, bit lb_sel);
    int st, sx, sy, cm[N_THR];
    st = 0; sx = 0; sy = 0;
    for (int t = 0; t < N_THR; t++) cm[t] = 0;
    for (int j = 0; j < NJ; j++) begin
      int et, ex, ey, rmult[N_THR];
      logic [N_THR-1:0] rhits[N_ROI];
      grid_t g;
      bit lb;
      lb = lb_sel && loopback_fit[j];
      g = crate_grid(j);
      energy(g, j / 8, lb, et, ex, ey);
      jets(g, thr, win, rmult, rhits);
      if (!lb && j % 8 != 0 && g[3][0] != 0) n_share++;
      checks++;
      if (int'(et_code[j]) != code_et(et) || int'(ex_code[j]) != code_exy(ex) ||
          int'(ey_code[j]) != code_exy(ey)) begin
        failures++; $display("%s jem %0d codes %h %h %h expected %h %h %h", what, j, et_code[j],
                             ex_code[j], ey_code[j], code_et(et), code_exy(ex), code_exy(ey));
      end
      for (int t = 0; t < N_THR; t++) begin
        checks++;
        if (int'(jet_mult[j][t]) != rmult[t]) begin
          failures++; $display("%s jem %0d mult %0d: %0d/%0d", what, j, t, jet_mult[j][t], rmult[t]);
        end
        cm[t] += rmult[t];
      end
      st += decode_et(code_et(et)); sx += decode_exy(code_exy(ex)); sy += decode_exy(code_exy(ey));
    end
    checks++;
    if (int'(crate_et) != st || int'(crate_ex) != sx || int'(crate_ey) != sy) begin
      failures++; $display("%s crate sums %0d %0d %0d expected %0d %0d %0d", what, crate_et, crate_ex,
                           crate_ey, st, sx, sy);
    end
    for (int t = 0; t < N_THR; t++) begin
      if (cm[t] > 7) begin cm[t] = 7; n_sat++; end
      checks++;
      if (int'(crate_mult[t]) != cm[t]) begin
        failures++; $display("%s crate mult %0d: %0d/%0d", what, t, crate_mult[t], cm[t]);
      end
    end
  endtask

  initial begin
    #80000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    link_data = '0;
    #23 rst_n = 1;
    repeat (4) step();
    for (int t = 0; t < N_THR; t++) begin thr[t] = 30 + 90 * t; win[t] = (t + 1) % 3; end
    for (int j = 0; j < NJ; j++) begin
      wr(j, 16'h0000, 16'((j / 8) << 4));
      for (int t = 0; t < N_THR; t++) begin
        wr(j, 16'h0010 + 16'(t), 16'(thr[t]));
        wr(j, 16'h0018 + 16'(t), 16'(win[t]));
      end
    end
    // synchronisation of every link
    step();
    sync_mode = 1;
    for (int n = 0; n < 12; n++) begin
      for (int j = 0; j < NJ; j++)
        for (int c = 0; c < N_LINKS; c++) link_data[j][c] = (bcount == 2'd0) ? 9'h1A5 : 9'h0;
      step();
    end
    sync_mode = 0;
    link_data = '0;
    checks++;
    if (all_locked != '1) begin failures++; $display("locked %b", all_locked); end
    else n_sync++;
    // latency to the crate sum
    repeat (12) step();
    link_data[5][CH_PER_FPGA*2 + 4] = 9'd300;     // HAD, JEM 5, phi row 2
    begin
      int k;
      k = 0;
      step();
      link_data = '0;
      while (crate_et == '0 && k < 20) begin step(); k++; end
      checks++;
      if (k + 1 != 9) begin failures++; $display("crate latency %0d BC", k + 1); end
      else n_lat++;
    end
    // random events
    for (int n = 0; n < 24; n++) begin
      for (int j = 0; j < NJ; j++)
        for (int c = 0; c < N_LINKS; c++)
          link_data[j][c] = ($urandom_range(0, (n % 3 == 0) ? 2 : 9) == 0) ? link_t'($urandom_range(0, 511))
                                                                           : link_t'($urandom_range(0, 6));
      repeat (12) step();
      check_crate($sformatf("event %0d", n), 0);
    end
    // loopback device on module 10
    loopback_fit[10] = 1;
    wr(10, 16'h0000, 16'h0014);
    for (int n = 0; n < 4; n++) begin
      for (int j = 0; j < NJ; j++)
        for (int c = 0; c < N_LINKS; c++) link_data[j][c] = link_t'((n * 29 + c + j) % 300);
      repeat (12) step();
      check_crate($sformatf("loopback %0d", n), 1);
      n_loop++;
    end
    loopback_fit[10] = 0;
    wr(10, 16'h0000, 16'h0010);
    link_data = '0;
    // playback/spy cycle broadcast by TTC; module 2 plays random patterns
    begin
      link_t pat [N_LINKS][PB_DEPTH];
      int bad;
      for (int c = 0; c < N_LINKS; c++)
        for (int a = 0; a < PB_DEPTH; a++) begin
          pat[c][a] = ($urandom_range(0, 7) == 0) ? link_t'($urandom_range(0, 511)) : link_t'($urandom_range(0, 4));
          wr(2, {1'b1, 4'(c / 8), 3'(c % 8), 8'(a)}, 16'(pat[c][a]));
        end
      wr(2, 16'h0000, 16'h0003);
      ttc_start = 1; @(posedge clk); #1; ttc_start = 0;
      repeat (PB_DEPTH + 30) step();
      bad = 0;
      for (int a = 0; a < PB_DEPTH; a++) begin
        link_t [N_LINKS-1:0] l;
        logic [15:0] d0, d1, d2;
        int et, ex, ey, rmult[N_THR];
        logic [N_THR-1:0] rhits[N_ROI];
        logic [23:0] m;
        rd(2, 16'h1000 | 16'(a), d0);
        rd(2, 16'h1100 | 16'(a), d1);
        rd(2, 16'h1200 | 16'(a), d2);
        for (int c = 0; c < N_LINKS; c++) l[c] = pat[c][a];
        energy(own_grid(l), 0, 0, et, ex, ey);
        jets(own_grid(l), thr, win, rmult, rhits);
        m = {d2, d1[15:8]};
        if (int'(d0[7:0]) != code_et(et) || int'(d0[15:8]) != code_exy(ex) || int'(d1[7:0]) != code_exy(ey))
          bad++;
        for (int t = 0; t < N_THR; t++) if (int'(m[3*t +: 3]) != rmult[t]) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("spy of module 2: %0d wrong", bad); end
      else n_pb++;
    end
    wr(2, 16'h0000, 16'h0000);
    // readout of all modules, a second signal is dropped
    for (int j = 0; j < NJ; j++)
      for (int c = 0; c < N_LINKS; c++) link_data[j][c] = link_t'(j + c);
    repeat (12) step();
    begin
      int words[NJ], bad;
      for (int j = 0; j < NJ; j++) words[j] = 0;
      bad = 0;
      fork
        begin
          ttc_l1a = 1; step(); ttc_l1a = 0;
          step();
          ttc_l1a = 1; step(); ttc_l1a = 0;
        end
        for (int k = 0; k < 200; k++) begin
          @(posedge clk); #1;
          for (int j = 0; j < NJ; j++)
            if (daq_valid[j]) begin
              if (words[j] >= 1 && words[j] <= 44) begin
                int i, p, e;
                i = words[j] - 1; p = i / 4; e = i % 4;
                if (daq_word[j][9:0] != 10'(2 * (j + CH_PER_FPGA * p + e) + 4)) bad++;
              end
              words[j]++;
            end
        end
      join
      for (int j = 0; j < NJ; j++) begin
        checks++;
        if (words[j] != 57 || ro_lost[j] != 16'd1) begin
          failures++; $display("readout module %0d: %0d words, lost %0d", j, words[j], ro_lost[j]);
        end else begin n_ro++; n_lost++; end
      end
      checks++;
      if (bad != 0) begin failures++; $display("readout jet elements: %0d wrong", bad); end
    end
    $display("mechanisms: sync=%0d latency=%0d shared=%0d saturated=%0d loopback=%0d playback=%0d readout=%0d dropped=%0d",
             n_sync, n_lat, n_share, n_sat, n_loop, n_pb, n_ro, n_lost);
    if (n_sync == 0 || n_lat == 0 || n_share == 0 || n_sat == 0 || n_loop == 0 || n_pb == 0 ||
        n_ro == 0 || n_lost == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
