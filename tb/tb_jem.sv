// tb_jem: one Jet/Energy Module with its VME, TTC and backplane ports.
//  1. synchronises all 88 channels with the synchronisation pattern and
//     reads the lock status over VME;
//  2. measures the energy-path latency (eight bunch crossings);
//  3. checks energy codes and jet multiplicities for random link data and
//     random neighbour data against the reference models;
//  4. loads every playback memory over VME, runs a playback/spy cycle and
//     compares the 256 spy words read back over VME with the reference;
//  5. fits the backplane loopback device, switches the energy sums to the
//     duplicated channels and plays a binary-counter pattern;
//  6. triggers a readout and checks the DAQ packet.
module tb_jem;
  import jem_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, bc = 0, sync_mode = 0;
  link_t [N_LINKS-1:0] link_data;
  nib_t [PHI_ALL-1:0] nb_in_lo, nb_out_hi, tb_lo;
  nib_t [PHI_ALL-1:0][1:0] nb_in_hi, nb_out_lo, tb_hi;
  logic [CODE_W-1:0] et_code, ex_code, ey_code;
  mult_t [N_THR-1:0] jet_mult;
  logic [15:0] vme_addr = 0, vme_wdata = 0, vme_rdata;
  logic vme_we = 0, vme_re = 0, ttc_start = 0, ttc_l1a = 0;
  logic [15:0] daq_word, roi_word, ro_lost;
  logic daq_valid, roi_valid, ro_busy, all_locked;
  logic loop_fit = 0;
  grid_t nbg;                   // neighbour columns 0, 5, 6 driven by the testbench
  logic [1:0] bcount;
  int checks = 0, failures = 0;
  int thr[N_THR], win[N_THR];
  int n_sync = 0, n_pb = 0, n_loop = 0, n_ro = 0, n_lat = 0;

  jem dut (.*);

  for (genvar p = 0; p < PHI_ALL; p++) begin : g_nb
    je_link_tx u_lo (.clk, .rst_n, .bc, .je(nbg[p][0]), .nib(tb_lo[p]));
    je_link_tx u_h0 (.clk, .rst_n, .bc, .je(nbg[p][5]), .nib(tb_hi[p][0]));
    je_link_tx u_h1 (.clk, .rst_n, .bc, .je(nbg[p][6]), .nib(tb_hi[p][1]));
  end
  // backplane: testbench neighbours or the loopback device
  assign nb_in_lo = loop_fit ? nb_out_hi : tb_lo;
  assign nb_in_hi = loop_fit ? nb_out_lo : tb_hi;

  always #5 clk = ~clk;
  always @(posedge clk) bc <= rst_n ? ~bc : 1'b0;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) bcount <= 0; else if (bc) bcount <= bcount + 1'b1;

  task automatic step();
    @(posedge clk iff bc); #1;
  endtask
  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    vme_addr = a; vme_wdata = d; vme_we = 1;
    @(posedge clk); #1;
    vme_we = 0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    vme_addr = a; vme_re = 1;
    @(posedge clk); #1;
    vme_re = 0;
    d = vme_rdata;
  endtask

  function automatic grid_t grid_of(link_t [N_LINKS-1:0] l, grid_t nb, bit lb);
    grid_t g;
    g = nb;
    for (int p = 0; p < PHI_ALL; p++)
      for (int e = 0; e < ETA_CORE; e++)
        g[p][e+1] = je_t'(l[CH_PER_FPGA*p + e]) + je_t'(l[CH_PER_FPGA*p + e + 4]);
    if (lb)
      for (int p = 0; p < PHI_ALL; p++) begin
        g[p][0] = g[p][4]; g[p][5] = g[p][1]; g[p][6] = g[p][2];
      end
    return g;
  endfunction

  task automatic check_results(grid_t g, int q, bit lb, int et_c, int ex_c, int ey_c,
                               mult_t [N_THR-1:0] m, string what);
    int et, ex, ey, rmult[N_THR];
    logic [N_THR-1:0] rhits[N_ROI];
    energy(g, q, lb, et, ex, ey);
    jets(g, thr, win, rmult, rhits);
    checks++;
    if (et_c != code_et(et) || ex_c != code_exy(ex) || ey_c != code_exy(ey)) begin
      failures++;
      $display("%s: codes %h %h %h expected %h %h %h", what, et_c, ex_c, ey_c,
               code_et(et), code_exy(ex), code_exy(ey));
    end
    for (int t = 0; t < N_THR; t++) begin
      checks++;
      if (int'(m[t]) != rmult[t]) begin
        failures++; $display("%s: mult[%0d] %0d expected %0d", what, t, m[t], rmult[t]);
      end
    end
  endtask

  function automatic link_t rnd_link();
    return ($urandom_range(0, 5) == 0) ? link_t'($urandom_range(0, 511)) : link_t'($urandom_range(0, 8));
  endfunction

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    link_data = '0; nbg = '0;
    #23 rst_n = 1;
    repeat (4) step();
    // configuration: quadrant 1, thresholds and windows
    wr(16'h0000, 16'h0010);
    for (int t = 0; t < N_THR; t++) begin
      thr[t] = 40 + 70 * t; win[t] = t % 3;
      wr(16'h0010 + 16'(t), 16'(thr[t]));
      wr(16'h0018 + 16'(t), 16'(win[t]));
    end
    // 1. synchronisation
    step();
    sync_mode = 1;
    for (int n = 0; n < 16; n++) begin
      for (int c = 0; c < N_LINKS; c++) link_data[c] = (bcount == 2'd0) ? 9'h1A5 : 9'h000;
      step();
    end
    sync_mode = 0;
    link_data = '0;
    rd(16'h0002, d);
    checks++;
    if (!d[3]) begin failures++; $display("channels not locked"); end
    else n_sync++;
    // 2. latency of the energy path
    repeat (12) step();
    link_data[CH_PER_FPGA*3 + 1] = 9'd100;          // EM, phi row 3, eta column 1
    begin
      int k;
      k = 0;
      step();
      link_data = '0;
      while (et_code == 8'd0 && k < 20) begin step(); k++; end
      checks++;
      if (k + 1 != 8) begin failures++; $display("latency %0d BC", k + 1); end
      else n_lat++;
    end
    // 3. live data with random neighbours
    for (int n = 0; n < 40; n++) begin
      for (int c = 0; c < N_LINKS; c++) link_data[c] = rnd_link();
      for (int p = 0; p < PHI_ALL; p++) begin
        nbg[p][0] = je_t'($urandom_range(0, 300));
        nbg[p][5] = je_t'($urandom_range(0, 300));
        nbg[p][6] = je_t'($urandom_range(0, 300));
      end
      repeat (10) step();
      check_results(grid_of(link_data, nbg, 0), 1, 0, et_code, ex_code, ey_code, jet_mult, "live");
    end
    link_data = '0; nbg = '0;
    // 4. playback/spy cycle over VME
    begin
      link_t pat [N_LINKS][PB_DEPTH];
      logic [47:0] sw;
      for (int c = 0; c < N_LINKS; c++)
        for (int a = 0; a < PB_DEPTH; a++) begin
          pat[c][a] = rnd_link();
          wr({1'b1, 4'(c / 8), 3'(c % 8), 8'(a)}, 16'(pat[c][a]));
        end
      rd({1'b1, 4'd10, 3'd7, 8'd200}, d);
      checks++;
      if (d != 16'(pat[87][200])) begin failures++; $display("playback readback"); end
      wr(16'h0000, 16'h0013);            // playback + spy, quadrant 1
      wr(16'h0001, 16'h0001);
      repeat (PB_DEPTH + 40) step();
      rd(16'h0002, d);
      checks++;
      if (d[1:0] != 2'b00) begin failures++; $display("cycle still running"); end
      for (int a = 0; a < PB_DEPTH; a++) begin
        link_t [N_LINKS-1:0] l;
        rd(16'h1000 | 16'(a), d); sw[15:0] = d;
        rd(16'h1100 | 16'(a), d); sw[31:16] = d;
        rd(16'h1200 | 16'(a), d); sw[47:32] = d;
        for (int c = 0; c < N_LINKS; c++) l[c] = pat[c][a];
        check_results(grid_of(l, '0, 0), 1, 0, int'(sw[7:0]), int'(sw[15:8]), int'(sw[23:16]),
                      sw[47:24], $sformatf("spy %0d", a));
      end
      n_pb++;
    end
    // 5. loopback device and duplicated-channel sums with a counter pattern
    begin
      link_t pat [N_LINKS];
      loop_fit = 1;
      wr(16'h0000, 16'h0014);            // loopback, quadrant 1
      for (int n = 0; n < 12; n++) begin
        for (int c = 0; c < N_LINKS; c++) begin
          pat[c] = link_t'((n * 37 + (c % 4) * 90 + c / 8) % 512);   // counter, columns far apart
          link_data[c] = pat[c];
        end
        repeat (10) step();
        check_results(grid_of(link_data, '0, 1), 1, 1, et_code, ex_code, ey_code, jet_mult, "loopback");
        n_loop++;
      end
      loop_fit = 0;
      wr(16'h0000, 16'h0010);
    end
    // 6. readout
    begin
      logic [15:0] q [$];
      for (int c = 0; c < N_LINKS; c++) link_data[c] = link_t'(c);
      repeat (12) step();
      ttc_l1a = 1; step(); ttc_l1a = 0;
      for (int k = 0; k < 80; k++) begin
        @(posedge clk); #1;
        if (daq_valid) q.push_back(daq_word);
      end
      checks++;
      if (q.size() != 57 || q[0][15:12] != 4'hA || q[56] != 16'hF039) begin
        failures++; $display("daq packet size %0d", q.size());
      end else begin
        n_ro++;
        for (int i = 0; i < N_OWN_JE; i++) begin
          int p, e;
          p = i / 4; e = i % 4;
          checks++;
          if (q[1+i] != {6'(i), 10'(CH_PER_FPGA*p + e + CH_PER_FPGA*p + e + 4)}) begin
            failures++; $display("daq je %0d: %h", i, q[1+i]);
          end
        end
        checks++;
        if (q[45] != {8'hE0, et_code}) begin failures++; $display("daq et"); end
      end
    end
    $display("mechanisms: sync=%0d latency=%0d playback=%0d loopback=%0d readout=%0d",
             n_sync, n_lat, n_pb, n_loop, n_ro);
    if (n_sync == 0 || n_lat == 0 || n_pb == 0 || n_loop == 0 || n_ro == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
