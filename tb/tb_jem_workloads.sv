// tb_jem_workloads: the module-level test runs of the prototype, on one JEM.
//  A. Random patterns through the playback memories: every channel gets
//     values 0..511 drawn from a falling exponential (inverse-transform
//     sampling, slope 100, this testbench's choice). Four playback/spy cycles
//     of 256 events each are run, and every spy word is compared with an
//     offline floating-point sum (exact cos/sin): ET exactly, Ex and Ey within
//     the coding step plus the coefficient rounding.
//  B. A 16-channel live feed into two neighbouring Input FPGAs, as from an
//     external data source, for each of the four pairs of core phi rows;
//     the spy memory is started alone and its 256 words are matched against
//     the repeating stream.
module tb_jem_workloads;
  import jem_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, bc = 0, sync_mode = 0;
  link_t [N_LINKS-1:0] link_data;
  nib_t [PHI_ALL-1:0] nb_out_hi;
  nib_t [PHI_ALL-1:0][1:0] nb_out_lo;
  logic [CODE_W-1:0] et_code, ex_code, ey_code;
  mult_t [N_THR-1:0] jet_mult;
  logic [15:0] vme_addr = 0, vme_wdata = 0, vme_rdata;
  logic vme_we = 0, vme_re = 0, ttc_start = 0, ttc_l1a = 0;
  logic [15:0] daq_word, roi_word, ro_lost;
  logic daq_valid, roi_valid, ro_busy, all_locked;
  int checks = 0, failures = 0, events = 0, n_pairs = 0;

  jem dut (.clk, .rst_n, .bc, .sync_mode, .link_data, .nb_in_lo('0), .nb_in_hi('0),
           .nb_out_lo, .nb_out_hi, .et_code, .ex_code, .ey_code, .jet_mult,
           .vme_addr, .vme_wdata, .vme_we, .vme_re, .vme_rdata, .ttc_start, .ttc_l1a,
           .daq_word, .daq_valid, .roi_word, .roi_valid, .ro_busy, .ro_lost, .all_locked);

  always #5 clk = ~clk;
  always @(posedge clk) bc <= rst_n ? ~bc : 1'b0;

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
  task automatic rd_spy(input int a, output logic [47:0] w);
    logic [15:0] d;
    rd(16'h1000 | 16'(a), d); w[15:0] = d;
    rd(16'h1100 | 16'(a), d); w[31:16] = d;
    rd(16'h1200 | 16'(a), d); w[47:32] = d;
  endtask

  function automatic link_t exp_value();
    real u, lam, v;
    lam = 100.0;
    u = real'($urandom_range(0, 1000000)) / 1000000.0;
    v = -lam * $ln(1.0 - u * (1.0 - $exp(-511.0 / lam)));
    return (v > 511.0) ? link_t'(511) : link_t'($rtoi(v));
  endfunction

  function automatic grid_t grid_of(link_t [N_LINKS-1:0] l);
    grid_t g;
    g = '0;
    for (int p = 0; p < PHI_ALL; p++)
      for (int e = 0; e < ETA_CORE; e++)
        g[p][e+1] = je_t'(l[CH_PER_FPGA*p + e]) + je_t'(l[CH_PER_FPGA*p + e + 4]);
    return g;
  endfunction

  // offline floating-point sums and comparison with the decoded codes
  task automatic offline_check(grid_t g, int q, logic [47:0] w, string what);
    real fx, fy, a, tol;
    int et, row, dx, dy;
    fx = 0.0; fy = 0.0; et = 0;
    for (int r = 0; r < PHI_CORE; r++) begin
      row = 0;
      for (int e = 1; e <= 4; e++) row += int'(g[r+1][e]);
      a = (8.0 * q + r + 0.5) * 2.0 * 3.14159265358979 / 32.0;
      fx += row * $cos(a); fy += row * $sin(a);
      et += row;
    end
    checks++;
    if (int'(w[7:0]) != code_et(et)) begin
      failures++; $display("%s: ET code %h, offline %0d", what, w[7:0], et);
    end
    dx = decode_exy(int'(w[15:8]));
    dy = decode_exy(int'(w[23:16]));
    // step of the code range plus 8 rows x 4088 x 0.5/256 of coefficient error
    tol = 1.0 + 8.0 * 4088.0 * 0.5 / 256.0;
    for (int k = 0; k < 2; k++) begin
      real f, step;
      int dv;
      f = k ? fy : fx;
      dv = k ? dy : dx;
      step = (f < 0 ? -f : f) < 32.0 ? 1.0 : (f < 0 ? -f : f) < 256.0 ? 8.0 :
             (f < 0 ? -f : f) < 2048.0 ? 64.0 : 512.0;
      checks++;
      // the code truncates the magnitude, so |decoded| lies within one step below |offline|
      if (f < 0) begin f = -f; dv = -dv; end
      if (real'(dv) - f > tol || f - real'(dv) > step + tol) begin
        failures++; $display("%s: E%s |decoded| %0d, |offline| %f", what, k ? "y" : "x", dv, f);
      end
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] w;
    logic [15:0] d;
    link_data = '0;
    #23 rst_n = 1;
    repeat (4) step();
    // A. random-pattern playback runs, quadrant 2
    for (int run = 0; run < 4; run++) begin
      link_t pat [N_LINKS][PB_DEPTH];
      for (int c = 0; c < N_LINKS; c++)
        for (int a = 0; a < PB_DEPTH; a++) begin
          pat[c][a] = exp_value();
          wr({1'b1, 4'(c / 8), 3'(c % 8), 8'(a)}, 16'(pat[c][a]));
        end
      wr(16'h0000, 16'h0023);
      wr(16'h0001, 16'h0001);
      repeat (PB_DEPTH + 30) step();
      for (int a = 0; a < PB_DEPTH; a++) begin
        link_t [N_LINKS-1:0] l;
        for (int c = 0; c < N_LINKS; c++) l[c] = pat[c][a];
        rd_spy(a, w);
        offline_check(grid_of(l), 2, w, $sformatf("run %0d event %0d", run, a));
        events++;
      end
    end
    // B. 16-channel live feed into each pair of core Input FPGAs, spy only
    wr(16'h0000, 16'h0002);
    for (int pair = 0; pair < 4; pair++) begin
      link_t stream [32][16];
      int f0;
      f0 = 1 + 2 * pair;            // core phi rows are Input FPGAs 1..8
      for (int k = 0; k < 32; k++)
        for (int c = 0; c < 16; c++) stream[k][c] = exp_value();
      fork
        begin : feed
          int k;
          k = 0;
          forever begin
            link_data = '0;
            for (int c = 0; c < 16; c++) link_data[CH_PER_FPGA * f0 + c] = stream[k % 32][c];
            step();
            k++;
          end
        end
        begin
          repeat (40) step();
          wr(16'h0001, 16'h0001);
          repeat (PB_DEPTH + 20) step();
        end
      join_any
      disable fork;
      link_data = '0;
      // the spy words repeat with the stream's period; find the phase from
      // word 0, then check all 256 words against it
      begin
        int ph, bad;
        logic [47:0] sw [PB_DEPTH];
        ph = -1;
        for (int a = 0; a < PB_DEPTH; a++) rd_spy(a, sw[a]);
        for (int k = 0; k < 32 && ph < 0; k++) begin
          link_t [N_LINKS-1:0] l;
          int et, ex, ey;
          bit ok;
          ok = 1;
          for (int a = 0; a < 4; a++) begin
            l = '0;
            for (int c = 0; c < 16; c++) l[CH_PER_FPGA * f0 + c] = stream[(k + a) % 32][c];
            energy(grid_of(l), 0, 0, et, ex, ey);
            if (int'(sw[a][23:0]) != (code_exy(ey) << 16 | code_exy(ex) << 8 | code_et(et))) ok = 0;
          end
          if (ok) ph = k;
        end
        checks++;
        if (ph < 0) begin failures++; $display("pair %0d: spy does not match the stream", pair); end
        else begin
          bad = 0;
          for (int a = 0; a < PB_DEPTH; a++) begin
            link_t [N_LINKS-1:0] l;
            l = '0;
            for (int c = 0; c < 16; c++) l[CH_PER_FPGA * f0 + c] = stream[(ph + a) % 32][c];
            offline_check(grid_of(l), 0, sw[a], $sformatf("pair %0d word %0d", pair, a));
            events++;
          end
          n_pairs++;
        end
      end
    end
    $display("events compared: %0d, input FPGA pairs: %0d", events, n_pairs);
    if (n_pairs != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
