// tb_main_processor: sends random 7 x 11 grids as 5-bit link words (own,
// lower and higher neighbour columns), holds each for some bunch crossings
// and checks energy codes, jet multiplicities and candidate bits against the
// reference models, in both quadrants and in loopback mode. Checks the
// latency from link transmitter input to the outputs (five bunch crossings)
// and a spy-memory capture of 256 results.
module tb_main_processor;
  import jem_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, bc = 0;
  jem_cfg_t cfg;
  nib_t [PHI_ALL-1:0][ETA_CORE-1:0] nib_own;
  nib_t [PHI_ALL-1:0] nib_lo;
  nib_t [PHI_ALL-1:0][1:0] nib_hi;
  logic [CODE_W-1:0] et_code, ex_code, ey_code;
  mult_t [N_THR-1:0] jet_mult;
  logic [N_ROI-1:0][N_THR-1:0] roi_hits;
  logic spy_start = 0, spy_busy;
  logic [PB_AW-1:0] spy_raddr = 0;
  logic [47:0] spy_rdata;
  grid_t g;
  int checks = 0, failures = 0;
  int n_loop = 0;

  main_processor dut (.*);

  // transmitters standing in for the Input FPGAs and neighbour modules
  for (genvar p = 0; p < PHI_ALL; p++) begin : g_tx
    for (genvar e = 0; e < ETA_ALL; e++) begin : g_e
      if (e == 0) begin : g_lo
        je_link_tx u (.clk, .rst_n, .bc, .je(g[p][e]), .nib(nib_lo[p]));
      end else if (e <= 4) begin : g_own
        je_link_tx u (.clk, .rst_n, .bc, .je(g[p][e]), .nib(nib_own[p][e-1]));
      end else begin : g_hi
        je_link_tx u (.clk, .rst_n, .bc, .je(g[p][e]), .nib(nib_hi[p][e-5]));
      end
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) bc <= rst_n ? ~bc : 1'b0;

  task automatic step();
    @(posedge clk iff bc); #1;
  endtask

  task automatic check_all(int n);
    int et, ex, ey, rthr[N_THR], rwin[N_THR], rmult[N_THR];
    logic [N_THR-1:0] rhits[N_ROI];
    energy(g, int'(cfg.quadrant), cfg.loopback, et, ex, ey);
    for (int t = 0; t < N_THR; t++) begin rthr[t] = int'(cfg.thr[t]); rwin[t] = int'(cfg.win[t]); end
    jets(g, rthr, rwin, rmult, rhits);
    checks++;
    if (int'(et_code) != code_et(et) || int'(ex_code) != code_exy(ex) || int'(ey_code) != code_exy(ey)) begin
      failures++;
      $display("n=%0d codes %h %h %h expected %h %h %h", n, et_code, ex_code, ey_code,
               code_et(et), code_exy(ex), code_exy(ey));
    end
    for (int t = 0; t < N_THR; t++) begin
      checks++;
      if (int'(jet_mult[t]) != rmult[t]) begin failures++; $display("n=%0d mult %0d", n, t); end
    end
    for (int i = 0; i < N_ROI; i++) begin
      checks++;
      if (roi_hits[i] != rhits[i]) begin failures++; $display("n=%0d roi %0d", n, i); end
    end
  endtask

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    g = '0;
    cfg = '0;
    for (int t = 0; t < N_THR; t++) begin cfg.thr[t] = thr_t'(30 + 60 * t); cfg.win[t] = win_e'(t % 3); end
    #23 rst_n = 1;
    repeat (8) step();
    // latency: one element
    g[4][2] = 10'd200;
    step();
    g = '0;
    for (int k = 2; k <= 7; k++) begin
      step();
      checks++;
      if ((k == 6) != (et_code != 8'd0)) begin failures++; $display("latency: et_code %h after %0d", et_code, k); end
    end
    for (int n = 0; n < 150; n++) begin
      g = rand_grid(n % 3 == 0 ? 0 : 1);
      cfg.quadrant = 2'(n % 4);
      cfg.loopback = (n % 6 == 5);
      if (cfg.loopback) n_loop++;
      repeat (6) step();
      check_all(n);
    end
    // spy memory: 256 consecutive results of a changing stream
    cfg.loopback = 0;
    begin
      logic [47:0] exp_spy [$];
      spy_start = 1;
      exp_spy.push_back({jet_mult, ey_code, ex_code, et_code});
      @(posedge clk); #1;
      spy_start = 0;
      for (int n = 0; n < 300; n++) begin
        g[1 + n % 8][1 + n % 4] = je_t'(n);
        step();
        if (exp_spy.size() < 256) exp_spy.push_back({jet_mult, ey_code, ex_code, et_code});
      end
      checks++;
      if (spy_busy) begin failures++; $display("spy still busy"); end
      for (int a = 0; a < 256; a++) begin
        spy_raddr = 8'(a);
        @(posedge clk); #1;
        checks++;
        if (spy_rdata != exp_spy[a]) begin failures++; $display("spy %0d %h/%h", a, spy_rdata, exp_spy[a]); end
      end
    end
    if (n_loop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
