// tb_input_fpga: drives random link words and checks the jet elements
// (EM + HAD, two bunch crossings later) and their 5-bit link words (two
// more bunch crossings through a link transmitter and receiver); then
// loads all eight playback memories, runs one playback cycle and checks the
// 256 played-back sums and the VME readback of the memories.
module tb_input_fpga;
  import jem_pkg::*;

  logic clk = 0, rst_n = 0, bc = 0, sync_mode = 0;
  link_t [7:0] link_in;
  logic pb_run = 0, pb_we = 0;
  logic [7:0] pb_addr = 0, pb_waddr = 0, pb_raddr = 0;
  logic [2:0] pb_ch = 0;
  link_t pb_wdata = 0;
  link_t [7:0] pb_rdata;
  je_t [3:0] je, je_rx;
  nib_t [3:0] je_nib;
  logic [7:0] locked;
  link_t pat [8][256];
  int checks = 0, failures = 0;

  input_fpga dut (.*);
  for (genvar e = 0; e < 4; e++) begin : g_rx
    je_link_rx u_rx (.clk, .rst_n, .bc, .nib(je_nib[e]), .je(je_rx[e]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) bc <= rst_n ? ~bc : 1'b0;

  task automatic step();
    @(posedge clk iff bc); #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    link_t hist [$][8];
    link_in = '0;
    #23 rst_n = 1;
    step();
    // live data
    for (int n = 0; n < 200; n++) begin
      link_t w [8];
      for (int c = 0; c < 8; c++) begin w[c] = link_t'($urandom); link_in[c] = w[c]; end
      hist.push_back(w);
      step();
      if (n >= 3) begin
        for (int e = 0; e < 4; e++) begin
          int s2, s3;
          s2 = int'(hist[n-1][e]) + int'(hist[n-1][e+4]);   // sampled 2 BCs ago
          s3 = int'(hist[n-3][e]) + int'(hist[n-3][e+4]);   // tx and rx registers: two BCs more
          checks += 2;
          if (int'(je[e]) != s2) begin failures++; $display("n=%0d e=%0d je %0d/%0d", n, e, je[e], s2); end
          if (int'(je_rx[e]) != s3) begin failures++; $display("n=%0d e=%0d link %0d/%0d", n, e, je_rx[e], s3); end
        end
      end
    end
    // load playback memories
    for (int c = 0; c < 8; c++)
      for (int a = 0; a < 256; a++) begin
        pat[c][a] = link_t'($urandom_range(0, 511));
        @(posedge clk); #1;
        pb_we = 1; pb_ch = 3'(c); pb_waddr = 8'(a); pb_wdata = pat[c][a];
      end
    @(posedge clk); #1;
    pb_we = 0;
    for (int c = 0; c < 8; c++)
      for (int a = 0; a < 256; a += 17) begin
        pb_raddr = 8'(a);
        @(posedge clk); #1;
        checks++;
        if (pb_rdata[c] != pat[c][a]) begin failures++; $display("readback %0d %0d", c, a); end
      end
    // playback cycle; the links carry a different pattern meanwhile
    step();
    for (int n = 0; n < 256 + 2; n++) begin
      pb_run = (n < 256);
      pb_addr = 8'(n);
      for (int c = 0; c < 8; c++) link_in[c] = 9'h1FF;
      step();
      if (n >= 1 && n <= 256) begin
        // word n-1 was read in the previous BC and summed now
        for (int e = 0; e < 4; e++) begin
          int s;
          s = int'(pat[e][n-1]) + int'(pat[e+4][n-1]);
          checks++;
          if (int'(je[e]) != s) begin failures++; $display("pb n=%0d e=%0d %0d/%0d", n, e, je[e], s); end
        end
      end
    end
    pb_run = 0;
    step(); step();
    checks++;
    if (je[0] != 10'd1022) begin failures++; $display("links not back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
