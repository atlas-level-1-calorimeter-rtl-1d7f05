// tb_jem_control: writes and reads back the configuration registers, then
// runs playback/spy cycles started by VME and by the TTC broadcast and checks
// the length of the playback run, the address sequence and the position of
// the spy start relative to the first playback word.
module tb_jem_control;
  import jem_pkg::*;
  localparam int SD = 8;

  logic clk = 0, rst_n = 0, bc = 0;
  logic [15:0] vme_addr = 0, vme_wdata = 0, reg_rdata;
  logic vme_we = 0, vme_re = 0, ttc_start = 0;
  logic spy_busy = 0, ro_spy_busy = 0, all_locked = 1;
  jem_cfg_t cfg;
  logic pb_run, spy_start, ro_spy_start;
  logic [PB_AW-1:0] pb_addr;
  int checks = 0, failures = 0;
  int bc_n = 0, first_pb = -1, n_pb = 0, spy_at = -1, addr_err = 0, n_ro = 0;

  jem_control #(.SPY_DELAY(SD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) bc <= rst_n ? ~bc : 1'b0;

  // monitor, counting bunch crossings
  always @(posedge clk) begin
    if (bc) begin
      bc_n++;
      if (pb_run) begin
        if (first_pb < 0) first_pb = bc_n;
        if (int'(pb_addr) != n_pb) addr_err++;
        n_pb++;
      end
    end
    if (spy_start) spy_at = bc_n;
    if (ro_spy_start) n_ro++;
  end

  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    @(posedge clk); #1;
    vme_addr = a; vme_wdata = d; vme_we = 1;
    @(posedge clk); #1;
    vme_we = 0;
  endtask

  task automatic rd_check(input logic [15:0] a, input logic [15:0] d);
    @(posedge clk); #1;
    vme_addr = a; vme_re = 1;
    @(posedge clk); #1;
    vme_re = 0;
    checks++;
    if (reg_rdata != d) begin failures++; $display("read %h: %h expected %h", a, reg_rdata, d); end
  endtask

  task automatic cycle(input bit by_ttc, input bit pb, input bit spy);
    first_pb = -1; n_pb = 0; spy_at = -1; addr_err = 0;
    wr(16'h0000, {10'd0, 2'd1, 1'b0, 1'b0, spy, pb});
    @(posedge clk); #1;
    if (by_ttc) begin ttc_start = 1; @(posedge clk); #1; ttc_start = 0; end
    else wr(16'h0001, 16'h0001);
    repeat (600) @(posedge clk);
    #1;
    if (pb) begin
      checks += 2;
      if (n_pb != PB_DEPTH || addr_err != 0) begin
        failures++; $display("playback ran %0d BCs, %0d address errors", n_pb, addr_err);
      end
      if (spy && spy_at != first_pb + SD - 1) begin
        failures++; $display("spy start at %0d, first playback %0d", spy_at, first_pb);
      end
    end else begin
      checks++;
      if (n_pb != 0 || (spy && spy_at < 0)) begin failures++; $display("spy-only cycle"); end
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #23 rst_n = 1;
    // registers
    wr(16'h0000, 16'h0036);
    rd_check(16'h0000, 16'h0036);
    checks++;
    if (cfg.quadrant != 2'd3 || !cfg.loopback) begin failures++; $display("cfg fields"); end
    for (int t = 0; t < N_THR; t++) begin
      wr(16'h0010 + 16'(t), 16'(100 * t + 7));
      wr(16'h0018 + 16'(t), 16'(t % 3));
    end
    for (int t = 0; t < N_THR; t++) begin
      rd_check(16'h0010 + 16'(t), 16'(100 * t + 7));
      rd_check(16'h0018 + 16'(t), 16'(t % 3));
      checks++;
      if (cfg.thr[t] != thr_t'(100 * t + 7) || cfg.win[t] != win_e'(t % 3)) begin
        failures++; $display("cfg thr %0d", t);
      end
    end
    rd_check(16'h0002, 16'h0008);
    // cycles
    cycle(0, 1, 1);
    cycle(1, 1, 1);
    cycle(0, 1, 0);
    cycle(1, 0, 1);
    // readout spy start
    wr(16'h0001, 16'h0002);
    @(posedge clk); #1;
    checks++;
    if (n_ro != 1) begin failures++; $display("readout spy start %0d", n_ro); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
