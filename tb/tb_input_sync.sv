// tb_input_sync: feeds the synchronisation pattern with each of four channel
// delays (0 to 3 clock ticks) and checks the phase found, the lock flag, and
// that data sent after synchronisation leaves aligned to the bunch crossing.
module tb_input_sync;
  import jem_pkg::*;

  localparam link_t SW = 9'h1A5;
  logic clk = 0, rst_n = 0, bc = 0, sync_mode = 0;
  link_t src, din, dout;
  logic [1:0] phase;
  logic locked;
  link_t dl [4];
  int delay;
  int checks = 0, failures = 0;
  logic [1:0] bcount;

  input_sync #(.SYNC_WORD(SW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) bc <= rst_n ? ~bc : 1'b0;
  // cable delay model in clock ticks
  always @(posedge clk) begin
    dl[0] <= src;
    for (int k = 1; k < 4; k++) dl[k] <= dl[k-1];
  end
  assign din = (delay == 0) ? src : dl[delay-1];
  // source bunch counter, aligned with the stage's own counter
  always @(posedge clk or negedge rst_n)
    if (!rst_n) bcount <= 0; else if (bc) bcount <= bcount + 1'b1;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    src = '0; delay = 0;
    #23 rst_n = 1;
    for (int d = 0; d < 4; d++) begin
      delay = d;
      @(posedge clk iff bc); #1;
      sync_mode = 1;
      for (int n = 0; n < 16; n++) begin
        // marker two bunch crossings ahead of the stage's BC 0, so that
        // every cable delay of 0..3 ticks can be made up by a tap
        src = (bcount == 2'd2) ? SW : '0;
        @(posedge clk iff bc); #1;
      end
      sync_mode = 0;
      checks++;
      if (!locked) begin failures++; $display("delay %0d: not locked", d); end
      // the tap added makes up the cable delay: phase + delay is constant
      checks++;
      if (int'(phase) + d != 3) begin failures++; $display("delay %0d: phase %0d", d, phase); end
      // after synchronisation every delay gives the same alignment of the
      // data to the bunch crossing
      for (int n = 0; n < 20; n++) begin
        src = link_t'(n + 1);
        @(posedge clk iff bc); #1;
        if (n >= 4) begin
          checks++;
          if (int'(dout) != n + 1 - 2) begin
            failures++; $display("delay %0d: word %0d while sending %0d", d, dout, n + 1);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
