// tb_je_link: sends random jet elements through je_link_tx and je_link_rx
// and checks that each arrives unchanged exactly one bunch crossing later,
// and that the wire carries the low half first.
module tb_je_link;
  import jem_pkg::*;

  logic clk = 0, rst_n = 0, bc = 0;
  je_t je, je_out;
  nib_t nib;
  int checks = 0, failures = 0;
  je_t sent [$];

  je_link_tx u_tx (.clk, .rst_n, .bc, .je, .nib);
  je_link_rx u_rx (.clk, .rst_n, .bc, .nib, .je(je_out));

  always #5 clk = ~clk;
  always @(posedge clk) bc <= rst_n ? ~bc : 1'b0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    je = '0;
    #23 rst_n = 1;
    @(posedge clk iff bc); #1;
    for (int n = 0; n < 300; n++) begin
      je_t v;
      v = je_t'($urandom);
      je = v;
      @(posedge clk iff bc); #1;          // tx samples v
      checks++;
      if (nib != v[4:0]) begin failures++; $display("low half %h of %h", nib, v); end
      @(posedge clk); #1;
      checks++;
      if (nib != v[9:5]) begin failures++; $display("high half %h of %h", nib, v); end
      @(posedge clk iff bc); #1;          // rx joins the halves: one BC
      checks++;
      if (je_out != v) begin failures++; $display("got %h sent %h", je_out, v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
