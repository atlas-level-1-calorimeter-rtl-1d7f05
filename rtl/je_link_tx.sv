// je_link_tx: 80 Mb/s transmitter of one jet element.
//
// Jet elements travel to the Main Processor and to the neighbouring modules
// as 5-bit words at twice the bunch-crossing rate. On the bunch-crossing
// strobe the 10-bit element is taken and its low half driven; on the next
// clock the high half follows. The 5-bit/80 Mb/s format is the module's;
// the order of the halves is this design's choice.
// Timing: nib carries je[4:0] in the clock after the strobe and je[9:5] in
// the clock after that; je_link_rx turns it back into a word one bunch
// crossing after je was sampled.
module je_link_tx
  import jem_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic bc,
  input  je_t  je,
  output nib_t nib
);
  nib_t hi;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nib <= '0;
      hi  <= '0;
    end else if (bc) begin
      nib <= je[NIB_W-1:0];
      hi  <= je[JE_W-1:NIB_W];
    end else begin
      nib <= hi;
    end
  end
endmodule
