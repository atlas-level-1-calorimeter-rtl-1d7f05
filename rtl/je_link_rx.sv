// je_link_rx: 80 Mb/s receiver of one jet element.
//
// Counterpart of je_link_tx: keeps the low half seen between strobes and, on
// the bunch-crossing strobe, joins it with the high half now on the wire.
// Timing: je is registered on the strobe, one bunch crossing after the
// transmitter sampled it.
module je_link_rx
  import jem_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic bc,
  input  nib_t nib,
  output je_t  je
);
  nib_t lo;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo <= '0;
      je <= '0;
    end else if (bc) begin
      je <= {nib, lo};
    end else begin
      lo <= nib;
    end
  end
endmodule
