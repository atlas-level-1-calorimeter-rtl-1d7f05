// cmm_jet: jet Common Merger Module of one JEP crate.
//
// Adds, for each of the eight thresholds, the jet multiplicities of the
// N_JEM modules of the crate and saturates the crate multiplicity at 7. The
// merger's role is the document's; the 3-bit saturating result and the one
// register stage are this design's choices.
// Timing: one bunch-crossing register stage.
module cmm_jet
  import jem_pkg::*;
#(
  parameter int N_JEM = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bc,
  input  mult_t [N_JEM-1:0][N_THR-1:0] jet_mult,
  output mult_t [N_THR-1:0] crate_mult
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) crate_mult <= '0;
    else if (bc) begin
      for (int t = 0; t < N_THR; t++) begin
        automatic int n = 0;
        for (int j = 0; j < N_JEM; j++) n += int'(jet_mult[j][t]);
        crate_mult[t] <= (n > 7) ? mult_t'(7) : mult_t'(n);
      end
    end
  end
endmodule
