// cmm_energy: energy-sum Common Merger Module of one JEP crate.
//
// Decodes the 8-bit ET, Ex and Ey codes of the N_JEM modules of the crate
// (quad-linear code of energy_encoder) and adds them into crate sums. The
// role of the merger and the 16 modules per crate are the document's; the
// code, the sum widths and the single register stage are this design's.
// Forming system-wide trigger sums across crates is not modelled.
// Timing: one bunch-crossing register stage.
module cmm_energy
  import jem_pkg::*;
#(
  parameter int N_JEM = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bc,
  input  logic [N_JEM-1:0][CODE_W-1:0] et_code,
  input  logic [N_JEM-1:0][CODE_W-1:0] ex_code,
  input  logic [N_JEM-1:0][CODE_W-1:0] ey_code,
  output logic [CRATE_W-1:0] crate_et,
  output logic signed [CRATE_W-1:0] crate_ex,
  output logic signed [CRATE_W-1:0] crate_ey
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crate_et <= '0; crate_ex <= '0; crate_ey <= '0;
    end else if (bc) begin
      automatic logic [CRATE_W-1:0] st = '0;
      automatic logic signed [CRATE_W-1:0] sx = '0, sy = '0;
      for (int j = 0; j < N_JEM; j++) begin
        st = st + CRATE_W'(dec_et(et_code[j]));
        sx = sx + CRATE_W'(dec_exy(ex_code[j]));
        sy = sy + CRATE_W'(dec_exy(ey_code[j]));
      end
      crate_et <= st; crate_ex <= sx; crate_ey <= sy;
    end
  end
endmodule
