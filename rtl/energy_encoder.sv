// energy_encoder: 8-bit coding of ET, Ex and Ey for the energy merger.
//
// Each JEM sends its three energy values as 8-bit words. The code used here
// is quad-linear: a 2-bit range r and a mantissa m stand for m << (3*r).
// ET uses a 6-bit mantissa (full scale 63*512, above which it saturates);
// Ex and Ey use a sign bit and a 5-bit mantissa of the magnitude (full scale
// 31*512). Lower bits within a range are dropped. The 8-bit width is the
// module's; the code itself is this design's choice (jem_pkg::enc_et,
// enc_exy; cmm_energy decodes it).
// Timing: one bunch-crossing register stage.
module energy_encoder
  import jem_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic bc,
  input  logic [ET_W-1:0] et,
  input  logic signed [EXY_W-1:0] ex,
  input  logic signed [EXY_W-1:0] ey,
  output logic [CODE_W-1:0] et_code,
  output logic [CODE_W-1:0] ex_code,
  output logic [CODE_W-1:0] ey_code
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      et_code <= '0; ex_code <= '0; ey_code <= '0;
    end else if (bc) begin
      et_code <= enc_et(et);
      ex_code <= enc_exy(ex);
      ey_code <= enc_exy(ey);
    end
  end
endmodule
