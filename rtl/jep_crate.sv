// jep_crate: one crate of the Jet/Energy-sum Processor.
//
// The processor is split into calorimeter quadrants of eight JEMs each; a
// crate holds N_QUAD quadrants (16 JEMs). Within a quadrant the JEMs cover
// consecutive eta ranges and pass duplicated jet elements to both eta
// neighbours over the backplane; the JEMs at the ends of a quadrant receive
// zeros from the missing side. For every JEM a backplane loopback device can
// be fitted (loopback_fit): it feeds the module's own neighbour outputs back
// into its neighbour inputs. The energy codes of all JEMs go to the energy
// merger (cmm_energy), the jet multiplicities to the jet merger (cmm_jet).
// The crate also makes the bunch-crossing strobe from the 80 MHz clock.
// Quadrants of eight JEMs, 16 JEMs per crate, the backplane sharing and the
// loopback test follow the document; zero inputs at the quadrant ends are
// this design's choice.
// Interface: JEM j is index j (quadrant j / 8, eta position j % 8). VME
// accesses go to JEM vme_slot; vme_rdata is that JEM's read data.
// Timing: crate sums appear one bunch crossing after the JEM outputs.
module jep_crate
  import jem_pkg::*;
#(
  parameter int N_QUAD        = 2,
  parameter int JEMS_PER_QUAD = 8,
  localparam int N_JEM        = N_QUAD * JEMS_PER_QUAD
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sync_mode,
  input  link_t [N_JEM-1:0][N_LINKS-1:0] link_data,
  input  logic [N_JEM-1:0] loopback_fit,
  input  logic [3:0]  vme_slot,
  input  logic [15:0] vme_addr,
  input  logic [15:0] vme_wdata,
  input  logic        vme_we,
  input  logic        vme_re,
  output logic [15:0] vme_rdata,
  input  logic        ttc_start,
  input  logic        ttc_l1a,
  output logic        bc,
  output logic [N_JEM-1:0][CODE_W-1:0] et_code,
  output logic [N_JEM-1:0][CODE_W-1:0] ex_code,
  output logic [N_JEM-1:0][CODE_W-1:0] ey_code,
  output mult_t [N_JEM-1:0][N_THR-1:0] jet_mult,
  output logic [CRATE_W-1:0] crate_et,
  output logic signed [CRATE_W-1:0] crate_ex,
  output logic signed [CRATE_W-1:0] crate_ey,
  output mult_t [N_THR-1:0] crate_mult,
  output logic [N_JEM-1:0][15:0] daq_word,
  output logic [N_JEM-1:0] daq_valid,
  output logic [N_JEM-1:0][15:0] roi_word,
  output logic [N_JEM-1:0] roi_valid,
  output logic [N_JEM-1:0] ro_busy,
  output logic [N_JEM-1:0][15:0] ro_lost,
  output logic [N_JEM-1:0] all_locked
);
  nib_t [N_JEM-1:0][PHI_ALL-1:0][1:0] out_lo, in_hi;
  nib_t [N_JEM-1:0][PHI_ALL-1:0]      out_hi, in_lo;
  logic [N_JEM-1:0][15:0] rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bc <= 1'b0;
    else bc <= ~bc;
  end

  for (genvar j = 0; j < N_JEM; j++) begin : g_jem
    localparam int POS = j % JEMS_PER_QUAD;
    // backplane: lower-eta neighbour's highest column, higher-eta
    // neighbour's two lowest columns, or the loopback device
    always_comb begin
      if (loopback_fit[j]) begin
        in_lo[j] = out_hi[j];
        in_hi[j] = out_lo[j];
      end else begin
        in_lo[j] = '0;
        in_hi[j] = '0;
        if (POS > 0)                 in_lo[j] = out_hi[(POS > 0) ? j - 1 : j];
        if (POS < JEMS_PER_QUAD - 1) in_hi[j] = out_lo[(POS < JEMS_PER_QUAD - 1) ? j + 1 : j];
      end
    end

    jem u_jem (
      .clk, .rst_n, .bc, .sync_mode, .link_data(link_data[j]),
      .nb_in_lo(in_lo[j]), .nb_in_hi(in_hi[j]),
      .nb_out_lo(out_lo[j]), .nb_out_hi(out_hi[j]),
      .et_code(et_code[j]), .ex_code(ex_code[j]), .ey_code(ey_code[j]),
      .jet_mult(jet_mult[j]),
      .vme_addr, .vme_wdata,
      .vme_we(vme_we && vme_slot == 4'(j)), .vme_re(vme_re && vme_slot == 4'(j)),
      .vme_rdata(rdata[j]),
      .ttc_start, .ttc_l1a,
      .daq_word(daq_word[j]), .daq_valid(daq_valid[j]),
      .roi_word(roi_word[j]), .roi_valid(roi_valid[j]),
      .ro_busy(ro_busy[j]), .ro_lost(ro_lost[j]), .all_locked(all_locked[j])
    );
  end

  // read data of the slot addressed last
  logic [3:0] slot_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slot_q <= '0;
    else if (vme_re) slot_q <= vme_slot;
  end
  always_comb begin
    vme_rdata = '0;
    for (int j = 0; j < N_JEM; j++)
      if (slot_q == 4'(j)) vme_rdata = rdata[j];
  end

  cmm_energy #(.N_JEM(N_JEM)) u_cmm_e (
    .clk, .rst_n, .bc, .et_code, .ex_code, .ey_code, .crate_et, .crate_ex, .crate_ey
  );
  cmm_jet #(.N_JEM(N_JEM)) u_cmm_j (
    .clk, .rst_n, .bc, .jet_mult, .crate_mult
  );
endmodule
