// jem: one Jet/Energy Module.
//
// Eleven Input FPGAs (one per phi row, eight links each) turn the 88 link
// words into 44 jet elements and send them as 5-bit words at 80 Mb/s to the
// Main Processor; the same words leave over the backplane to the neighbour
// modules: the two lowest eta columns (22 elements) to the lower-eta
// neighbour, the highest column (11 elements) to the higher-eta one. The
// Main Processor adds the 33 elements received from the neighbours, finds
// jets and forms the energy sums. The control block holds the VME registers
// and runs playback/spy cycles; the readout controller sends DAQ and RoI
// packets on the readout signal.
// Block structure and counts follow the module's architecture; the VME map
// is this design's own:
//   0x0000-0x00FF control registers (jem_control)
//   0x1000-0x13FF Main Processor spy: addr[9:8] selects the 16-bit slice of
//                 the 48-bit word {mult[7:0], ey, ex, et}, addr[7:0] word
//   0x2000-0x20FF readout spy memory (DAQ words)
//   0x8000-0xDFFF playback memories: addr[14:11] Input FPGA (phi row),
//                 addr[10:8] channel (0-3 EM, 4-7 HAD), addr[7:0] word
// Interface: link_data[8*row + k]; nb_* ports carry 5-bit link words,
// nb_in_hi[row][c] / nb_out_lo[row][c] for the columns c = 0, 1.
// Timing: clk is the 80 MHz link clock, bc the strobe on every second clock
// that marks a bunch crossing. Energy codes and jet multiplicities leave
// eight bunch crossings after the link words reach the Input FPGAs (with the
// input phase at 0). A VME read returns data on the clock after vme_re.
module jem
  import jem_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic bc,
  input  logic sync_mode,
  input  link_t [N_LINKS-1:0] link_data,
  input  nib_t [PHI_ALL-1:0]      nb_in_lo,
  input  nib_t [PHI_ALL-1:0][1:0] nb_in_hi,
  output nib_t [PHI_ALL-1:0][1:0] nb_out_lo,
  output nib_t [PHI_ALL-1:0]      nb_out_hi,
  output logic [CODE_W-1:0] et_code,
  output logic [CODE_W-1:0] ex_code,
  output logic [CODE_W-1:0] ey_code,
  output mult_t [N_THR-1:0] jet_mult,
  // VME
  input  logic [15:0] vme_addr,
  input  logic [15:0] vme_wdata,
  input  logic        vme_we,
  input  logic        vme_re,
  output logic [15:0] vme_rdata,
  // TTC
  input  logic        ttc_start,
  input  logic        ttc_l1a,
  // readout links
  output logic [15:0] daq_word,
  output logic        daq_valid,
  output logic [15:0] roi_word,
  output logic        roi_valid,
  output logic        ro_busy,
  output logic [15:0] ro_lost,
  output logic        all_locked
);
  jem_cfg_t cfg;
  logic pb_run, spy_start, spy_busy, ro_spy_start, ro_spy_busy;
  logic [PB_AW-1:0] pb_addr;
  nib_t [PHI_ALL-1:0][ETA_CORE-1:0] nib_own;
  je_t  [N_OWN_JE-1:0] je_all;
  link_t [N_FPGA-1:0][CH_PER_FPGA-1:0] pb_rdata;
  logic [N_FPGA-1:0][CH_PER_FPGA-1:0] locked;
  logic [N_ROI-1:0][N_THR-1:0] roi_hits;
  logic [47:0] spy_rdata;
  logic [15:0] reg_rdata, ro_spy_rdata;
  logic [11:0] bcid;

  wire pb_sel = vme_addr[15];

  for (genvar f = 0; f < N_FPGA; f++) begin : g_fpga
    je_t [ETA_CORE-1:0] je_f;
    input_fpga u_in (
      .clk, .rst_n, .bc, .sync_mode,
      .link_in(link_data[f*CH_PER_FPGA +: CH_PER_FPGA]),
      .pb_run, .pb_addr,
      .pb_we(vme_we && pb_sel && vme_addr[14:11] == 4'(f)),
      .pb_ch(vme_addr[10:8]), .pb_waddr(vme_addr[7:0]), .pb_wdata(vme_wdata[LINK_W-1:0]),
      .pb_raddr(vme_addr[7:0]), .pb_rdata(pb_rdata[f]),
      .je(je_f), .je_nib(nib_own[f]), .locked(locked[f])
    );
    assign je_all[f*ETA_CORE +: ETA_CORE] = je_f;
    assign nb_out_lo[f][0] = nib_own[f][0];
    assign nb_out_lo[f][1] = nib_own[f][1];
    assign nb_out_hi[f]    = nib_own[f][ETA_CORE-1];
  end

  assign all_locked = &locked;

  main_processor u_mp (
    .clk, .rst_n, .bc, .cfg, .nib_own, .nib_lo(nb_in_lo), .nib_hi(nb_in_hi),
    .et_code, .ex_code, .ey_code, .jet_mult, .roi_hits,
    .spy_start, .spy_busy, .spy_raddr(vme_addr[7:0]), .spy_rdata
  );

  jem_control u_ctl (
    .clk, .rst_n, .bc, .vme_addr, .vme_wdata, .vme_we, .vme_re, .reg_rdata,
    .ttc_start, .spy_busy, .ro_spy_busy, .all_locked,
    .cfg, .pb_run, .pb_addr, .spy_start, .ro_spy_start
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bcid <= '0;
    else if (bc) bcid <= bcid + 1'b1;
  end

  readout_controller u_ro (
    .clk, .rst_n, .bc, .l1a(ttc_l1a), .bcid, .je(je_all),
    .et_code, .ex_code, .ey_code, .jet_mult, .roi_hits,
    .daq_word, .daq_valid, .roi_word, .roi_valid, .busy(ro_busy), .lost(ro_lost),
    .spy_start(ro_spy_start), .spy_busy(ro_spy_busy), .spy_raddr(vme_addr[7:0]),
    .spy_rdata(ro_spy_rdata)
  );

  // VME read data: every source registers on the clock of vme_re
  logic [15:0] rd_addr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_addr_q <= '0;
    else if (vme_re) rd_addr_q <= vme_addr;
  end

  always_comb begin
    vme_rdata = '0;
    if (rd_addr_q[15]) begin
      for (int f = 0; f < N_FPGA; f++)
        if (rd_addr_q[14:11] == 4'(f))
          vme_rdata = 16'(pb_rdata[f][rd_addr_q[10:8]]);
    end else if (rd_addr_q[15:12] == 4'h1) begin
      case (rd_addr_q[9:8])
        2'd0: vme_rdata = spy_rdata[15:0];
        2'd1: vme_rdata = spy_rdata[31:16];
        default: vme_rdata = spy_rdata[47:32];
      endcase
    end else if (rd_addr_q[15:12] == 4'h2) vme_rdata = ro_spy_rdata;
    else vme_rdata = reg_rdata;
  end
endmodule
