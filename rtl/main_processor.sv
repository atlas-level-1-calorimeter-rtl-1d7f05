// main_processor: Main Processor FPGA of the JEM.
//
// Receives the 44 jet elements of the module's own Input FPGAs and the 33
// duplicated elements of the two neighbouring modules, all as 5-bit words at
// 80 Mb/s, and assembles the 7 x 11 grid: eta column 0 comes from the
// lower-eta neighbour (its highest core column), columns 1-4 are the own
// elements and columns 5-6 come from the higher-eta neighbour (its two lowest
// core columns). The grid feeds the energy summation, whose results are coded
// to 8 bits, and the jet algorithm. The results are recorded per bunch
// crossing by a spy memory for VME readback.
// The split into 44 + 33 elements and the two algorithms follow the module's
// description; the grid layout matches its channel map. The pipeline depth
// makes the energy path, from link word at the Input FPGA to code at the
// output, eight bunch crossings long, the latency the module has.
// Timing: the grid is registered by the link receivers; codes,
// multiplicities and roi_hits appear four bunch crossings after that.
module main_processor
  import jem_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic bc,
  input  jem_cfg_t cfg,
  input  nib_t [PHI_ALL-1:0][ETA_CORE-1:0] nib_own,
  input  nib_t [PHI_ALL-1:0]               nib_lo,
  input  nib_t [PHI_ALL-1:0][1:0]          nib_hi,
  output logic [CODE_W-1:0] et_code,
  output logic [CODE_W-1:0] ex_code,
  output logic [CODE_W-1:0] ey_code,
  output mult_t [N_THR-1:0] jet_mult,
  output logic [N_ROI-1:0][N_THR-1:0] roi_hits,
  // spy memory
  input  logic spy_start,
  output logic spy_busy,
  input  logic [PB_AW-1:0] spy_raddr,
  output logic [47:0] spy_rdata
);
  je_t [PHI_ALL-1:0][ETA_ALL-1:0] grid;
  logic [ET_W-1:0] et;
  logic signed [EXY_W-1:0] ex, ey;
  logic [CODE_W-1:0] et_c, ex_c, ey_c;
  mult_t [N_THR-1:0] mult_c;
  logic [N_ROI-1:0][N_THR-1:0] hits_c;

  for (genvar p = 0; p < PHI_ALL; p++) begin : g_row
    for (genvar e = 0; e < ETA_CORE; e++) begin : g_own
      je_link_rx u_rx (.clk, .rst_n, .bc, .nib(nib_own[p][e]), .je(grid[p][e+1]));
    end
    je_link_rx u_rx_lo (.clk, .rst_n, .bc, .nib(nib_lo[p]), .je(grid[p][0]));
    for (genvar e = 0; e < 2; e++) begin : g_hi
      je_link_rx u_rx_hi (.clk, .rst_n, .bc, .nib(nib_hi[p][e]), .je(grid[p][ETA_CORE+1+e]));
    end
  end

  energy_sum u_esum (
    .clk, .rst_n, .bc, .grid, .quadrant(cfg.quadrant), .loopback(cfg.loopback),
    .et, .ex, .ey
  );
  energy_encoder u_enc (
    .clk, .rst_n, .bc, .et, .ex, .ey, .et_code(et_c), .ex_code(ex_c), .ey_code(ey_c)
  );
  jet_finder u_jet (
    .clk, .rst_n, .bc, .grid, .thr(cfg.thr), .win(cfg.win), .roi_hits(hits_c), .mult(mult_c)
  );

  assign et_code  = et_c;
  assign ex_code  = ex_c;
  assign ey_code  = ey_c;
  assign jet_mult = mult_c;

  // the candidate bits leave the jet finder one stage before the counts
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) roi_hits <= '0;
    else if (bc) roi_hits <= hits_c;
  end

  spy_mem #(.DEPTH(PB_DEPTH), .W(48)) u_spy (
    .clk, .rst_n, .start(spy_start), .cap_en(bc),
    .cap_data({jet_mult, ey_code, ex_code, et_code}),
    .busy(spy_busy), .count(), .rd_addr(spy_raddr), .rd_data(spy_rdata)
  );
endmodule
