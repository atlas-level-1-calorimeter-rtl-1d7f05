// readout_controller: Readout Controller FPGA of the JEM.
//
// On each readout signal (Level-1 accept from the TTC system) the controller
// takes a snapshot of the event: the 44 jet elements of the Input FPGAs
// (delayed by JE_DELAY bunch crossings so they belong to the same bunch
// crossing as the results), the three energy codes, the eight jet
// multiplicities and the threshold bits of the 32 jet candidates. It then
// sends two packets, one 16-bit word per clock:
//   DAQ link:  header {4'hA, bcid}; 44 words {element index[5:0], je[9:0]};
//              3 words {6'b111000, idx[1:0], code} (0 ET, 1 Ex, 2 Ey);
//              8 words {5'b11010, t[2:0], 5'b0, mult[2:0]};
//              trailer {4'hF, 12'd57} (packet length in words)
//   RoI link:  header {4'hA, bcid}; one word {3'b010, roi[4:0], hits[7:0]}
//              per jet candidate with any threshold passed;
//              trailer {4'hF, number of words including header and trailer}
// A readout signal that arrives while a packet is still being sent is
// dropped and counted in lost. A spy memory records the DAQ stream for VME
// readback. The DAQ and RoI (Level-2) outputs and the readout spy memory are
// the module's; the packet formats, the snapshot without a Level-1 latency
// buffer and the drop rule are this design's choices.
// Timing: l1a is sampled on the bc strobe; the headers leave two clocks later.
module readout_controller
  import jem_pkg::*;
#(
  parameter int JE_DELAY = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bc,
  input  logic l1a,
  input  logic [11:0] bcid,
  input  je_t [N_OWN_JE-1:0] je,
  input  logic [CODE_W-1:0] et_code,
  input  logic [CODE_W-1:0] ex_code,
  input  logic [CODE_W-1:0] ey_code,
  input  mult_t [N_THR-1:0] jet_mult,
  input  logic [N_ROI-1:0][N_THR-1:0] roi_hits,
  output logic [15:0] daq_word,
  output logic        daq_valid,
  output logic [15:0] roi_word,
  output logic        roi_valid,
  output logic        busy,
  output logic [15:0] lost,
  // readout spy memory
  input  logic        spy_start,
  output logic        spy_busy,
  input  logic [PB_AW-1:0] spy_raddr,
  output logic [15:0] spy_rdata
);
  localparam int DAQ_LEN = 1 + N_OWN_JE + 3 + N_THR + 1;   // 57

  je_t [N_OWN_JE-1:0] je_pipe [JE_DELAY];
  je_t [N_OWN_JE-1:0] s_je;
  logic [CODE_W-1:0] s_code [3];
  mult_t [N_THR-1:0] s_mult;
  logic [N_ROI-1:0][N_THR-1:0] s_hits;
  logic [11:0] s_bcid;
  logic daq_busy, roi_busy;
  logic [6:0] daq_idx;
  logic [5:0] roi_idx;
  logic [11:0] roi_cnt;
  logic roi_hdr;

  assign busy = daq_busy || roi_busy;

  always_ff @(posedge clk) begin
    if (bc) begin
      je_pipe[0] <= je;
      for (int k = 1; k < JE_DELAY; k++) je_pipe[k] <= je_pipe[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      daq_busy <= 1'b0; roi_busy <= 1'b0; lost <= '0;
      daq_idx <= '0; roi_idx <= '0; roi_cnt <= '0; roi_hdr <= 1'b0;
      daq_word <= '0; daq_valid <= 1'b0; roi_word <= '0; roi_valid <= 1'b0;
      s_je <= '0; s_mult <= '0; s_hits <= '0; s_bcid <= '0;
      for (int k = 0; k < 3; k++) s_code[k] <= '0;
    end else begin
      daq_valid <= 1'b0;
      roi_valid <= 1'b0;
      if (bc && l1a) begin
        if (busy) lost <= lost + 1'b1;
        else begin
          s_je   <= je_pipe[JE_DELAY-1];
          s_code[0] <= et_code; s_code[1] <= ex_code; s_code[2] <= ey_code;
          s_mult <= jet_mult;
          s_hits <= roi_hits;
          s_bcid <= bcid;
          daq_busy <= 1'b1; daq_idx <= '0;
          roi_busy <= 1'b1; roi_idx <= '0; roi_hdr <= 1'b1; roi_cnt <= 12'd1;
        end
      end
      if (daq_busy) begin
        daq_valid <= 1'b1;
        daq_idx   <= daq_idx + 1'b1;
        if (daq_idx == 7'd0)
          daq_word <= {4'hA, s_bcid};
        else if (daq_idx <= 7'(N_OWN_JE))
          daq_word <= {6'(daq_idx - 7'd1), s_je[daq_idx - 7'd1]};
        else if (daq_idx <= 7'(N_OWN_JE + 3))
          daq_word <= {6'b111000, 2'(daq_idx - 7'(N_OWN_JE + 1)),
                       s_code[2'(daq_idx - 7'(N_OWN_JE + 1))]};
        else if (daq_idx <= 7'(N_OWN_JE + 3 + N_THR))
          daq_word <= {5'b11010, 3'(daq_idx - 7'(N_OWN_JE + 4)), 5'b0,
                       s_mult[3'(daq_idx - 7'(N_OWN_JE + 4))]};
        else begin
          daq_word <= {4'hF, 12'(DAQ_LEN)};
          daq_busy <= 1'b0;
        end
      end
      if (roi_busy) begin
        if (roi_hdr) begin
          roi_word <= {4'hA, s_bcid};
          roi_valid <= 1'b1;
          roi_hdr <= 1'b0;
        end else if (roi_idx == 6'(N_ROI)) begin
          roi_word <= {4'hF, roi_cnt + 12'd1};
          roi_valid <= 1'b1;
          roi_busy <= 1'b0;
        end else begin
          if (s_hits[roi_idx[4:0]] != '0) begin
            roi_word  <= {3'b010, roi_idx[4:0], s_hits[roi_idx[4:0]]};
            roi_valid <= 1'b1;
            roi_cnt   <= roi_cnt + 1'b1;
          end
          roi_idx <= roi_idx + 1'b1;
        end
      end
    end
  end

  spy_mem #(.DEPTH(PB_DEPTH), .W(16)) u_spy (
    .clk, .rst_n, .start(spy_start), .cap_en(daq_valid), .cap_data(daq_word),
    .busy(spy_busy), .count(), .rd_addr(spy_raddr), .rd_data(spy_rdata)
  );
endmodule
