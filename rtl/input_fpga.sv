// input_fpga: Input Processor FPGA of the JEM, one phi row.
//
// Serves 8 links: EM and HAD trigger data of the four eta columns of one phi
// row. Each link goes through the input synchronisation stage. During a
// playback cycle the words of the channel's playback memory replace the link
// data. EM and HAD of each column are then added into a 10-bit jet element
// (9 + 9 bits, so no overflow), and the four elements leave as 5-bit words
// at 80 Mb/s, to the Main Processor and, by fan-out, to the neighbouring
// modules. The channel count, EM+HAD summing, playback depth and 5-bit
// transfer follow the module's description; the mapping of one FPGA to one
// phi row and the playback addressing are this design's choices.
// Interface: link_in[k] k=0..3 EM of eta column k, k=4..7 HAD. pb_run and
// pb_addr come from the control block: pb_addr is read in the bunch crossing
// where pb_run is high, the word replaces the link data one bunch crossing
// later. je holds the current jet elements (readout); je_nib the link words.
// Timing: link word to je: 2 bunch crossings (sync register, sum register);
// je to je_nib: described in je_link_tx.
module input_fpga
  import jem_pkg::*;
#(
  parameter int PB_DEPTH_P = PB_DEPTH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bc,
  input  logic sync_mode,
  input  link_t [CH_PER_FPGA-1:0] link_in,
  // playback
  input  logic pb_run,
  input  logic [$clog2(PB_DEPTH_P)-1:0] pb_addr,
  input  logic pb_we,
  input  logic [2:0] pb_ch,
  input  logic [$clog2(PB_DEPTH_P)-1:0] pb_waddr,
  input  link_t pb_wdata,
  input  logic [$clog2(PB_DEPTH_P)-1:0] pb_raddr,
  output link_t [CH_PER_FPGA-1:0] pb_rdata,
  // results
  output je_t  [ETA_CORE-1:0] je,
  output nib_t [ETA_CORE-1:0] je_nib,
  output logic [CH_PER_FPGA-1:0] locked
);
  link_t [CH_PER_FPGA-1:0] sync_out, pb_out;
  logic pb_sel;

  for (genvar c = 0; c < CH_PER_FPGA; c++) begin : g_ch
    input_sync u_sync (
      .clk, .rst_n, .bc, .sync_mode,
      .din(link_in[c]), .dout(sync_out[c]), .phase(), .locked(locked[c])
    );
    playback_mem #(.DEPTH(PB_DEPTH_P), .W(LINK_W)) u_pb (
      .clk,
      .wr_en(pb_we && pb_ch == 3'(c)), .wr_addr(pb_waddr), .wr_data(pb_wdata),
      .rd_en(bc), .rd_addr(pb_addr), .rd_data(pb_out[c]),
      .vme_addr(pb_raddr), .vme_data(pb_rdata[c])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pb_sel <= 1'b0;
      je     <= '0;
    end else if (bc) begin
      pb_sel <= pb_run;
      for (int e = 0; e < ETA_CORE; e++)
        je[e] <= pb_sel ? JE_W'(pb_out[e]) + JE_W'(pb_out[e+ETA_CORE])
                        : JE_W'(sync_out[e]) + JE_W'(sync_out[e+ETA_CORE]);
    end
  end

  for (genvar e = 0; e < ETA_CORE; e++) begin : g_tx
    je_link_tx u_tx (.clk, .rst_n, .bc, .je(je[e]), .nib(je_nib[e]));
  end
endmodule
