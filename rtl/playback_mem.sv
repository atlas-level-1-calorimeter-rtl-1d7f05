// playback_mem: test-pattern memory of one input channel.
//
// A DEPTH-word buffer that is loaded over VME and, during a playback cycle,
// supplies one word per bunch crossing in place of the link data. The depth
// of 256 words and the 9-bit width are those of the module's playback
// memories; the registered read is this design's choice.
// Timing: writes take effect on the clock edge with wr_en; rd_data shows the
// word at rd_addr one enabled edge (rd_en) later.
module playback_mem #(
  parameter int DEPTH = 256,
  parameter int W     = 9,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  // VME readback of the loaded pattern
  input  logic [AW-1:0] vme_addr,
  output logic [W-1:0]  vme_data
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
    vme_data <= mem[vme_addr];
  end
endmodule
