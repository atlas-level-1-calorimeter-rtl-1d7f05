// spy_mem: capture memory for VME readback.
//
// While a spy cycle runs, one word is stored per enabled clock edge at
// consecutive addresses from 0; capture stops by itself after DEPTH words,
// so a single start records exactly one memory full. The recorded words are
// then read back over VME. Spy memories sit in the Main Processor and in the
// readout controller; their depth is not given and is taken equal to the
// 256-word playback memories.
// Interface: start (one clock) clears the write address and arms capture;
// cap_en qualifies each word; busy is high while armed; count is the number
// of words recorded. rd_data follows rd_addr one clock later.
module spy_mem #(
  parameter int DEPTH = 256,
  parameter int W     = 48,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          cap_en,
  input  logic [W-1:0]  cap_data,
  output logic          busy,
  output logic [AW:0]   count,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      count <= '0;
    end else if (start) begin
      busy  <= 1'b1;
      count <= '0;
    end else if (busy && cap_en) begin
      count <= count + 1'b1;
      if (count == (AW+1)'(DEPTH - 1)) busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (busy && cap_en && !start) mem[count[AW-1:0]] <= cap_data;
    rd_data <= mem[rd_addr];
  end
endmodule
