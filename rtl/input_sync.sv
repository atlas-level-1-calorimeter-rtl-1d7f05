// input_sync: input synchronisation stage of one link channel.
//
// Cable and track delays differ from channel to channel, so each channel may
// be sampled at one of four clock phases. Here the four phases are four taps
// of a delay line running at the 80 MHz system clock (tap k = k ticks, half a
// bunch crossing each). While sync_mode is high the upstream sends the
// synchronisation pattern: SYNC_WORD in the first bunch crossing of every
// group of four, zero otherwise. At each bunch-crossing strobe the stage
// checks which taps hold SYNC_WORD while the local bunch counter is 0 and
// locks on the lowest such tap. Four phases and the automatic selection are
// the module's; the delay-line model, the pattern and the "lowest tap" rule
// are this design's choices.
// Timing: dout is registered on the bunch-crossing strobe (bc), one bunch
// crossing after the chosen tap. phase/locked hold until the next sync_mode.
module input_sync
  import jem_pkg::*;
#(
  parameter int    N_PHASE   = 4,
  parameter link_t SYNC_WORD = 9'h1A5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  bc,          // bunch-crossing strobe, every second clock
  input  logic  sync_mode,
  input  link_t din,
  output link_t dout,
  output logic [$clog2(N_PHASE)-1:0] phase,
  output logic  locked
);
  link_t       tap [N_PHASE];
  logic [1:0]  bcnt;
  logic        sync_d;

  always_ff @(posedge clk) begin
    tap[0] <= din;
    for (int k = 1; k < N_PHASE; k++) tap[k] <= tap[k-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcnt   <= '0;
      phase  <= '0;
      locked <= 1'b0;
      sync_d <= 1'b0;
      dout   <= '0;
    end else if (bc) begin
      bcnt   <= bcnt + 1'b1;
      sync_d <= sync_mode;
      dout   <= tap[phase];
      if (sync_mode && !sync_d) locked <= 1'b0;   // new synchronisation run
      if (sync_mode && (bcnt == 2'd0) && !(locked && sync_d)) begin
        for (int k = N_PHASE - 1; k >= 0; k--)
          if (tap[k] == SYNC_WORD) begin
            phase  <= k[$clog2(N_PHASE)-1:0];
            locked <= 1'b1;
          end
      end
    end
  end
endmodule
