// jem_control: VME registers and playback/spy sequencing of the JEM.
//
// Holds the module configuration (thresholds and window sizes of the jet
// algorithm, phi quadrant, loopback mode of the energy sums) and runs the
// playback/spy cycle. A cycle is started by a VME command or by a TTC
// broadcast. With playback enabled, pb_run is high for PB_DEPTH bunch
// crossings while pb_addr steps from 0, so every Input FPGA plays its
// memories once. With spy enabled, the Main Processor spy memory is started
// SPY_DELAY bunch crossings after the first playback word, so spy word k holds
// the results of playback word k; without playback the spy starts at once,
// recording whatever the links deliver.
// Starting from VME or TTC follows the module's description; the register
// map is this design's own:
//   0x0000 ctrl  bit0 playback enable, bit1 spy enable, bit2 loopback,
//                bits5:4 quadrant                               (read/write)
//   0x0001 cmd   bit0 start playback/spy cycle, bit1 start readout spy (write)
//   0x0002 status bit0 playback running, bit1 spy running, bit2 readout spy
//                running, bit3 all input channels locked         (read)
//   0x0010+t threshold t (14 bits), 0x0018+t window size t (0/1/2)
// Timing: writes take effect on the clock of vme_we; reg_rdata is registered
// (one clock after vme_re). Start requests wait for the next bc strobe.
module jem_control
  import jem_pkg::*;
#(
  parameter int SPY_DELAY = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bc,
  input  logic [15:0] vme_addr,
  input  logic [15:0] vme_wdata,
  input  logic        vme_we,
  input  logic        vme_re,
  output logic [15:0] reg_rdata,
  input  logic        ttc_start,
  input  logic        spy_busy,
  input  logic        ro_spy_busy,
  input  logic        all_locked,
  output jem_cfg_t    cfg,
  output logic        pb_run,
  output logic [PB_AW-1:0] pb_addr,
  output logic        spy_start,
  output logic        ro_spy_start
);
  logic pb_en, spy_en;
  logic start_req;
  logic [PB_AW:0] pb_cnt;
  logic [$clog2(SPY_DELAY+1):0] dly;
  logic dly_run;

  wire sel_cmd = vme_we && vme_addr == 16'h0001;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pb_en <= 1'b0; spy_en <= 1'b0;
      cfg <= '0;
      for (int t = 0; t < N_THR; t++) cfg.thr[t] <= '1;
      reg_rdata <= '0;
      start_req <= 1'b0;
      ro_spy_start <= 1'b0;
    end else begin
      ro_spy_start <= sel_cmd && vme_wdata[1];
      if (vme_we) begin
        if (vme_addr == 16'h0000) begin
          pb_en        <= vme_wdata[0];
          spy_en       <= vme_wdata[1];
          cfg.loopback <= vme_wdata[2];
          cfg.quadrant <= vme_wdata[5:4];
        end
        for (int t = 0; t < N_THR; t++) begin
          if (vme_addr == 16'h0010 + 16'(t)) cfg.thr[t] <= vme_wdata[THR_W-1:0];
          if (vme_addr == 16'h0018 + 16'(t)) cfg.win[t] <= win_e'(vme_wdata[1:0]);
        end
      end
      if ((sel_cmd && vme_wdata[0]) || ttc_start) start_req <= 1'b1;
      else if (bc) start_req <= 1'b0;
      if (vme_re) begin
        reg_rdata <= '0;
        case (vme_addr)
          16'h0000: reg_rdata <= {10'd0, cfg.quadrant, 1'b0, cfg.loopback, spy_en, pb_en};
          16'h0002: reg_rdata <= {12'd0, all_locked, ro_spy_busy, spy_busy, pb_run};
          default: begin
            for (int t = 0; t < N_THR; t++) begin
              if (vme_addr == 16'h0010 + 16'(t)) reg_rdata <= 16'(cfg.thr[t]);
              if (vme_addr == 16'h0018 + 16'(t)) reg_rdata <= 16'(cfg.win[t]);
            end
          end
        endcase
      end
    end
  end

  // playback sequencing, one step per bunch crossing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pb_cnt <= '0; pb_run <= 1'b0; pb_addr <= '0;
      dly <= '0; dly_run <= 1'b0; spy_start <= 1'b0;
    end else begin
      spy_start <= 1'b0;
      if (bc) begin
        if (start_req && !pb_run && !dly_run) begin
          if (pb_en) begin
            pb_run <= 1'b1; pb_addr <= '0; pb_cnt <= '0;
          end
          if (spy_en) begin
            if (pb_en) begin dly_run <= 1'b1; dly <= '0; end
            else spy_start <= 1'b1;
          end
        end else if (pb_run) begin
          pb_addr <= pb_addr + 1'b1;
          pb_cnt  <= pb_cnt + 1'b1;
          if (pb_cnt == (PB_AW+1)'(PB_DEPTH - 1)) pb_run <= 1'b0;
        end
        if (dly_run) begin
          dly <= dly + 1'b1;
          if (dly == ($bits(dly))'(SPY_DELAY - 1)) begin
            dly_run <= 1'b0;
            spy_start <= 1'b1;
          end
        end
      end
    end
  end
endmodule
