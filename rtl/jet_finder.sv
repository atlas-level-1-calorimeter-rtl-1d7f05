// jet_finder: sliding-window jet algorithm of one JEM.
//
// Works on the 7 x 11 grid of jet elements. Every 2x2 group of elements is
// summed. A 2x2 cluster whose lower corner lies in the 4 x 8 core is a jet
// candidate (an RoI) when it is a local maximum among its eight overlapping
// 2x2 neighbours. For each candidate three window energies are formed: the
// 2x2 cluster itself, the largest of the four 3x3 windows that contain it,
// and the 4x4 window centred on it. Each of the eight thresholds has its own
// ET value and window size; a candidate passes when its window energy is
// above the threshold. The number of candidates passing each threshold is
// counted and saturates at 7.
// The windows, the 2x2 local maxima and the eight programmable thresholds
// with window sizes follow the module's description. The tie rule (strictly
// greater than the neighbours above/right, greater or equal to those
// below/left), the choice of the 3x3 window, the strict comparison and the
// 3-bit multiplicity are this design's choices.
// Interface: roi_hits[i][t] is threshold t passed by candidate i, with
// i = 4*phi_core + eta_core. Timing: four bunch-crossing stages from grid to
// mult; roi_hits appears one stage earlier than mult.
module jet_finder
  import jem_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic bc,
  input  je_t [PHI_ALL-1:0][ETA_ALL-1:0] grid,
  input  thr_t [N_THR-1:0] thr,
  input  win_e [N_THR-1:0] win,
  output logic [N_ROI-1:0][N_THR-1:0] roi_hits,
  output mult_t [N_THR-1:0] mult
);
  localparam int S2_W = JE_W + 2;
  localparam int NE2 = ETA_ALL - 1;   // 6 cluster positions in eta
  localparam int NP2 = PHI_ALL - 1;   // 10 in phi

  logic [S2_W-1:0] s2 [NP2][NE2];
  je_t  [PHI_ALL-1:0][ETA_ALL-1:0] grid_d;
  logic [N_ROI-1:0] is_max;
  logic [WIN_W-1:0] w2 [N_ROI], w3 [N_ROI], w4 [N_ROI];

  function automatic logic [WIN_W-1:0] box(input je_t [PHI_ALL-1:0][ETA_ALL-1:0] g,
                                           input int p0, input int e0, input int n);
    logic [WIN_W-1:0] s;
    s = '0;
    for (int p = 0; p < 4; p++)
      for (int e = 0; e < 4; e++)
        if (p < n && e < n) s = s + WIN_W'(g[p0+p][e0+e]);
    return s;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NP2; p++)
        for (int e = 0; e < NE2; e++) s2[p][e] <= '0;
      grid_d <= '0;
      is_max <= '0;
      for (int i = 0; i < N_ROI; i++) begin
        w2[i] <= '0; w3[i] <= '0; w4[i] <= '0;
      end
      roi_hits <= '0;
      mult     <= '0;
    end else if (bc) begin
      // stage 1: 2x2 sums
      for (int p = 0; p < NP2; p++)
        for (int e = 0; e < NE2; e++)
          s2[p][e] <= S2_W'(grid[p][e]) + S2_W'(grid[p][e+1]) +
                      S2_W'(grid[p+1][e]) + S2_W'(grid[p+1][e+1]);
      grid_d <= grid;
      // stage 2: local maxima and window sums
      for (int pc = 0; pc < PHI_CORE; pc++)
        for (int ec = 0; ec < ETA_CORE; ec++) begin
          automatic int p = pc + 1;
          automatic int e = ec + 1;
          automatic int i = pc * ETA_CORE + ec;
          automatic logic m = 1'b1;
          automatic logic [WIN_W-1:0] b, best;
          for (int dp = -1; dp <= 1; dp++)
            for (int de = -1; de <= 1; de++)
              if (dp > 0 || (dp == 0 && de > 0)) begin
                if (!(s2[p][e] > s2[p+dp][e+de])) m = 1'b0;
              end else if (dp < 0 || de < 0) begin
                if (!(s2[p][e] >= s2[p+dp][e+de])) m = 1'b0;
              end
          is_max[i] <= m;
          w2[i] <= WIN_W'(s2[p][e]);
          w4[i] <= box(grid_d, p - 1, e - 1, 4);
          best = '0;
          for (int op = -1; op <= 0; op++)
            for (int oe = -1; oe <= 0; oe++) begin
              b = box(grid_d, p + op, e + oe, 3);
              if (b > best) best = b;
            end
          w3[i] <= best;
        end
      // stage 3: thresholds
      for (int i = 0; i < N_ROI; i++)
        for (int t = 0; t < N_THR; t++)
          case (win[t])
            WIN_2X2: roi_hits[i][t] <= is_max[i] && (w2[i] > thr[t]);
            WIN_3X3: roi_hits[i][t] <= is_max[i] && (w3[i] > thr[t]);
            default: roi_hits[i][t] <= is_max[i] && (w4[i] > thr[t]);
          endcase
      // stage 4: multiplicities
      for (int t = 0; t < N_THR; t++) begin
        automatic int n = 0;
        for (int i = 0; i < N_ROI; i++) n += int'(roi_hits[i][t]);
        mult[t] <= (n > 7) ? 3'd7 : 3'(n);
      end
    end
  end
endmodule
