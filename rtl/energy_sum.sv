// energy_sum: transverse-energy sum and its x/y projections of one JEM.
//
// For each of the 8 phi rows of the core the jet elements of the row are
// added; the row sum is multiplied by the cosine and sine of the row's phi
// centre and the three results are summed over the rows. This gives the
// module's ET, Ex and Ey. In loopback mode the row sums are taken over the
// three duplicated eta columns (0, 5, 6) instead of the four core columns,
// which lets a backplane loopback test check the duplicated channels.
// The per-row projection and the loopback mode are the module's; the angle
// of row r, (8*quadrant + r + 0.5) * 2*pi/32, the 8-bit coefficient
// precision (jem_pkg::cos_q0) and the truncation after the sum are this
// design's choices. ex and ey are truncated towards minus infinity.
// Timing: three bunch-crossing stages (row sums, products, totals); all
// registers advance on the bc strobe.
module energy_sum
  import jem_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic bc,
  input  je_t [PHI_ALL-1:0][ETA_ALL-1:0] grid,
  input  logic [1:0] quadrant,
  input  logic loopback,
  output logic [ET_W-1:0] et,
  output logic signed [EXY_W-1:0] ex,
  output logic signed [EXY_W-1:0] ey
);
  localparam int ROW_W  = JE_W + 2;             // four elements
  localparam int PROD_W = ROW_W + 10;           // signed product
  localparam int SUM_W  = PROD_W + 3;

  logic [ROW_W-1:0] row [PHI_CORE];
  logic signed [PROD_W-1:0] px [PHI_CORE], py [PHI_CORE];
  logic [ET_W-1:0] et_s2;

  function automatic logic signed [9:0] coef_x(input logic [1:0] q, input int r);
    case (q)
      2'd0: return  $signed({1'b0, cos_q0(r)});
      2'd1: return -$signed({1'b0, cos_q0(PHI_CORE-1-r)});
      2'd2: return -$signed({1'b0, cos_q0(r)});
      default: return $signed({1'b0, cos_q0(PHI_CORE-1-r)});
    endcase
  endfunction
  function automatic logic signed [9:0] coef_y(input logic [1:0] q, input int r);
    case (q)
      2'd0: return  $signed({1'b0, cos_q0(PHI_CORE-1-r)});
      2'd1: return  $signed({1'b0, cos_q0(r)});
      2'd2: return -$signed({1'b0, cos_q0(PHI_CORE-1-r)});
      default: return -$signed({1'b0, cos_q0(r)});
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < PHI_CORE; r++) begin
        row[r] <= '0; px[r] <= '0; py[r] <= '0;
      end
      et_s2 <= '0; et <= '0; ex <= '0; ey <= '0;
    end else if (bc) begin
      // stage 1: row sums
      for (int r = 0; r < PHI_CORE; r++) begin
        if (loopback)
          row[r] <= ROW_W'(grid[r+1][0]) + ROW_W'(grid[r+1][5]) + ROW_W'(grid[r+1][6]);
        else
          row[r] <= ROW_W'(grid[r+1][1]) + ROW_W'(grid[r+1][2]) +
                    ROW_W'(grid[r+1][3]) + ROW_W'(grid[r+1][4]);
      end
      // stage 2: projections and ET
      begin
        logic [ET_W-1:0] s;
        s = '0;
        for (int r = 0; r < PHI_CORE; r++) begin
          px[r] <= $signed({1'b0, row[r]}) * coef_x(quadrant, r);
          py[r] <= $signed({1'b0, row[r]}) * coef_y(quadrant, r);
          s = s + ET_W'(row[r]);
        end
        et_s2 <= s;
      end
      // stage 3: totals
      begin
        logic signed [SUM_W-1:0] sx, sy;
        sx = '0; sy = '0;
        for (int r = 0; r < PHI_CORE; r++) begin
          sx = sx + SUM_W'(px[r]);
          sy = sy + SUM_W'(py[r]);
        end
        ex <= EXY_W'(sx >>> COEF_FRAC);
        ey <= EXY_W'(sy >>> COEF_FRAC);
        et <= et_s2;
      end
    end
  end
endmodule
