// tb_jet_finder: checks jet multiplicities and per-candidate threshold bits
// of jet_finder against the reference algorithm, for sparse clusters, dense
// random grids, flat grids (ties) and all three window sizes; checks the
// four-bunch-crossing latency of the multiplicities.
module tb_jet_finder;
  import jem_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, bc = 0;
  grid_t grid;
  thr_t [N_THR-1:0] thr;
  win_e [N_THR-1:0] win;
  logic [N_ROI-1:0][N_THR-1:0] roi_hits;
  mult_t [N_THR-1:0] mult;
  int checks = 0, failures = 0;
  int n_sat = 0, n_win[3] = '{0, 0, 0};

  jet_finder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) bc <= rst_n ? ~bc : 1'b0;

  task automatic step();
    @(posedge clk iff bc); #1;
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rthr[N_THR], rwin[N_THR], rmult[N_THR];
    logic [N_THR-1:0] rhits[N_ROI];
    grid = '0;
    for (int t = 0; t < N_THR; t++) begin
      thr[t] = thr_t'(20 + 40 * t); win[t] = win_e'(t % 3);
    end
    #23 rst_n = 1;
    repeat (6) step();
    // latency: one isolated cluster
    grid[3][2] = 10'd300;
    step();
    grid = '0;
    for (int k = 2; k <= 6; k++) begin
      step();
      checks++;
      if ((k == 4) != (mult[0] == 3'd1)) begin
        failures++; $display("latency: after %0d BC mult0=%0d", k, mult[0]);
      end
    end
    for (int n = 0; n < 240; n++) begin
      case (n % 4)
        0: grid = rand_grid(1);
        1: begin
          // eight separated clusters: the count saturates
          grid = '0;
          for (int a = 0; a < 4; a++)
            for (int b = 0; b < 2; b++) grid[1 + 2 * a][1 + 2 * b] = je_t'(900 - 40 * a - 10 * b);
        end
        2: grid = rand_grid(0);
        default: begin
          grid = '0;
          for (int p = 0; p < PHI_ALL; p++)
            for (int e = 0; e < ETA_ALL; e++) grid[p][e] = je_t'(($urandom_range(0, 3) == 0) ? 50 : 0);
        end
      endcase
      for (int t = 0; t < N_THR; t++) begin
        thr[t] = thr_t'($urandom_range(0, (n % 4 == 2) ? 12000 : (n % 4 == 1) ? 300 : 1500));
        win[t] = win_e'($urandom_range(0, 2));
        rthr[t] = int'(thr[t]); rwin[t] = int'(win[t]);
      end
      repeat (5) step();
      jets(grid, rthr, rwin, rmult, rhits);
      for (int t = 0; t < N_THR; t++) begin
        checks++;
        if (int'(mult[t]) != rmult[t]) begin
          failures++; $display("n=%0d t=%0d mult %0d expected %0d", n, t, mult[t], rmult[t]);
        end
        if (rmult[t] == 7) n_sat++;
        if (rmult[t] > 0) n_win[rwin[t]]++;
      end
      for (int i = 0; i < N_ROI; i++) begin
        checks++;
        if (roi_hits[i] != rhits[i]) begin
          failures++; $display("n=%0d roi %0d hits %b expected %b", n, i, roi_hits[i], rhits[i]);
        end
      end
    end
    $display("saturated=%0d jets by window 2x2=%0d 3x3=%0d 4x4=%0d", n_sat, n_win[0], n_win[1], n_win[2]);
    if (n_sat == 0 || n_win[0] == 0 || n_win[1] == 0 || n_win[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
