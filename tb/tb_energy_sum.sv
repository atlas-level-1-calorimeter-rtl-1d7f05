// tb_energy_sum: checks ET, Ex, Ey of energy_sum against the reference model
// for random grids in all four quadrants, with and without loopback mode,
// and checks the three-bunch-crossing latency with a single impulse.
module tb_energy_sum;
  import jem_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, bc = 0;
  grid_t grid;
  logic [1:0] quadrant;
  logic loopback;
  logic [ET_W-1:0] et;
  logic signed [EXY_W-1:0] ex, ey;
  int checks = 0, failures = 0;

  energy_sum dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) bc <= rst_n ? ~bc : 1'b0;

  task automatic step();
    @(posedge clk iff bc); #1;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    grid = '0; quadrant = 0; loopback = 0;
    #23 rst_n = 1;
    repeat (4) step();
    // latency: one element of 100 at core row 1, column 2
    grid[1][2] = 10'd100;
    step();
    grid = '0;
    for (int k = 1; k <= 4; k++) begin
      step();
      checks++;
      if ((k + 1 == 3) != (et == 100)) begin
        failures++; $display("latency: after %0d BC et=%0d", k + 1, et);
      end
    end
    // random grids, hold each one for 4 BCs and check the settled result
    for (int n = 0; n < 160; n++) begin
      int eet, eex, eey;
      grid = rand_grid(n % 3 == 2 ? (n % 9 == 8 ? 2 : 1) : 0);
      quadrant = 2'(n % 4);
      loopback = (n % 5 == 4);
      repeat (4) step();
      energy(grid, quadrant, loopback, eet, eex, eey);
      checks++;
      if (int'(et) != eet || int'(ex) != eex || int'(ey) != eey) begin
        failures++;
        $display("q=%0d lb=%0d et %0d/%0d ex %0d/%0d ey %0d/%0d", quadrant, loopback,
                 et, eet, ex, eex, ey, eey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
