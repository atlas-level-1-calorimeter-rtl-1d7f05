// tb_cmm_jet: feeds random multiplicities of 16 modules to cmm_jet and checks
// the saturating crate multiplicity per threshold.
module tb_cmm_jet;
  import jem_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst_n = 0, bc = 0;
  mult_t [N-1:0][N_THR-1:0] jet_mult;
  mult_t [N_THR-1:0] crate_mult;
  int checks = 0, failures = 0, n_sat = 0;

  cmm_jet #(.N_JEM(N)) dut (.*);

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
    jet_mult = '0;
    #23 rst_n = 1;
    step();
    for (int n = 0; n < 200; n++) begin
      int s[N_THR];
      for (int t = 0; t < N_THR; t++) s[t] = 0;
      for (int j = 0; j < N; j++)
        for (int t = 0; t < N_THR; t++) begin
          jet_mult[j][t] = ($urandom_range(0, 5) == 0) ? 3'($urandom_range(0, 7)) : 3'd0;
          s[t] += int'(jet_mult[j][t]);
        end
      step();
      for (int t = 0; t < N_THR; t++) begin
        int e;
        e = (s[t] > 7) ? 7 : s[t];
        if (s[t] > 7) n_sat++;
        checks++;
        if (int'(crate_mult[t]) != e) begin
          failures++; $display("n=%0d t=%0d got %0d expected %0d", n, t, crate_mult[t], e);
        end
      end
    end
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
