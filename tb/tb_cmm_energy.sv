// tb_cmm_energy: feeds random 8-bit codes of 16 modules to cmm_energy and
// compares the crate sums with sums of the independently decoded values.
module tb_cmm_energy;
  import jem_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst_n = 0, bc = 0;
  logic [N-1:0][CODE_W-1:0] et_code, ex_code, ey_code;
  logic [CRATE_W-1:0] crate_et;
  logic signed [CRATE_W-1:0] crate_ex, crate_ey;
  int checks = 0, failures = 0;

  cmm_energy #(.N_JEM(N)) dut (.*);

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
    et_code = '0; ex_code = '0; ey_code = '0;
    #23 rst_n = 1;
    step();
    for (int n = 0; n < 200; n++) begin
      int st, sx, sy;
      st = 0; sx = 0; sy = 0;
      for (int j = 0; j < N; j++) begin
        et_code[j] = (n == 0) ? 8'hFF : 8'($urandom);
        ex_code[j] = (n == 1) ? 8'hFF : 8'($urandom);
        ey_code[j] = (n == 1) ? 8'h7F : 8'($urandom);
        st += decode_et(et_code[j]);
        sx += decode_exy(ex_code[j]);
        sy += decode_exy(ey_code[j]);
      end
      step();
      checks++;
      if (int'(crate_et) != st || int'(crate_ex) != sx || int'(crate_ey) != sy) begin
        failures++;
        $display("n=%0d et %0d/%0d ex %0d/%0d ey %0d/%0d", n, crate_et, st, crate_ex, sx, crate_ey, sy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
