// tb_energy_encoder: checks the 8-bit codes of energy_encoder against an
// independently written coder, at range edges, saturation and random values.
module tb_energy_encoder;
  import jem_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, bc = 0;
  logic [ET_W-1:0] et;
  logic signed [EXY_W-1:0] ex, ey;
  logic [CODE_W-1:0] et_code, ex_code, ey_code;
  int checks = 0, failures = 0;

  energy_encoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) bc <= rst_n ? ~bc : 1'b0;

  task automatic step();
    @(posedge clk iff bc); #1;
  endtask

  task automatic check(int vt, int vx, int vy);
    et = ET_W'(vt); ex = EXY_W'(vx); ey = EXY_W'(vy);
    step(); #0;
    step();
    checks++;
    if (int'(et_code) != code_et(vt) || int'(ex_code) != code_exy(vx) ||
        int'(ey_code) != code_exy(vy)) begin
      failures++;
      $display("et %0d -> %h (%h)  ex %0d -> %h (%h)  ey %0d -> %h (%h)", vt, et_code,
               code_et(vt), vx, ex_code, code_exy(vx), vy, ey_code, code_exy(vy));
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    et = 0; ex = 0; ey = 0;
    #23 rst_n = 1;
    step();
    // the latency is one bunch crossing
    et = 15'd5; step();
    checks++;
    if (et_code != 8'd5) begin failures++; $display("latency"); end
    begin
      int edges[] = '{0, 1, 31, 32, 63, 64, 255, 256, 511, 512, 2047, 2048, 4095, 4096,
                      16000, 32255, 32256, 32704};
      foreach (edges[k]) check(edges[k], edges[k] > 32767 ? 32767 : edges[k],
                               -(edges[k] > 32767 ? 32767 : edges[k]));
    end
    for (int n = 0; n < 300; n++)
      check($urandom_range(0, 32704), $urandom_range(0, 65534) - 32767,
            $urandom_range(0, 65534) - 32767);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
