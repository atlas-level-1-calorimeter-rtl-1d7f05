// tb_playback_mem: loads random words, then reads them back through the
// playback port (one clock latency, only when rd_en) and the VME port.
module tb_playback_mem;
  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [7:0] wr_addr = 0, rd_addr = 0, vme_addr = 0;
  logic [8:0] wr_data = 0, rd_data, vme_data;
  logic [8:0] ref_mem [256];
  int checks = 0, failures = 0;

  playback_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    for (int a = 0; a < 256; a++) begin
      ref_mem[a] = 9'($urandom);
      wr_en = 1; wr_addr = 8'(a); wr_data = ref_mem[a];
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int a = 0; a < 256; a++) begin
      rd_en = 1; rd_addr = 8'(a); vme_addr = 8'(255 - a);
      @(posedge clk); #1;
      checks += 2;
      if (rd_data != ref_mem[a]) begin failures++; $display("pb %0d: %h/%h", a, rd_data, ref_mem[a]); end
      if (vme_data != ref_mem[255 - a]) begin failures++; $display("vme %0d", a); end
    end
    // rd_en low holds the output
    rd_en = 0; rd_addr = 8'd7;
    @(posedge clk); #1;
    checks++;
    if (rd_data != ref_mem[255]) begin failures++; $display("hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
