// tb_spy_mem: starts a spy cycle on a counting stream with gaps in cap_en,
// checks that exactly DEPTH words are stored in order, that capture then
// stops by itself, and that the words read back match.
module tb_spy_mem;
  localparam int D = 256;
  logic clk = 0, rst_n = 0, start = 0, cap_en = 0;
  logic [47:0] cap_data = 0, rd_data;
  logic busy;
  logic [8:0] count;
  logic [7:0] rd_addr = 0;
  int checks = 0, failures = 0;
  logic [47:0] sent [$];

  spy_mem #(.DEPTH(D), .W(48)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #23 rst_n = 1;
    @(posedge clk); #1;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    for (int n = 0; n < 700; n++) begin
      cap_en = (n % 3 != 1);
      cap_data = {16'hBEEF, 32'($urandom)};
      if (cap_en && busy) sent.push_back(cap_data);
      @(posedge clk); #1;
    end
    cap_en = 0;
    checks++;
    if (busy || count != 9'(D) || sent.size() != D) begin
      failures++; $display("busy=%0d count=%0d sent=%0d", busy, count, sent.size());
    end
    for (int a = 0; a < D; a++) begin
      rd_addr = 8'(a);
      @(posedge clk); #1;
      checks++;
      if (rd_data != sent[a]) begin failures++; $display("word %0d %h/%h", a, rd_data, sent[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
