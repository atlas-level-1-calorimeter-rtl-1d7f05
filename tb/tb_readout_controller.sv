// tb_readout_controller: feeds changing jet elements and results, issues
// readout signals (some while a packet is still being sent) and checks the
// DAQ and RoI packets word by word, the bunch-crossing alignment of the jet
// elements (JE_DELAY), the dropped-signal counter and the readout spy memory.
module tb_readout_controller;
  import jem_pkg::*;

  logic clk = 0, rst_n = 0, bc = 0, l1a = 0;
  logic [11:0] bcid = 0;
  je_t [N_OWN_JE-1:0] je;
  logic [CODE_W-1:0] et_code, ex_code, ey_code;
  mult_t [N_THR-1:0] jet_mult;
  logic [N_ROI-1:0][N_THR-1:0] roi_hits;
  logic [15:0] daq_word, roi_word, lost, spy_rdata;
  logic daq_valid, roi_valid, busy, spy_start = 0, spy_busy;
  logic [PB_AW-1:0] spy_raddr = 0;
  int checks = 0, failures = 0;
  logic [15:0] daq_q [$], roi_q [$], daq_all [$];
  je_t [N_OWN_JE-1:0] je_hist [$];

  readout_controller #(.JE_DELAY(6)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) bc <= rst_n ? ~bc : 1'b0;
  always @(posedge clk iff rst_n) begin
    if (daq_valid) begin daq_q.push_back(daq_word); daq_all.push_back(daq_word); end
    if (roi_valid) roi_q.push_back(roi_word);
  end

  task automatic step();
    @(posedge clk iff bc); #1;
    bcid++;
    for (int i = 0; i < N_OWN_JE; i++) je[i] = je_t'($urandom);
    je_hist.push_front(je);
  endtask

  task automatic event_check(int nev);
    logic [15:0] exp_daq [$], exp_roi [$];
    logic [11:0] b;
    je_t [N_OWN_JE-1:0] jsnap;
    et_code = 8'($urandom); ex_code = 8'($urandom); ey_code = 8'($urandom);
    for (int t = 0; t < N_THR; t++) jet_mult[t] = 3'($urandom);
    for (int i = 0; i < N_ROI; i++) roi_hits[i] = ($urandom_range(0, 3) == 0) ? 8'($urandom) : 8'd0;
    l1a = 1;
    b = bcid;
    jsnap = je_hist[6];        // elements of six bunch crossings before the results
    @(posedge clk iff bc); #1;
    l1a = 0;
    exp_daq.push_back({4'hA, b});
    for (int i = 0; i < N_OWN_JE; i++) exp_daq.push_back({6'(i), jsnap[i]});
    exp_daq.push_back({8'hE0, et_code});
    exp_daq.push_back({8'hE1, ex_code});
    exp_daq.push_back({8'hE2, ey_code});
    for (int t = 0; t < N_THR; t++) exp_daq.push_back({5'b11010, 3'(t), 5'b0, jet_mult[t]});
    exp_daq.push_back({4'hF, 12'd57});
    exp_roi.push_back({4'hA, b});
    for (int i = 0; i < N_ROI; i++) if (roi_hits[i] != 0) exp_roi.push_back({3'b010, 5'(i), roi_hits[i]});
    exp_roi.push_back({4'hF, 12'(exp_roi.size() + 1)});
    // a second signal while the packet is sent is dropped
    repeat (3) @(posedge clk);
    #1;
    if (nev % 2 == 1) begin
      l1a = 1; @(posedge clk iff bc); #1; l1a = 0;
    end
    while (busy) @(posedge clk);
    repeat (3) @(posedge clk);
    #1;
    checks += 2;
    if (daq_q.size() != exp_daq.size()) begin failures++; $display("daq length %0d", daq_q.size()); end
    if (roi_q.size() != exp_roi.size()) begin failures++; $display("roi length %0d/%0d", roi_q.size(), exp_roi.size()); end
    for (int k = 0; k < exp_daq.size() && k < daq_q.size(); k++) begin
      checks++;
      if (daq_q[k] != exp_daq[k]) begin failures++; $display("ev %0d daq %0d %h/%h", nev, k, daq_q[k], exp_daq[k]); end
    end
    for (int k = 0; k < exp_roi.size() && k < roi_q.size(); k++) begin
      checks++;
      if (roi_q[k] != exp_roi[k]) begin failures++; $display("ev %0d roi %0d %h/%h", nev, k, roi_q[k], exp_roi[k]); end
    end
    daq_q.delete(); roi_q.delete();
  endtask

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    je = '0; et_code = 0; ex_code = 0; ey_code = 0; jet_mult = '0; roi_hits = '0;
    #23 rst_n = 1;
    fork
      forever step();
    join_none
    repeat (20) @(posedge clk);
    #1;
    spy_start = 1; @(posedge clk); #1; spy_start = 0;
    for (int n = 0; n < 10; n++) event_check(n);
    checks++;
    if (lost != 16'd5) begin failures++; $display("lost %0d", lost); end
    // spy memory holds the first 256 DAQ words
    checks++;
    if (spy_busy) begin failures++; $display("spy busy"); end
    for (int a = 0; a < 256; a++) begin
      spy_raddr = 8'(a);
      @(posedge clk); #1;
      checks++;
      if (spy_rdata != daq_all[a]) begin failures++; $display("spy %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
