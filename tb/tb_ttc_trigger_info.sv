// Self-checking test of the TTC trigger recorder: BCR, ECR and L1As at
// chosen bunch crossings; every record read back must carry the trigger
// type, the L1ID counted since ECR, the BCID counted since BCR (wrapping
// after 3564) and the arrival time, all worked out here from the clock
// count. A burst larger than the FIFO must be counted as lost.
module tb_ttc_trigger_info;
  import csc_rod_pkg::*;
  logic clk = 0, rst_n = 0;
  always #12.5ns clk = ~clk;
  logic bcr = 0, ecr = 0, l1a = 0, rd_en = 0, empty;
  logic [7:0] ttype = 0;
  trig_info_t info;
  logic [31:0] lost;
  int checks = 0, failures = 0;

  ttc_trigger_info #(.FIFO_DEPTH(16)) dut (
    .clk(clk), .rst_n(rst_n), .bcr(bcr), .ecr(ecr), .l1a(l1a), .trig_type(ttype),
    .rd_en(rd_en), .rd_info(info), .empty(empty), .lost(lost));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // independent reference counters
  int t = 0, bc = 0, ev = 0;
  trig_info_t expq[$];
  always @(posedge clk) if (rst_n) begin
    if (l1a && expq.size() < 16) expq.push_back('{trig_type: ttype, l1id: 24'(ev), bcid: 12'(bc), arrival: 32'(t)});
    t++;
    bc = (bcr || bc == 3563) ? 0 : bc + 1;
    if (ecr) ev = 0; else if (l1a) ev++;
  end

  task automatic pulse_l1(logic [7:0] ty);
    @(negedge clk); l1a = 1; ttype = ty;
    @(negedge clk); l1a = 0;
  endtask

  task automatic drain();
    @(negedge clk);
    while (!empty) begin
      check(expq.size() != 0 && info == expq[0], $sformatf("record l1id=%0d bcid=%0d", info.l1id, info.bcid));
      if (expq.size() != 0) void'(expq.pop_front());
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    @(negedge clk); bcr = 1; @(negedge clk); bcr = 0;
    repeat (10) pulse_l1(8'h5a);
    drain();
    check(expq.size() == 0, "all records read");
    // run past the end of an orbit
    repeat (3600) @(negedge clk);
    @(negedge clk); ecr = 1; @(negedge clk); ecr = 0;
    for (int i = 0; i < 5; i++) begin
      repeat (37 * i) @(negedge clk);
      pulse_l1(8'(i));
    end
    drain();
    // burst of 20 into a 16-deep FIFO
    repeat (20) begin
      @(negedge clk); l1a = 1; ttype = 8'hcc;
    end
    @(negedge clk); l1a = 0;
    check(lost == 4, $sformatf("lost = %0d", lost));
    drain();
    check(expq.size() == 0, "all records read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
