// Self-checking test of the SCA controller (144 cells, latency 70, 32
// pending). One sample per clock. The test keeps its own record of the
// cell written at every sample and of the cells awaiting readout, and
// checks that
//  - the timeslices read out for a trigger are the cells written 70, 69, ...
//    samples before it, the first one flagged;
//  - timeslices shared by two triggers are read out once (shared_ts),
//    and the second trigger's first timeslice is flagged too;
//  - the write pointer never writes a cell that awaits readout;
//  - L1As arriving faster than they are processed wait in a four-deep
//    queue, and one more is an overrun;
//  - with the readout stalled, the 9th four-timeslice trigger exhausts the
//    32-entry readout queue and raises fault.
module tb_sca_controller;
  import csc_rod_pkg::*;
  logic clk = 0, rst_n = 0;
  always #12.5ns clk = ~clk;

  logic sample_en = 1, l1a = 0, ro_ready = 0, ro_done = 0, ro_valid, fault;
  logic [3:0] n_ts = 4;
  logic [7:0] wr_cell, reserved_count;
  sca_ts_t ro_ts;
  logic [31:0] l1_accepted, shared_ts, l1_overrun;
  int checks = 0, failures = 0;

  sca_controller dut (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en), .l1a(l1a), .n_ts(n_ts),
    .wr_cell(wr_cell), .ro_valid(ro_valid), .ro_ts(ro_ts), .ro_ready(ro_ready),
    .ro_done(ro_done), .reserved_count(reserved_count), .fault(fault),
    .l1_accepted(l1_accepted), .shared_ts(shared_ts), .l1_overrun(l1_overrun));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // monitor: history of written cells, expected readout list
  logic [7:0] hist[$];
  bit         busy_cell[int];          // cells awaiting readout (queued or in progress)
  sca_ts_t    got[$];
  bit         auto_ro = 0;
  int         ro_timer = 0;
  bit         ro_active = 0;
  int         ro_cell_now;

  always @(posedge clk) if (rst_n) begin
    if (sample_en) begin
      checks++;
      if (busy_cell.exists(int'(wr_cell))) begin
        failures++;
        $display("FAIL: write into reserved cell %0d", wr_cell);
      end
      hist.push_back(wr_cell);
    end
    if (ro_valid && ro_ready) begin
      got.push_back(ro_ts);
      ro_active <= 1; ro_cell_now <= int'(ro_ts.cell_addr); ro_timer <= 0;
    end
    if (ro_active && !ro_done) ro_timer <= ro_timer + 1;
    if (ro_done) begin
      ro_active <= 0;
      busy_cell.delete(ro_cell_now);
    end
  end
  // readout engine: takes a timeslice, digitises it for 20 clocks
  always @(negedge clk) begin
    ro_ready <= auto_ro && !ro_active;
    ro_done  <= ro_active && ro_timer == 20;
  end

  // issue an L1A at the next rising edge; returns the expected timeslices
  task automatic trigger(int n, output logic [7:0] cells[$]);
    int base;
    @(negedge clk);
    n_ts = 4'(n);
    l1a  = 1;
    @(posedge clk);
    base = hist.size() - 70;   // this edge writes sample hist.size()
    cells = {};
    for (int i = 0; i < n; i++) begin
      cells.push_back(hist[base + i]);
    end
    #1ns l1a = 0;
  endtask

  logic [7:0] t1[$], t2[$], t3[$];
  int start;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (200) @(posedge clk);

    // 1. one trigger, four timeslices
    auto_ro = 1;
    trigger(4, t1);
    foreach (t1[i]) busy_cell[int'(t1[i])] = 1;
    wait (got.size() == 4);
    repeat (30) @(posedge clk);
    check(got.size() == 4, "4 timeslices read");
    foreach (t1[i]) check(got[i].cell_addr == t1[i] && got[i].first == (i == 0),
                          $sformatf("trigger 1 timeslice %0d", i));
    check(l1_accepted == 1, "l1_accepted");

    // 2. two triggers 5 samples apart with 8 timeslices each share 3
    got = {};
    trigger(8, t1);
    foreach (t1[i]) busy_cell[int'(t1[i])] = 1;
    repeat (4) @(posedge clk);
    trigger(8, t2);
    foreach (t2[i]) busy_cell[int'(t2[i])] = 1;
    wait (got.size() == 13);
    repeat (30) @(posedge clk);
    check(got.size() == 13, $sformatf("13 distinct timeslices, got %0d", got.size()));
    check(shared_ts == 3, $sformatf("shared_ts = %0d", shared_ts));
    for (int i = 0; i < 8; i++) check(got[i].cell_addr == t1[i], "trigger A order");
    for (int i = 3; i < 8; i++) check(got[5 + i].cell_addr == t2[i], "trigger B new timeslices");
    check(got[0].first, "first flag of trigger A");
    check(got[5].first && got[5].cell_addr == t2[0], "first flag of trigger B on shared timeslice");
    begin
      int nflag;
      nflag = 0;
      foreach (got[i]) nflag += int'(got[i].first);
      check(nflag == 2, "two first flags");
    end

    // 3. six L1As on consecutive clocks: one is being processed, four
    //    wait, the sixth finds the trigger queue full
    got = {};
    for (int k = 0; k < 6; k++) begin
      trigger(4, t1);
      if (k < 5) foreach (t1[i]) busy_cell[int'(t1[i])] = 1;
      if (k < 5) foreach (t1[i]) begin
        bit seen;
        seen = 0;
        foreach (t3[j]) if (t3[j] == t1[i]) seen = 1;
        if (!seen) t3.push_back(t1[i]);
      end
    end
    check(l1_overrun == 1, $sformatf("overrun counted (%0d)", l1_overrun));
    wait (got.size() == t3.size());
    check(t3.size() == 8, $sformatf("five overlapping triggers want 8 distinct timeslices (%0d)", t3.size()));
    foreach (t3[i]) check(got[i].cell_addr == t3[i], "queued trigger order");
    repeat (30) @(posedge clk);
    check(!fault, "no fault yet");

    // 4. readout stalled: the 9th trigger overflows the 32-entry queue
    auto_ro = 0;
    repeat (30) @(posedge clk);
    for (int k = 0; k < 9; k++) begin
      trigger(4, t1);
      foreach (t1[i]) busy_cell[int'(t1[i])] = 1;
      repeat (7) @(posedge clk);
      if (k == 7) check(!fault && reserved_count == 32, $sformatf("32 pending, no fault (%0d %0d)", reserved_count, fault));
    end
    check(fault, "fault after queue exhausted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog got=%0d", got.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
