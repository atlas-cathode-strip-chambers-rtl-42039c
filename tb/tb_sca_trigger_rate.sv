// Trigger-rate workload for the SCA controller at its default size (144
// cells, latency 70, 32 pending), clocked at the 40 MHz bunch-crossing rate
// with one sample per crossing. A readout engine digitises one timeslice in
// 80 clocks (about 2 us). Random L1As, four timeslices each, always with
// four crossings of dead time after an L1A, are generated in three phases:
//   1. the ATLAS rule, fewer than 8 L1As in any 80 us, at 87 kHz average
//      (the rule allows at most 7 per 80 us, 87.5 kHz);
//   2. system-test running: 106 kHz average, rule relaxed to fewer than 10
//      in 80 us;
//   3. a tight burst of 9 L1As, 5 crossings apart, which the relaxed rule
//      allows: 36 timeslices against 32 places, so fault must rise.
// In phases 1 and 2 every timeslice must be read out once, in order, with
// exactly the trigger's first timeslice flagged, and fault must stay low.
// The expected cells come from the test's own record of the cell written
// at each crossing. The rates and rules are the ones the system test and
// the ATLAS trigger rules state; the readout time is the stated ~2 us per
// timeslice.
module tb_sca_trigger_rate;
  import csc_rod_pkg::*;
  localparam int LAT = 70, NTS = 4, RO_CLKS = 80, WIN = 3200;  // 80 us
  logic clk = 0, rst_n = 0;
  always #12.5ns clk = ~clk;

  logic l1a = 0, ro_ready = 0, ro_done = 0, ro_valid, fault;
  logic [7:0] wr_cell, reserved_count;
  sca_ts_t ro_ts;
  logic [31:0] l1_accepted, shared_ts, l1_overrun;
  int checks = 0, failures = 0;

  sca_controller dut (
    .clk(clk), .rst_n(rst_n), .sample_en(1'b1), .l1a(l1a), .n_ts(4'(NTS)),
    .wr_cell(wr_cell), .ro_valid(ro_valid), .ro_ts(ro_ts), .ro_ready(ro_ready),
    .ro_done(ro_done), .reserved_count(reserved_count), .fault(fault),
    .l1_accepted(l1_accepted), .shared_ts(shared_ts), .l1_overrun(l1_overrun));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // record of written cells, expected and received timeslices
  logic [7:0] hist[1024];
  longint     nsamp = 0;
  sca_ts_t    expq[$];
  int         nread = 0, nbad = 0, max_pending = 0, ntrig = 0;
  bit         ro_active = 0;
  int         ro_timer = 0;

  always @(posedge clk) if (rst_n) begin
    if (l1a) begin
      ntrig++;
      for (int i = 0; i < NTS; i++)
        expq.push_back('{first: (i == 0), cell_addr: hist[10'(nsamp - longint'(LAT) + longint'(i))]});
    end
    hist[10'(nsamp)] = wr_cell;
    nsamp++;
    if (int'(reserved_count) > max_pending) max_pending = int'(reserved_count);
    if (ro_valid && ro_ready) begin
      nread++;
      if (expq.size() == 0 || ro_ts != expq[0]) begin
        nbad++;
        if (nbad < 10) $display("FAIL: timeslice %0d got %0d/%0d", nread, ro_ts.cell_addr, ro_ts.first);
      end
      if (expq.size() != 0) void'(expq.pop_front());
      ro_active <= 1; ro_timer <= 0;
    end else if (ro_active) begin
      ro_timer <= ro_timer + 1;
      if (ro_done) ro_active <= 0;
    end
  end
  always @(negedge clk) begin
    ro_ready <= !ro_active && !ro_done;
    ro_done  <= ro_active && ro_timer == RO_CLKS - 2;
  end

  // trigger generator: random, held to a target average rate, always with
  // the dead time and the sliding-window rule
  longint trig_times[$];
  int     max_in_win = 8;       // fewer than this many L1As in WIN crossings
  real    target_khz = 0.0;     // 0: no random triggers
  longint cyc = 0, phase_start = 0;
  int     phase_trigs = 0, burst = 0;
  bit     allowed, behind;
  always @(negedge clk) begin
    cyc++;
    while (trig_times.size() != 0 && cyc - trig_times[0] >= longint'(WIN))
      void'(trig_times.pop_front());
    allowed = (trig_times.size() == 0 || cyc - trig_times[$] > 4) &&
              trig_times.size() < max_in_win - 1;
    behind  = real'(phase_trigs) < target_khz * 1.0e3 * real'(cyc - phase_start) * 25.0e-9;
    l1a <= 1'b0;
    if (allowed && ((target_khz > 0.0 && $urandom_range(0, 99) < (behind ? 20 : 0)) || burst > 0)) begin
      l1a <= 1'b1;
      trig_times.push_back(cyc);
      phase_trigs++;
      if (burst > 0) burst--;
    end
  end

  task automatic run_phase(string name, real khz_target, int rule, int ncyc);
    int t0, r0, b0;
    real khz;
    t0 = ntrig; r0 = nread; b0 = nbad;
    max_in_win = rule; phase_start = cyc; phase_trigs = 0; target_khz = khz_target;
    repeat (ncyc) @(posedge clk);
    target_khz = 0.0;
    khz = real'(ntrig - t0) / (real'(ncyc) * 25.0e-9) / 1000.0;
    wait (expq.size() == 0 && !ro_active);
    repeat (RO_CLKS + 10) @(posedge clk);
    $display("%s: %0d L1As, %.1f kHz, %0d timeslices read, most pending %0d",
             name, ntrig - t0, khz, nread - r0, max_pending);
    check(nread - r0 == NTS * (ntrig - t0), $sformatf("%s: every timeslice read once", name));
    check(nbad == b0, $sformatf("%s: cells and first flags in order", name));
    check(!fault && l1_overrun == 0, $sformatf("%s: no fault, no overrun", name));
    check(max_pending <= 32, $sformatf("%s: at most 32 pending", name));
    check(khz >= 0.99 * khz_target, $sformatf("%s: rate reached", name));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (300) @(posedge clk);
    run_phase("ATLAS rule 8/80 at 87 kHz", 87.0, 8, 200_000);
    run_phase("system test 106 kHz, 10/80", 106.0, 10, 400_000);
    check(shared_ts == 0, "no shared timeslices with 4 BC dead time");

    // burst: 9 L1As 5 crossings apart, after an empty 80 us window
    repeat (WIN) @(posedge clk);
    @(negedge clk); burst = 9;
    wait (burst == 0);
    repeat (50) @(posedge clk);
    $display("burst of 9: most pending %0d, fault %0d", max_pending, fault);
    check(fault, "burst of 9 four-timeslice triggers exhausts the 32 places");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
