// Self-checking test of the supply sequencer with a model of the three
// supplies (each reports good 10 clocks after its enable).
//  - no enable without both backplane voltages, or without the RCC enable;
//  - PENA, then PENB, then PENC, each only after the previous good signal;
//  - the surge switches are on for exactly SURGE_CYCLES after PENB;
//  - a supply that loses its good signal switches everything off (fault);
//  - a supply that never reports good times out (fault);
//  - withdrawing the RCC enable clears the fault.
module tb_power_sequencer;
  localparam int TO = 50, SURGE = 20;
  logic clk = 0, rst_n = 0;
  always #12.5ns clk = ~clk;
  logic rcc = 0, bp5 = 0, bp33 = 0, vaok, vbok, vcok;
  logic pena, penb, penb_surge, penc, pgood, fault;
  bit kill_b = 0, dead_c = 0;
  int checks = 0, failures = 0;

  power_sequencer #(.TIMEOUT_CYCLES(TO), .SURGE_CYCLES(SURGE)) dut (
    .clk(clk), .rst_n(rst_n), .rcc_power_en(rcc), .bp5_ok(bp5), .bp33_ok(bp33),
    .vaok(vaok), .vbok(vbok), .vcok(vcok),
    .pena(pena), .penb(penb), .penb_surge(penb_surge), .penc(penc),
    .power_good(pgood), .fault(fault));

  // supply model
  int ca = 0, cb = 0, cc = 0;
  always @(posedge clk) begin
    ca <= pena ? ca + 1 : 0;
    cb <= penb ? cb + 1 : 0;
    cc <= penc ? cc + 1 : 0;
  end
  assign vaok = ca >= 10;
  assign vbok = (cb >= 10) && !kill_b;
  assign vcok = (cc >= 10) && !dead_c;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ordering monitor
  int surge_len = 0, surge_runs = 0;
  always @(posedge clk) if (rst_n) begin
    checks++;
    if ((penb && !pena) || (penc && !penb) || (penb_surge && !penb) ||
        ((pena || penb || penc) && !(bp5 && bp33 && rcc) && !$past(bp5 && bp33 && rcc))) begin
      failures++;
      $display("FAIL: enable out of order at %0t", $time);
    end
    if (penb_surge) surge_len++;
    else if (surge_len != 0) begin surge_runs++; check(surge_len == SURGE, $sformatf("surge length %0d", surge_len)); surge_len = 0; end
  end

  int t_a, t_b, t_c;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    rcc = 1; bp5 = 1; bp33 = 0;
    repeat (30) @(negedge clk);
    check(!pena && !penb && !penc, "nothing without backplane 3.3 V");
    bp33 = 1;
    fork
      begin wait (pena); t_a = $time; end
      begin wait (penb); t_b = $time; end
      begin wait (penc); t_c = $time; end
    join
    check(vaok, "VAOK before PENB");
    check(t_a < t_b && t_b < t_c, "order A, B, C");
    wait (pgood);
    check(vbok && vcok, "power good after all supplies good");
    repeat (40) @(negedge clk);
    check(surge_runs == 1, "surge switches used once");
    // VB fails
    kill_b = 1;
    repeat (3) @(negedge clk);
    check(fault && !pena && !penb && !penc, "fault switches all off");
    kill_b = 0;
    repeat (20) @(negedge clk);
    check(fault && !pena, "fault holds");
    rcc = 0;
    repeat (3) @(negedge clk);
    check(!fault, "fault cleared by RCC");
    // DSP_VCC never comes: timeout
    dead_c = 1; rcc = 1;
    wait (penc);
    repeat (TO + 5) @(negedge clk);
    check(fault && !penc, "timeout fault");
    rcc = 0; dead_c = 0;
    repeat (3) @(negedge clk);
    // RCC withdraws power while on: clean off, no fault
    rcc = 1;
    wait (pgood);
    rcc = 0;
    repeat (3) @(negedge clk);
    check(!pena && !fault, "switched off by RCC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
