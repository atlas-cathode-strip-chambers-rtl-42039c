// Self-checking test of the TM laser-safety supervisor (window shortened
// to 200 clocks, threshold 5 losses).
//  - transmitters stay off after reset until the interlock is present and
//    clear is given;
//  - fill frames are requested exactly while a link is unlocked;
//  - 5 losses in a window are tolerated, the 6th disables the transmitters;
//  - losses spread over windows are not accumulated across windows;
//  - a missing interlock disables at once.
module tb_laser_safety;
  localparam int N = 10, WIN = 200, MAXL = 5;
  logic clk = 0, rst_n = 0;
  always #12.5ns clk = ~clk;
  logic interlock = 0, clear = 0, txd;
  logic [N-1:0] lock = '1, fill;
  logic [15:0] lw;
  logic [31:0] total;
  int checks = 0, failures = 0;

  laser_safety #(.N_LINKS(N), .WINDOW_CYCLES(WIN), .MAX_LOSSES(MAXL)) dut (
    .clk(clk), .rst_n(rst_n), .interlock(interlock), .lock(lock), .clear(clear),
    .tx_disable(txd), .fill_req(fill), .losses_in_window(lw), .total_losses(total));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // fill frames follow ~lock one clock later
  logic [N-1:0] lock_d = '1;
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (fill != ~lock_d) begin failures++; $display("FAIL: fill_req"); end
    lock_d <= lock;
  end

  task automatic lose(int link);
    @(negedge clk); lock[link] = 0;
    repeat (3) @(negedge clk); lock[link] = 1;
  endtask

  task automatic do_clear();
    @(negedge clk); clear = 1; @(negedge clk); clear = 0; @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(txd, "off after reset");
    do_clear();
    check(txd, "clear without interlock does nothing");
    interlock = 1;
    do_clear();
    check(!txd, "enabled with interlock and clear");
    // align to a window start
    wait (dut.wtimer == 0);
    for (int i = 0; i < MAXL; i++) lose(i);
    repeat (2) @(negedge clk);
    check(!txd, "5 losses tolerated");
    lose(7);
    repeat (2) @(negedge clk);
    check(txd, "6th loss disables");
    check(total == 6, "total losses");
    repeat (WIN) @(negedge clk);
    do_clear();
    check(!txd, "re-enabled in a new window");
    // 4 losses in each of two windows: no disable
    wait (dut.wtimer == 0);
    for (int i = 0; i < 4; i++) lose(i);
    wait (dut.wtimer == 0);
    for (int i = 0; i < 4; i++) lose(i);
    repeat (2) @(negedge clk);
    check(!txd, "losses do not carry across windows");
    interlock = 0;
    repeat (2) @(negedge clk);
    check(txd, "interlock removal disables");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
