// Self-checking test of async_fifo: random pushes on a 10 ns write clock,
// random pops on a 13 ns read clock, compared word by word with a queue
// model; then the FIFO is filled without reads and must report full after
// exactly DEPTH words and hold them all.
module tb_async_fifo;
  localparam int DEPTH = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_want = 0, rd_want = 0, wr_en, rd_en, full, empty;
  logic [35:0] wdata = '0, rdata;
  logic [$clog2(DEPTH):0] wl, rl;
  int checks = 0, failures = 0;
  logic [35:0] model[$];
  bit wr_force = 0, wr_stop = 0, rd_stop = 0;

  assign wr_en = wr_want && !full;
  assign rd_en = rd_want && !empty;

  always #5ns  wclk = ~wclk;
  always #6.5ns rclk = ~rclk;

  async_fifo #(.WIDTH(36), .DEPTH(DEPTH)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en(wr_en), .wr_data(wdata),
    .wr_full(full), .wr_level(wl),
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en(rd_en), .rd_data(rdata),
    .rd_empty(empty), .rd_level(rl));

  // writer
  always @(posedge wclk) if (wrst_n) begin
    if (wr_en && !full) model.push_back(wdata);
    wr_want <= wr_stop ? 1'b0 : wr_force ? 1'b1 : ($urandom_range(0, 2) != 0);
    wdata <= {$urandom, 4'($urandom)};
  end

  // reader
  always @(posedge rclk) if (rrst_n) begin
    if (rd_en && !empty) begin
      checks++;
      if (model.size() == 0 || rdata !== model[0]) begin
        failures++;
        $display("mismatch: got %h", rdata);
      end
      if (model.size() != 0) void'(model.pop_front());
    end
    rd_want <= rd_stop ? 1'b0 : ($urandom_range(0, 2) != 0);
  end

  initial begin
    #40ns wrst_n = 1; rrst_n = 1;
    #20us;
    // drain
    @(posedge wclk); wr_stop = 1;
    wait (model.size() == 0 && empty);
    #200ns;
    rd_stop = 1; wr_stop = 0; wr_force = 1;
    repeat (3 * DEPTH) @(posedge wclk);
    checks++;
    if (!full || model.size() != DEPTH) begin
      failures++;
      $display("full=%0d stored=%0d", full, model.size());
    end
    checks++;
    if (wl != DEPTH) failures++;
    wr_force = 0; wr_stop = 1; rd_stop = 0;
    #5us;
    wait (model.size() == 0);
    #200ns;
    checks++;
    if (!empty) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
