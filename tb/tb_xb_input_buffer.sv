// Self-checking test of the SPU XB input buffer (depth 32 here): 25-bit
// words arrive on a 60 MHz SCLK, the DSP side reads them on a 30 MHz clock
// and must get each word zero-extended in order. With the reader paused,
// the buffer fills, further words are dropped and counted, and the first
// word accepted after the loss carries bit 31.
module tb_xb_input_buffer;
  localparam int D = 32;
  logic sclk = 0, dclk = 0, rst_n = 0;
  always #8.33ns  sclk = ~sclk;
  always #16.67ns dclk = ~dclk;
  logic ic_valid = 0, rd_en, empty;
  logic [24:0] ic_data = '0;
  logic [31:0] rd_data, dropped;
  logic [$clog2(D):0] level;
  bit reader_on = 1;
  int checks = 0, failures = 0;

  xb_input_buffer #(.DEPTH(D)) dut (
    .sclk(sclk), .s_rst_n(rst_n), .ic_valid(ic_valid), .ic_data(ic_data),
    .dsp_clk(dclk), .d_rst_n(rst_n), .xb_rd_en(rd_en), .xb_rd_data(rd_data),
    .xb_empty(empty), .xb_level(level), .dropped(dropped));

  logic [31:0] expq[$];
  assign rd_en = rst_n && reader_on && !empty;
  always @(posedge dclk) if (rd_en) begin
    checks++;
    if (expq.size() == 0 || rd_data != expq[0]) begin
      failures++;
      $display("FAIL: got %h exp %h", rd_data, expq.size() ? expq[0] : 0);
    end
    if (expq.size()) void'(expq.pop_front());
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge sclk);
    rst_n = 1;
    repeat (5) @(negedge sclk);
    // every third SCLK a word: below the reader's rate
    for (int i = 0; i < 200; i++) begin
      @(negedge sclk); ic_valid = 1; ic_data = 25'($urandom);
      expq.push_back({7'b0, ic_data});
      @(negedge sclk); ic_valid = 0;
      @(negedge sclk);
    end
    wait (expq.size() == 0);
    check(dropped == 0, "nothing dropped");
    // reader paused: 40 words into 32 places
    reader_on = 0;
    repeat (4) @(negedge dclk);
    for (int i = 0; i < 40; i++) begin
      @(negedge sclk); ic_valid = 1; ic_data = 25'(1000 + i);
      if (i < D) expq.push_back({7'b0, ic_data});
    end
    @(negedge sclk); ic_valid = 0;
    check(dropped == 40 - D, $sformatf("dropped = %0d", dropped));
    reader_on = 1;
    wait (expq.size() == 0);
    repeat (6) @(negedge sclk);
    @(negedge sclk); ic_valid = 1; ic_data = 25'h1abcd;
    expq.push_back({1'b1, 6'b0, 25'h1abcd});
    @(negedge sclk); ic_valid = 0;
    wait (expq.size() == 0);
    repeat (4) @(negedge dclk);
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
