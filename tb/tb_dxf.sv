// Self-checking test of one DX front FPGA (side A).
// 1. "run front sequence" SPU0..SPU4 -> RPU: the RPU port must see the
//    five sources' words in order, last only on the very last word, at one
//    word per clock.
// 2. An OP_WRITE for side B only (with 3 data words) must be skipped.
// 3. OP_WRITE of the BOF control word, "run front sequence" RPU -> back
//    end, OP_WRITE of the release command: the front FIFO must deliver
//    exactly these tagged words in order on the internal-bus clock.
module tb_dxf;
  import csc_rod_pkg::*;
  logic clk = 0, iclk = 0, rst_n = 0;
  always #12.5ns clk  = ~clk;    // DX_CLK 40 MHz
  always #10ns   iclk = ~iclk;   // DXINT_CLK 50 MHz

  logic instr_valid = 0, instr_ready;
  logic [31:0] instr_data = '0;
  logic [5:0] src_valid, src_last, src_ready, dst_valid, dst_ready;
  logic [5:0][31:0] src_data;
  logic [31:0] dst_data, words_moved;
  logic dst_last, out_rd_en, out_empty, busy;
  dx_word_t out_word;
  int checks = 0, failures = 0;

  // source models: queue of {last, data}
  logic [32:0] srcq [6][$];
  // pop half a cycle after the edge that took the word (no race with the design)
  logic [5:0] took = '0;
  always @(posedge clk) took <= src_valid & src_ready;
  initial begin src_valid = '0; src_data = '0; src_last = '0; end
  always @(negedge clk) for (int i = 0; i < 6; i++) begin
    if (took[i]) void'(srcq[i].pop_front());
    src_valid[i] <= srcq[i].size() != 0;
    src_data[i]  <= srcq[i].size() != 0 ? srcq[i][0][31:0] : '0;
    src_last[i]  <= srcq[i].size() != 0 ? srcq[i][0][32] : 1'b0;
  end

  assign dst_ready = 6'b100000;
  logic [32:0] rpu_got[$];
  int first_dst_cycle = -1, last_dst_cycle = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dst_valid[5] && dst_ready[5]) begin
      rpu_got.push_back({dst_last, dst_data});
      if (first_dst_cycle < 0) first_dst_cycle = cyc;
      last_dst_cycle = cyc;
    end
  end

  dxf #(.SIDE(1'b0), .FIFO_DEPTH(64)) dut (
    .clk(clk), .rst_n(rst_n),
    .instr_valid(instr_valid), .instr_data(instr_data), .instr_ready(instr_ready),
    .src_valid(src_valid), .src_data(src_data), .src_last(src_last), .src_ready(src_ready),
    .dst_valid(dst_valid), .dst_data(dst_data), .dst_last(dst_last), .dst_ready(dst_ready),
    .int_clk(iclk), .int_rst_n(rst_n),
    .out_rd_en(out_rd_en), .out_word(out_word), .out_empty(out_empty),
    .busy(busy), .words_moved(words_moved));

  dx_word_t outq[$];
  bit drain = 0;
  assign out_rd_en = drain && !out_empty;
  always @(posedge iclk) if (out_rd_en) outq.push_back(out_word);

  // drive on the falling edge; the word is taken on the next rising edge
  // at which instr_ready is high
  task automatic send(logic [31:0] w);
    @(negedge clk);
    instr_data  = w;
    instr_valid = 1'b1;
    while (!instr_ready) @(negedge clk);
    @(posedge clk);
    #1ns instr_valid = 1'b0;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [32:0] exp_rpu[$];
  int total;
  initial begin
    // SPU s supplies 3+s words, tagged with its index
    for (int s = 0; s < 5; s++)
      for (int k = 0; k < 3 + s; k++) begin
        logic [32:0] w;
        w = {(k == 2 + s), 8'(s), 24'(k)};
        srcq[s].push_back(w);
        exp_rpu.push_back({1'b0, 8'(s), 24'(k)});
      end
    exp_rpu[exp_rpu.size()-1][32] = 1'b1;
    total = exp_rpu.size();
    srcq[5].push_back({1'b0, 32'hAAAA_0001});
    srcq[5].push_back({1'b1, 32'hAAAA_0002});

    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    send(instr_seq(2'b11, 6'b011111, 1'b0, 3'd5));
    wait (!busy && srcq[4].size() == 0);
    repeat (2) @(posedge clk);
    check(rpu_got.size() == total, "RPU word count");
    for (int i = 0; i < total && i < rpu_got.size(); i++)
      check(rpu_got[i] == exp_rpu[i], $sformatf("RPU word %0d", i));
    // one word per DX_CLK: at most one idle cycle per source switch
    check(last_dst_cycle - first_dst_cycle + 1 <= total + 5, "front-end bus rate");
    check(words_moved == 32'(total), "words_moved");

    // side-B-only write with 3 data words: ignored by side A
    send(instr_write(2'b10, KIND_DATA, 1'b0, 1'b1, 12'd3));
    send(32'h1111_1111); send(32'h2222_2222); send(32'h3333_3333);
    // side A: BOF, RPU -> back end, release
    send(instr_write(2'b01, KIND_CTRL, 1'b0, 1'b1, 12'd1));
    send(BOF_CTRL_WORD);
    send(instr_seq(2'b01, 6'b100000, 1'b1, 3'b001));
    wait (!busy);
    send(instr_write(2'b11, KIND_CMD, 1'b0, 1'b1, 12'd1));
    send(CMD_RELEASE_BUS);
    repeat (10) @(posedge clk);
    drain = 1;
    repeat (20) @(posedge iclk);
    check(outq.size() == 4, $sformatf("front FIFO word count %0d", outq.size()));
    if (outq.size() == 4) begin
      check(outq[0].kind == KIND_CTRL && outq[0].data == BOF_CTRL_WORD && outq[0].to_back, "BOF word");
      check(outq[1].kind == KIND_DATA && outq[1].data == 32'hAAAA_0001, "RPU word 1");
      check(outq[2].kind == KIND_DATA && outq[2].data == 32'hAAAA_0002 && !outq[2].to_host, "RPU word 2");
      check(outq[3].kind == KIND_CMD && outq[3].data == CMD_RELEASE_BUS, "release word");
    end
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
