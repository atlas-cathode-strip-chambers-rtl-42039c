// End-to-end test of the Data Exchange with the per-L1 instruction stream
// of the CSC ROD (23 instruction words):
//   A+B  run front sequence SPU0..SPU4 -> RPU
//   A    control word 0xB0F00000, leader (8 words, also copied to the Host FIFO)
//   A+B  run front sequence RPU -> back end
//   A    release DX internal bus
//   B    trailer (3 words), control word 0xE0F00000, release DX internal bus
// Typical sizes: four precision SPUs send 15 words and the transverse SPU
// 45 (105 words into each RPU); each RPU then sends 75 words. The S-LINK
// must receive the 163-word fragment in order, the Host FIFO the leader.
// Each SPU->RPU transfer must run at one word per DX_CLK cycle.
module tb_data_exchange;
  import csc_rod_pkg::*;
  logic dx_clk = 0, int_clk = 0, dclk = 0, hpu_clk = 0, rst_n = 0;
  always #12.5ns dx_clk  = ~dx_clk;    // 40 MHz
  always #10ns   int_clk = ~int_clk;   // 50 MHz
  always #12.5ns dclk    = ~dclk;      // 40 MHz
  always #16.7ns hpu_clk = ~hpu_clk;   // 30 MHz

  logic instr_valid = 0, instr_ready;
  logic [31:0] instr_data = '0;
  logic [1:0][5:0] src_valid, src_last, src_ready, dst_valid, dst_ready;
  logic [1:0][5:0][31:0] src_data;
  logic [1:0][31:0] dst_data;
  logic [1:0] dst_last, front_busy;
  logic slink_valid, slink_ctrl, slink_ready = 1, host_rd_en, host_empty, owner_b;
  logic [31:0] slink_data, handovers, frags;
  logic [33:0] host_rd_data;
  logic [1:0][31:0] front_words;
  int checks = 0, failures = 0;

  logic [32:0] srcq [2][6][$];
  logic [32:0] rpu_in [2][$];
  logic [1:0][5:0] took = '0;
  int rpu_first[2] = '{-1, -1}, rpu_last[2] = '{-1, -1}, cyc = 0;

  assign dst_ready = {6'b100000, 6'b100000};

  always @(posedge dx_clk) begin
    cyc++;
    took <= rst_n ? src_valid & src_ready : '0;
    for (int h = 0; h < 2; h++)
      if (rst_n && dst_valid[h][5]) begin
        rpu_in[h].push_back({dst_last[h], dst_data[h]});
        if (rpu_first[h] < 0) rpu_first[h] = cyc;
        rpu_last[h] = cyc;
        // the RPU "processes" the event once it has all of it
        if (dst_last[h])
          for (int k = 0; k < 75; k++)
            srcq[h][5].push_back({k == 74, 4'(h + 10), 28'(k)});
      end
  end
  // the source models change their outputs only on the falling edge
  initial begin src_valid = '0; src_data = '0; src_last = '0; end
  always @(negedge dx_clk)
    for (int h = 0; h < 2; h++) for (int i = 0; i < 6; i++) begin
      if (took[h][i]) void'(srcq[h][i].pop_front());
      src_valid[h][i] <= srcq[h][i].size() != 0;
      src_data[h][i]  <= srcq[h][i].size() != 0 ? srcq[h][i][0][31:0] : '0;
      src_last[h][i]  <= srcq[h][i].size() != 0 ? srcq[h][i][0][32] : 1'b0;
    end

  data_exchange dut (
    .dx_clk(dx_clk), .dx_rst_n(rst_n), .int_clk(int_clk), .int_rst_n(rst_n),
    .dclk(dclk), .d_rst_n(rst_n), .hpu_clk(hpu_clk), .hpu_rst_n(rst_n),
    .instr_valid(instr_valid), .instr_data(instr_data), .instr_ready(instr_ready),
    .src_valid(src_valid), .src_data(src_data), .src_last(src_last), .src_ready(src_ready),
    .dst_valid(dst_valid), .dst_data(dst_data), .dst_last(dst_last), .dst_ready(dst_ready),
    .slink_valid(slink_valid), .slink_ctrl(slink_ctrl), .slink_data(slink_data),
    .slink_ready(slink_ready),
    .host_rd_en(host_rd_en), .host_rd_data(host_rd_data), .host_empty(host_empty),
    .front_busy(front_busy), .front_words(front_words),
    .owner_b(owner_b), .handovers(handovers), .fragments_sent(frags));

  logic [32:0] got[$];
  logic [33:0] host_got[$];
  always @(posedge dclk) if (rst_n && slink_valid && slink_ready) got.push_back({slink_ctrl, slink_data});
  assign host_rd_en = rst_n && !host_empty;
  always @(posedge hpu_clk) if (host_rd_en) host_got.push_back(host_rd_data);

  int n_instr = 0;
  // drive on the falling edge; the word is taken on the next rising edge
  // at which instr_ready is high
  task automatic send(logic [31:0] w);
    @(negedge dx_clk);
    instr_data  = w;
    instr_valid = 1'b1;
    while (!instr_ready) @(negedge dx_clk);
    @(posedge dx_clk);
    #1ns instr_valid = 1'b0;
    n_instr++;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [32:0] exp[$];
  initial begin
    repeat (4) @(posedge dx_clk);
    rst_n <= 1;
    repeat (4) @(posedge dx_clk);
    for (int h = 0; h < 2; h++)
      for (int s = 0; s < 5; s++) begin
        int n;
        n = (s == 4) ? 45 : 15;
        for (int k = 0; k < n; k++) srcq[h][s].push_back({k == n - 1, 4'(h), 4'(s), 24'(k)});
      end

    exp.push_back({1'b1, BOF_CTRL_WORD});
    for (int i = 0; i < 8; i++) exp.push_back({1'b0, 32'h1EAD_0000 + 32'(i)});
    for (int h = 0; h < 2; h++)
      for (int k = 0; k < 75; k++) exp.push_back({1'b0, 4'(h + 10), 28'(k)});
    for (int i = 0; i < 3; i++) exp.push_back({1'b0, 32'h7A11_0000 + 32'(i)});
    exp.push_back({1'b1, EOF_CTRL_WORD});

    send(instr_seq(2'b11, 6'b011111, 1'b0, 3'd5));
    send(instr_write(2'b01, KIND_CTRL, 1'b0, 1'b1, 12'd1));
    send(BOF_CTRL_WORD);
    send(instr_write(2'b01, KIND_DATA, 1'b1, 1'b1, 12'd8));
    for (int i = 0; i < 8; i++) send(32'h1EAD_0000 + 32'(i));
    send(instr_seq(2'b11, 6'b100000, 1'b1, 3'b001));
    send(instr_write(2'b01, KIND_CMD, 1'b0, 1'b1, 12'd1));
    send(CMD_RELEASE_BUS);
    send(instr_write(2'b10, KIND_DATA, 1'b0, 1'b1, 12'd3));
    for (int i = 0; i < 3; i++) send(32'h7A11_0000 + 32'(i));
    send(instr_write(2'b10, KIND_CTRL, 1'b0, 1'b1, 12'd1));
    send(EOF_CTRL_WORD);
    send(instr_write(2'b10, KIND_CMD, 1'b0, 1'b1, 12'd1));
    send(CMD_RELEASE_BUS);

    wait (got.size() >= exp.size());
    repeat (20) @(posedge dclk);
    check(n_instr == 23, $sformatf("instruction words per L1 = %0d", n_instr));
    for (int h = 0; h < 2; h++) begin
      check(rpu_in[h].size() == 105, $sformatf("RPU %0d received %0d words", h, rpu_in[h].size()));
      check(rpu_last[h] - rpu_first[h] + 1 <= 105 + 5, "SPU->RPU at one word per DX_CLK");
      check(front_words[h] == 105 + 75, "front-end bus word count");
    end
    check(got.size() == 163, $sformatf("fragment length %0d", got.size()));
    foreach (exp[i]) check(got[i] == exp[i], $sformatf("fragment word %0d", i));
    check(handovers == 2 && !owner_b, "bus handed to B and back");
    check(frags == 1, "one fragment");
    check(host_got.size() == 8, "leader captured in Host FIFO");
    foreach (host_got[i]) check(host_got[i] == {KIND_DATA, 32'h1EAD_0000 + 32'(i)}, "Host FIFO word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500us;
    failures++;
    $display("watchdog got=%0d rpu_in=%0d,%0d rq=%0d,%0d busy=%b n_instr=%0d owner=%0d", got.size(), rpu_in[0].size(), rpu_in[1].size(), srcq[0][5].size(), srcq[1][5].size(), front_busy, n_instr, owner_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
