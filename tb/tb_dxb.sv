// Self-checking test of the DX back FPGA. Half A's stream holds the BOF
// control word, a leader, data, a release command and then words of the
// next event; half B's stream holds data, trailer, EOF and a release
// command. The S-LINK must receive A's words up to the release, then all
// of B's, then A's remaining words, with control words flagged, command
// words removed, copies to the Host FIFO only where tagged, and random
// S-LINK back-pressure.
module tb_dxb;
  import csc_rod_pkg::*;
  logic iclk = 0, dclk = 0, rst_n = 0;
  always #10ns   iclk = ~iclk;
  always #12.5ns dclk = ~dclk;

  dx_word_t aq[$], bq[$];
  dx_word_t a_word, b_word;
  logic a_empty, b_empty, a_rd_en, b_rd_en;
  logic host_wr_en, host_full = 0;
  logic [33:0] host_wr_data;
  logic slink_valid, slink_ctrl, slink_ready;
  logic [31:0] slink_data, handovers, frags;
  logic owner_b;
  int checks = 0, failures = 0;

  // pop half a cycle after the clock edge that took the word, so the
  // model never changes its output at the edge the design samples on
  logic pa = 0, pb = 0;
  always @(posedge iclk) begin
    pa <= a_rd_en;
    pb <= b_rd_en;
  end
  initial begin a_empty = 1; b_empty = 1; a_word = '0; b_word = '0; end
  always @(negedge iclk) begin
    if (pa) void'(aq.pop_front());
    if (pb) void'(bq.pop_front());
    a_empty <= aq.size() == 0;
    b_empty <= bq.size() == 0;
    a_word  <= aq.size() == 0 ? '0 : aq[0];
    b_word  <= bq.size() == 0 ? '0 : bq[0];
  end

  logic rdy = 0;
  always @(posedge dclk) rdy <= ($urandom_range(0, 3) != 0);
  assign slink_ready = rdy;

  dxb #(.FIFO_DEPTH(16)) dut (
    .int_clk(iclk), .int_rst_n(rst_n),
    .a_word(a_word), .a_empty(a_empty), .a_rd_en(a_rd_en),
    .b_word(b_word), .b_empty(b_empty), .b_rd_en(b_rd_en),
    .host_wr_en(host_wr_en), .host_wr_data(host_wr_data), .host_full(host_full),
    .dclk(dclk), .d_rst_n(rst_n),
    .slink_valid(slink_valid), .slink_ctrl(slink_ctrl), .slink_data(slink_data),
    .slink_ready(slink_ready),
    .owner_b(owner_b), .handovers(handovers), .fragments_sent(frags));

  logic [32:0] got[$], exp[$];
  logic [33:0] host_got[$], host_exp[$];
  always @(posedge dclk) if (slink_valid && slink_ready) got.push_back({slink_ctrl, slink_data});
  always @(posedge iclk) if (host_wr_en) host_got.push_back(host_wr_data);

  function automatic dx_word_t mk(word_kind_e k, logic [31:0] d, bit h = 0);
    dx_word_t w;
    w.to_host = h; w.to_back = (k != KIND_CMD); w.kind = k; w.data = d;
    return w;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  dx_word_t a_rest[$];
  initial begin
    repeat (3) @(posedge iclk);
    rst_n <= 1;
    @(posedge iclk);
    aq.push_back(mk(KIND_CTRL, BOF_CTRL_WORD));
    for (int i = 0; i < 8; i++) aq.push_back(mk(KIND_DATA, 32'hEE00_0000 + i));
    for (int i = 0; i < 20; i++) aq.push_back(mk(KIND_DATA, 32'hA000_0000 + i, i == 3));
    foreach (aq[i]) exp.push_back({aq[i].kind == KIND_CTRL, aq[i].data});
    aq.push_back(mk(KIND_CMD, CMD_RELEASE_BUS));
    for (int i = 0; i < 20; i++) bq.push_back(mk(KIND_DATA, 32'hB000_0000 + i));
    for (int i = 0; i < 3; i++) bq.push_back(mk(KIND_DATA, 32'hDD00_0000 + i));
    bq.push_back(mk(KIND_CTRL, EOF_CTRL_WORD));
    foreach (bq[i]) exp.push_back({bq[i].kind == KIND_CTRL, bq[i].data});
    bq.push_back(mk(KIND_CMD, CMD_RELEASE_BUS));
    // next event already waiting in A behind the release
    for (int i = 0; i < 5; i++) a_rest.push_back(mk(KIND_DATA, 32'hA100_0000 + i));
    foreach (a_rest[i]) begin
      aq.push_back(a_rest[i]);
      exp.push_back({1'b0, a_rest[i].data});
    end
    host_exp.push_back({KIND_DATA, 32'hA000_0003});
    wait (got.size() == exp.size());
    repeat (20) @(posedge dclk);
    check(got.size() == exp.size(), "S-LINK word count");
    foreach (exp[i]) check(got[i] == exp[i], $sformatf("S-LINK word %0d: %h", i, got[i]));
    check(handovers == 2, "two bus handovers");
    check(!owner_b, "bus returned to A");
    check(frags == 1, "one fragment ended");
    check(host_got.size() == 1 && host_got[0] == host_exp[0], "Host FIFO copy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog got=%0d exp=%0d aq=%0d bq=%0d owner=%0d", got.size(), exp.size(), aq.size(), bq.size(), owner_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
