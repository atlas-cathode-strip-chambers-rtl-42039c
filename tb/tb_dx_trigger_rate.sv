// Trigger-rate workload for the Data Exchange at its default sizes: 40
// events at a 100 kHz L1 rate (one every 400 DX_CLK cycles). For each event
// the SPU data of both halves is put into the SPU models at the L1 time and
// the HPU model sends the 23 instruction words of one event. SPU sizes vary
// around the typical 15 words (precision) and 45 words (transverse); each
// RPU model returns its input less 30 words (the typical 105 -> 75). The
// S-LINK is always ready. Checked: every fragment word in order (control
// words, leader, both RPUs' data, trailer), and the time from each L1 to the
// end-of-fragment word, which must stay below the 10 us trigger period so
// that no backlog builds up.
module tb_dx_trigger_rate;
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
  int cyc = 0;

  assign dst_ready = {6'b100000, 6'b100000};

  always @(posedge dx_clk) begin
    cyc++;
    took <= rst_n ? src_valid & src_ready : '0;
    for (int h = 0; h < 2; h++)
      if (rst_n && dst_valid[h][5]) begin
        rpu_in[h].push_back({dst_last[h], dst_data[h]});
        // the RPU "processes" the event once it has all of it
        if (dst_last[h]) begin
          int n;
          n = rpu_in[h].size() - 30;
          for (int k = 0; k < n; k++)
            srcq[h][5].push_back({k == n - 1, 4'(h + 10), rpu_in[h][k][27:0]});
          rpu_in[h] = {};
        end
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

  localparam int EVENTS = 40, PERIOD = 400;   // DX_CLK cycles per L1 at 100 kHz
  logic [32:0] exp[$];
  int l1_cyc[EVENTS], eof_cyc[EVENTS];
  int n_eof = 0, pos = 0;
  always @(posedge dclk) if (rst_n && slink_valid && slink_ready && slink_ctrl &&
                              slink_data == EOF_CTRL_WORD && n_eof < EVENTS) begin
    eof_cyc[n_eof] = cyc;
    n_eof++;
  end

  initial begin
    int lat_max, nin[2];
    repeat (4) @(posedge dx_clk);
    rst_n <= 1;
    repeat (4) @(posedge dx_clk);
    for (int e = 0; e < EVENTS; e++) begin
      // L1 of event e: the SPUs' sparsified data becomes available
      while (cyc < 20 + e * PERIOD) @(negedge dx_clk);
      l1_cyc[e] = cyc;
      exp.push_back({1'b1, BOF_CTRL_WORD});
      for (int i = 0; i < 8; i++) exp.push_back({1'b0, 32'h1EAD_0000 + 32'(e << 4) + 32'(i)});
      for (int h = 0; h < 2; h++) begin
        nin[h] = 0;
        for (int s = 0; s < 5; s++) begin
          int n;
          n = (s == 4) ? $urandom_range(35, 55) : $urandom_range(10, 20);
          for (int k = 0; k < n; k++) begin
            logic [32:0] w;
            w = {k == n - 1, 8'(e), 4'(h), 4'(s), 16'(k)};
            srcq[h][s].push_back(w);
            nin[h]++;
          end
        end
      end
      // expected RPU outputs: the first (input - 30) words, re-tagged
      for (int h = 0; h < 2; h++) begin
        int k;
        k = 0;
        for (int s = 0; s < 5 && k < nin[h] - 30; s++)
          for (int j = 0; j < srcq[h][s].size() && k < nin[h] - 30; j++)
            if (srcq[h][s][j][31:24] == 8'(e)) begin
              exp.push_back({1'b0, 4'(h + 10), srcq[h][s][j][27:0]});
              k++;
            end
      end
      for (int i = 0; i < 3; i++) exp.push_back({1'b0, 32'h7A11_0000 + 32'(e << 4) + 32'(i)});
      exp.push_back({1'b1, EOF_CTRL_WORD});

      send(instr_seq(2'b11, 6'b011111, 1'b0, 3'd5));
      send(instr_write(2'b01, KIND_CTRL, 1'b0, 1'b1, 12'd1));
      send(BOF_CTRL_WORD);
      send(instr_write(2'b01, KIND_DATA, 1'b1, 1'b1, 12'd8));
      for (int i = 0; i < 8; i++) send(32'h1EAD_0000 + 32'(e << 4) + 32'(i));
      send(instr_seq(2'b11, 6'b100000, 1'b1, 3'b001));
      send(instr_write(2'b01, KIND_CMD, 1'b0, 1'b1, 12'd1));
      send(CMD_RELEASE_BUS);
      send(instr_write(2'b10, KIND_DATA, 1'b0, 1'b1, 12'd3));
      for (int i = 0; i < 3; i++) send(32'h7A11_0000 + 32'(e << 4) + 32'(i));
      send(instr_write(2'b10, KIND_CTRL, 1'b0, 1'b1, 12'd1));
      send(EOF_CTRL_WORD);
      send(instr_write(2'b10, KIND_CMD, 1'b0, 1'b1, 12'd1));
      send(CMD_RELEASE_BUS);
    end

    wait (n_eof == EVENTS);
    repeat (20) @(posedge dclk);
    check(n_instr == 23 * EVENTS, $sformatf("instruction words = %0d", n_instr));
    check(got.size() == exp.size(), $sformatf("words to the ROL %0d, expected %0d", got.size(), exp.size()));
    pos = 0;
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] != exp[i]) begin
        failures++;
        if (pos++ < 10) $display("FAIL: ROL word %0d", i);
      end
    end
    lat_max = 0;
    for (int e = 0; e < EVENTS; e++)
      if (eof_cyc[e] - l1_cyc[e] > lat_max) lat_max = eof_cyc[e] - l1_cyc[e];
    $display("%0d events at 100 kHz, %0d ROL words, L1 to end of fragment at most %0d DX_CLK cycles (%0d ns)",
             EVENTS, got.size(), lat_max, lat_max * 25);
    check(lat_max < PERIOD, "each fragment complete within the 10 us trigger period");
    check(frags == EVENTS && handovers == 2 * EVENTS && !owner_b, "fragments and bus handovers");
    check(host_got.size() == 8 * EVENTS, "leaders captured in the Host FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog got=%0d n_eof=%0d n_instr=%0d", got.size(), n_eof, n_instr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
