// End-to-end test of the ROD at its default sizes.
//
// Behavioural stand-ins replace the DSPs, the HPU, the S-LINK card, the
// chamber readout and the supplies. Two events are taken through the whole
// data path: raw words enter each of the ten SPUs' XB buffers; each SPU
// model keeps the first 15 of its 20 raw words (45 of 50 for the
// transverse SPU) and writes them to its EMIF output FIFO; the HPU model
// sends the 23-word DX instruction stream; each RPU model reads its 105
// words and writes back the first 75; the S-LINK model, with random
// back-pressure, must receive the 163-word fragment (BOF, 8-word leader,
// 75 + 75 data, 3-word trailer, EOF) exactly as computed here. On the side
// units: two overlapping triggers share SCA timeslices, the TTC records
// reach the HPU, the supplies come up in sequence, and the laser-safety
// logic enables the transmitters and requests fill frames on a lost lock.
// Each mechanism is counted and one that never happened is a failure.
module tb_csc_rod_top;
  import csc_rod_pkg::*;
  logic sclk = 0, dpu_clk = 0, dx_clk = 0, dxint_clk = 0, dclk = 0, hpu_clk = 0, bc_clk = 0, pw_clk = 0;
  logic rst_n = 0;
  always #8.33ns  sclk      = ~sclk;       // SCLK 60 MHz
  always #16.67ns dpu_clk   = ~dpu_clk;    // DPU_CLK 30 MHz
  always #12.5ns  dx_clk    = ~dx_clk;     // DX_CLK 40 MHz
  always #10ns    dxint_clk = ~dxint_clk;  // DXINT_CLK 50 MHz
  always #12.5ns  dclk      = ~dclk;       // DCLK 40 MHz
  always #16.67ns hpu_clk   = ~hpu_clk;    // HPU_CLK 30 MHz
  always #12.5ns  bc_clk    = ~bc_clk;     // bunch crossing 40 MHz
  always #12.5ns  pw_clk    = ~pw_clk;

  localparam int EVENTS = 2;

  logic [1:0][4:0]        ic_valid = '0, xb_rd_en, xb_empty, spu_wr_en = '0, spu_full;
  logic [1:0][4:0][24:0]  ic_data = '0;
  logic [1:0][4:0][31:0]  xb_rd_data, xb_dropped;
  logic [1:0][4:0][32:0]  spu_wr_data = '0;
  logic [1:0]             rpu_rd_en, rpu_empty, rpu_wr_en = '0, rpu_full;
  logic [1:0][32:0]       rpu_rd_data, rpu_wr_data = '0;
  logic        dx_instr_valid = 0, dx_instr_ready, host_rd_en, host_empty;
  logic [31:0] dx_instr_data = '0;
  logic [33:0] host_rd_data;
  logic        slink_valid, slink_ctrl, slink_ready;
  logic [31:0] slink_data;
  logic [1:0]  dx_front_busy;
  logic [1:0][31:0] dx_front_words;
  logic        dx_owner_b;
  logic [31:0] dx_handovers, dx_fragments;
  logic        sca_sample_en = 1, sca_l1a = 0, sca_ro_ready = 0, sca_ro_done = 0;
  logic [3:0]  sca_n_ts = 4;
  logic [7:0]  sca_wr_cell, sca_reserved;
  logic        sca_ro_valid, sca_fault;
  sca_ts_t     sca_ro_ts;
  logic [31:0] sca_l1_accepted, sca_shared_ts, sca_l1_overrun;
  logic        ttc_bcr = 0, ttc_ecr = 0, ttc_l1a = 0, ttc_rd_en = 0, ttc_empty;
  logic [7:0]  ttc_trig_type = 8'h11;
  trig_info_t  ttc_info;
  logic [31:0] ttc_lost;
  logic rcc_power_en = 0, bp5_ok = 1, bp33_ok = 1, vaok, vbok, vcok;
  logic pena, penb, penb_surge, penc, power_good, power_fault;
  logic tm_interlock = 1, tm_clear = 0, tm_tx_disable;
  logic [9:0] tm_lock = '1, tm_fill_req;
  logic [31:0] tm_total_losses;

  csc_rod_top dut (
    .sclk(sclk), .s_rst_n(rst_n), .dpu_clk(dpu_clk), .dpu_rst_n(rst_n),
    .dx_clk(dx_clk), .dx_rst_n(rst_n), .dxint_clk(dxint_clk), .int_rst_n(rst_n),
    .dclk(dclk), .d_rst_n(rst_n), .hpu_clk(hpu_clk), .hpu_rst_n(rst_n),
    .bc_clk(bc_clk), .bc_rst_n(rst_n), .pw_clk(pw_clk), .pw_rst_n(rst_n),
    .ic_valid(ic_valid), .ic_data(ic_data),
    .xb_rd_en(xb_rd_en), .xb_rd_data(xb_rd_data), .xb_empty(xb_empty), .xb_dropped(xb_dropped),
    .spu_wr_en(spu_wr_en), .spu_wr_data(spu_wr_data), .spu_full(spu_full),
    .rpu_rd_en(rpu_rd_en), .rpu_rd_data(rpu_rd_data), .rpu_empty(rpu_empty),
    .rpu_wr_en(rpu_wr_en), .rpu_wr_data(rpu_wr_data), .rpu_full(rpu_full),
    .dx_instr_valid(dx_instr_valid), .dx_instr_data(dx_instr_data), .dx_instr_ready(dx_instr_ready),
    .host_rd_en(host_rd_en), .host_rd_data(host_rd_data), .host_empty(host_empty),
    .slink_valid(slink_valid), .slink_ctrl(slink_ctrl), .slink_data(slink_data), .slink_ready(slink_ready),
    .dx_front_busy(dx_front_busy), .dx_front_words(dx_front_words), .dx_owner_b(dx_owner_b),
    .dx_handovers(dx_handovers), .dx_fragments(dx_fragments),
    .sca_sample_en(sca_sample_en), .sca_l1a(sca_l1a), .sca_n_ts(sca_n_ts), .sca_wr_cell(sca_wr_cell),
    .sca_ro_valid(sca_ro_valid), .sca_ro_ts(sca_ro_ts), .sca_ro_ready(sca_ro_ready), .sca_ro_done(sca_ro_done),
    .sca_reserved(sca_reserved), .sca_fault(sca_fault), .sca_l1_accepted(sca_l1_accepted),
    .sca_shared_ts(sca_shared_ts), .sca_l1_overrun(sca_l1_overrun),
    .ttc_bcr(ttc_bcr), .ttc_ecr(ttc_ecr), .ttc_l1a(ttc_l1a), .ttc_trig_type(ttc_trig_type),
    .ttc_rd_en(ttc_rd_en), .ttc_info(ttc_info), .ttc_empty(ttc_empty), .ttc_lost(ttc_lost),
    .rcc_power_en(rcc_power_en), .bp5_ok(bp5_ok), .bp33_ok(bp33_ok),
    .vaok(vaok), .vbok(vbok), .vcok(vcok),
    .pena(pena), .penb(penb), .penb_surge(penb_surge), .penc(penc),
    .power_good(power_good), .power_fault(power_fault),
    .tm_interlock(tm_interlock), .tm_lock(tm_lock), .tm_clear(tm_clear),
    .tm_tx_disable(tm_tx_disable), .tm_fill_req(tm_fill_req), .tm_total_losses(tm_total_losses));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int kept(int s);   // words an SPU keeps per event
    return (s == 4) ? 45 : 15;
  endfunction

  // ---------------- SPU DSP models ----------------
  logic [31:0] spu_in [2][5][$];
  assign xb_rd_en = rst_n ? ~xb_empty : '0;
  always @(posedge dpu_clk)
    for (int h = 0; h < 2; h++) for (int s = 0; s < 5; s++)
      if (xb_rd_en[h][s]) spu_in[h][s].push_back(xb_rd_data[h][s]);
  // a complete raw event (kept + 5 words) is sparsified to its first "kept" words
  logic [32:0] spu_out [2][5][$];
  always @(negedge dpu_clk) begin
    for (int h = 0; h < 2; h++) for (int s = 0; s < 5; s++) begin
      if (spu_in[h][s].size() >= kept(s) + 5) begin
        for (int k = 0; k < kept(s); k++) spu_out[h][s].push_back({k == kept(s) - 1, spu_in[h][s][k]});
        repeat (kept(s) + 5) void'(spu_in[h][s].pop_front());
      end
      spu_wr_en[h][s] <= 1'b0;
      if (spu_out[h][s].size() != 0 && !spu_full[h][s]) begin
        spu_wr_en[h][s]   <= 1'b1;
        spu_wr_data[h][s] <= spu_out[h][s].pop_front();
      end
    end
  end

  // ---------------- RPU DSP models ----------------
  logic [32:0] rpu_in [2][$];
  logic [32:0] rpu_out [2][$];
  assign rpu_rd_en = rst_n ? ~rpu_empty : '0;
  always @(posedge dpu_clk)
    for (int h = 0; h < 2; h++) if (rpu_rd_en[h]) rpu_in[h].push_back(rpu_rd_data[h]);
  always @(negedge dpu_clk)
    for (int h = 0; h < 2; h++) begin
      if (rpu_in[h].size() != 0 && rpu_in[h][rpu_in[h].size()-1][32]) begin
        check(rpu_in[h].size() == 105, $sformatf("RPU %0d event of %0d words", h, rpu_in[h].size()));
        for (int k = 0; k < 75; k++) rpu_out[h].push_back({k == 74, rpu_in[h][k][31:0]});
        rpu_in[h] = {};
      end
      rpu_wr_en[h] <= 1'b0;
      if (rpu_out[h].size() != 0 && !rpu_full[h]) begin
        rpu_wr_en[h]   <= 1'b1;
        rpu_wr_data[h] <= rpu_out[h].pop_front();
      end
    end

  // ---------------- S-LINK, Host FIFO readers ----------------
  logic rdy = 0;
  int stalls = 0;
  always @(posedge dclk) rdy <= ($urandom_range(0, 4) != 0);
  assign slink_ready = rdy && rst_n;
  logic [32:0] frag[$];
  always @(posedge dclk) begin
    if (slink_valid && slink_ready) frag.push_back({slink_ctrl, slink_data});
    if (slink_valid && !slink_ready) stalls++;
  end
  logic [33:0] host_got[$];
  assign host_rd_en = rst_n && !host_empty;
  always @(posedge hpu_clk) if (host_rd_en) host_got.push_back(host_rd_data);

  // ---------------- HPU instruction stream ----------------
  task automatic send(logic [31:0] w);
    @(negedge dx_clk);
    dx_instr_data  = w;
    dx_instr_valid = 1'b1;
    while (!dx_instr_ready) @(negedge dx_clk);
    @(posedge dx_clk);
    #1ns dx_instr_valid = 1'b0;
  endtask

  task automatic run_event(int ev);
    send(instr_seq(2'b11, 6'b011111, 1'b0, 3'd5));
    send(instr_write(2'b01, KIND_CTRL, 1'b0, 1'b1, 12'd1));
    send(BOF_CTRL_WORD);
    send(instr_write(2'b01, KIND_DATA, 1'b1, 1'b1, 12'd8));
    for (int i = 0; i < 8; i++) send(32'h1EAD_0000 + 32'(ev * 16 + i));
    send(instr_seq(2'b11, 6'b100000, 1'b1, 3'b001));
    send(instr_write(2'b01, KIND_CMD, 1'b0, 1'b1, 12'd1));
    send(CMD_RELEASE_BUS);
    send(instr_write(2'b10, KIND_DATA, 1'b0, 1'b1, 12'd3));
    for (int i = 0; i < 3; i++) send(32'h7A11_0000 + 32'(ev * 16 + i));
    send(instr_write(2'b10, KIND_CTRL, 1'b0, 1'b1, 12'd1));
    send(EOF_CTRL_WORD);
    send(instr_write(2'b10, KIND_CMD, 1'b0, 1'b1, 12'd1));
    send(CMD_RELEASE_BUS);
  endtask

  // raw data: word k of SPU s, half h, event ev
  function automatic logic [24:0] raw(int ev, int h, int s, int k);
    return {2'(ev), 1'(h), 3'(s), 19'(k)};
  endfunction

  logic [32:0] exp[$];
  task automatic expect_event(int ev);
    exp.push_back({1'b1, BOF_CTRL_WORD});
    for (int i = 0; i < 8; i++) exp.push_back({1'b0, 32'h1EAD_0000 + 32'(ev * 16 + i)});
    for (int h = 0; h < 2; h++) begin
      int n;
      n = 0;
      for (int s = 0; s < 5; s++)
        for (int k = 0; k < kept(s); k++)
          if (n < 75) begin exp.push_back({1'b0, 7'b0, raw(ev, h, s, k)}); n++; end
    end
    for (int i = 0; i < 3; i++) exp.push_back({1'b0, 32'h7A11_0000 + 32'(ev * 16 + i)});
    exp.push_back({1'b1, EOF_CTRL_WORD});
  endtask

  // interconnect: stream one event's raw words into every SPU
  task automatic feed_event(int ev);
    for (int k = 0; k < 50; k++) begin
      @(negedge sclk);
      for (int h = 0; h < 2; h++) for (int s = 0; s < 5; s++) begin
        ic_valid[h][s] = (k < kept(s) + 5);
        ic_data[h][s]  = raw(ev, h, s, k);
      end
      @(negedge sclk);
      ic_valid = '0;
    end
  endtask

  // ---------------- side units ----------------
  // SCA readout engine: 20 clocks per timeslice
  int ro_t = 0, ro_n = 0, ro_first = 0;
  bit ro_busy = 0;
  always @(posedge bc_clk) begin
    if (sca_ro_valid && sca_ro_ready) begin
      ro_busy <= 1; ro_t <= 0; ro_n++; ro_first += int'(sca_ro_ts.first);
    end else if (ro_busy && !sca_ro_done) ro_t <= ro_t + 1;
    if (sca_ro_done) ro_busy <= 0;
  end
  always @(negedge bc_clk) begin
    sca_ro_ready <= !ro_busy;
    sca_ro_done  <= ro_busy && ro_t == 20;
  end
  // supplies: good 10 clocks after enable
  int ca = 0, cb = 0, cc = 0;
  always @(posedge pw_clk) begin
    ca <= pena ? ca + 1 : 0;
    cb <= penb ? cb + 1 : 0;
    cc <= penc ? cc + 1 : 0;
  end
  assign vaok = ca >= 10;
  assign vbok = cb >= 10;
  assign vcok = cc >= 10;
  int fill_seen = 0;
  always @(posedge bc_clk) if (tm_fill_req[3]) fill_seen++;

  task automatic l1(int n);
    @(negedge bc_clk);
    sca_l1a = 1; ttc_l1a = 1; sca_n_ts = 4'(n);
    @(negedge bc_clk);
    sca_l1a = 0; ttc_l1a = 0;
  endtask

  int ttc_records = 0;
  initial begin
    repeat (5) @(negedge dx_clk);
    rst_n = 1;

    // power up and enable the transmitters
    rcc_power_en = 1;
    @(negedge bc_clk); tm_clear = 1; @(negedge bc_clk); tm_clear = 0;
    wait (power_good);

    // SCA pipeline filled, then two triggers 5 BC apart with 8 timeslices
    repeat (150) @(negedge bc_clk);
    l1(8);
    repeat (3) @(negedge bc_clk);
    l1(8);

    // a link drops lock briefly
    @(negedge bc_clk); tm_lock[3] = 0;
    repeat (4) @(negedge bc_clk); tm_lock[3] = 1;

    for (int ev = 0; ev < EVENTS; ev++) begin
      expect_event(ev);
      fork
        feed_event(ev);
        run_event(ev);
      join
    end
    wait (frag.size() >= exp.size());
    repeat (50) @(negedge dclk);
    wait (ro_n == 13);
    repeat (30) @(negedge bc_clk);
    while (!ttc_empty) begin
      check(ttc_info.l1id == 24'(ttc_records) && ttc_info.trig_type == 8'h11, "TTC record");
      ttc_records++;
      @(negedge bc_clk); ttc_rd_en = 1; @(negedge bc_clk); ttc_rd_en = 0;
    end

    // ---- results ----
    check(frag.size() == EVENTS * 163, $sformatf("fragment words %0d", frag.size()));
    foreach (exp[i]) check(frag[i] == exp[i], $sformatf("fragment word %0d: %h / %h", i, frag[i], exp[i]));
    check(dx_fragments == EVENTS, "fragments sent");
    check(host_got.size() == EVENTS * 8, "leaders captured in the Host FIFO");
    check(xb_dropped == '0, "no XB words lost");
    check(ro_n == 13 && sca_shared_ts == 3, $sformatf("SCA read once: %0d read, %0d shared", ro_n, sca_shared_ts));
    check(ro_first == 2, "two first-timeslice flags");
    check(!sca_fault && !power_fault, "no faults");

    // mechanisms
    check(dx_handovers == 2 * EVENTS, "DX internal bus handovers");
    check(stalls > 0, "S-LINK back-pressure happened");
    check(host_got.size() > 0, "captured-data readback happened");
    check(sca_shared_ts > 0, "shared timeslice happened");
    check(ttc_records == 2, "TTC records");
    check(power_good, "power sequenced up");
    check(!tm_tx_disable && fill_seen > 0 && tm_total_losses == 1, "fill frames on lost lock");
    $display("mechanisms: handovers=%0d slink_stalls=%0d host_words=%0d shared_ts=%0d ttc=%0d fill=%0d",
             dx_handovers, stalls, host_got.size(), sca_shared_ts, ttc_records, fill_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog frag=%0d exp=%0d ro=%0d", frag.size(), exp.size(), ro_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
