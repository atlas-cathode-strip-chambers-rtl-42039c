// CSC ROD readout logic: one ROD (two chambers) with the logic of its
// transition module.
//
// Raw data of each chamber layer enter an SPU through its XB input buffer
// (xb_input_buffer). The SPU's DSP sparsifies them and writes the result,
// event by event, into its EMIF output FIFO (1K x 32). The Data Exchange
// (data_exchange) then, under the HPU's instruction stream, gathers each
// half-ROD's five SPU outputs into that half's RPU input FIFO (512 x 32),
// and after the RPU's DSP has processed them, merges the two RPU output
// FIFOs (512 x 32) between leader and trailer into one event fragment for
// the S-LINK. Next to this data path sit the SCA controller
// (sca_controller), the TTC FPGA's trigger recorder (ttc_trigger_info),
// the supply sequencer (power_sequencer) and the transition module's
// laser-safety supervisor (laser_safety); their signals are brought out.
//
// The DSPs, the HPU, the SDRAMs, the optical links, the S-LINK card and
// the analogue power parts are not part of this RTL: the ports named
// spu_*, rpu_*, xb_* and the instruction and Host FIFO ports are where
// they attach. Each DPU word carries a last bit (bit 32) that ends one
// event's data; this framing is this design's choice.
//
// Clocks: sclk (Interconnect to DPU), dpu_clk (DSP side of the DPU FPGAs),
// dx_clk, dxint_clk, dclk, hpu_clk, bc_clk (bunch crossing: SCA and TTC)
// and pw_clk (power CPLD). Each has its own active-low reset.
module csc_rod_top
  import csc_rod_pkg::*;
#(
  parameter int unsigned XB_DEPTH         = 1024,
  parameter int unsigned SPU_EMIF_DEPTH   = 1024,
  parameter int unsigned RPU_EMIF_DEPTH   = 512,
  parameter int unsigned FRONT_FIFO_DEPTH = 1024,
  parameter int unsigned BACK_FIFO_DEPTH  = 1024,
  parameter int unsigned HOST_FIFO_DEPTH  = 16384,
  parameter int unsigned SCA_CELLS        = 144,
  parameter int unsigned SCA_LATENCY      = 70,
  parameter int unsigned SCA_MAX_PENDING  = 32,
  parameter int unsigned PW_TIMEOUT       = 400_000,
  parameter int unsigned PW_SURGE         = 40_000,
  parameter int unsigned LS_WINDOW        = 40_000_000,
  parameter int unsigned LS_MAX_LOSSES    = 16
) (
  input  logic sclk,      input logic s_rst_n,
  input  logic dpu_clk,   input logic dpu_rst_n,
  input  logic dx_clk,    input logic dx_rst_n,
  input  logic dxint_clk, input logic int_rst_n,
  input  logic dclk,      input logic d_rst_n,
  input  logic hpu_clk,   input logic hpu_rst_n,
  input  logic bc_clk,    input logic bc_rst_n,
  input  logic pw_clk,    input logic pw_rst_n,

  // Interconnect -> SPU XB input buffers, per half and SPU
  input  logic [1:0][SPUS_PER_HALF-1:0]        ic_valid,
  input  logic [1:0][SPUS_PER_HALF-1:0][24:0]  ic_data,
  // SPU DSP side of the XB input buffers
  input  logic [1:0][SPUS_PER_HALF-1:0]        xb_rd_en,
  output logic [1:0][SPUS_PER_HALF-1:0][31:0]  xb_rd_data,
  output logic [1:0][SPUS_PER_HALF-1:0]        xb_empty,
  output logic [1:0][SPUS_PER_HALF-1:0][31:0]  xb_dropped,
  // SPU DSP -> EMIF output FIFO
  input  logic [1:0][SPUS_PER_HALF-1:0]        spu_wr_en,
  input  logic [1:0][SPUS_PER_HALF-1:0][32:0]  spu_wr_data,
  output logic [1:0][SPUS_PER_HALF-1:0]        spu_full,
  // RPU DSP <- EMIF input FIFO, RPU DSP -> EMIF output FIFO
  input  logic [1:0]        rpu_rd_en,
  output logic [1:0][32:0]  rpu_rd_data,
  output logic [1:0]        rpu_empty,
  input  logic [1:0]        rpu_wr_en,
  input  logic [1:0][32:0]  rpu_wr_data,
  output logic [1:0]        rpu_full,

  // HPU -> DX instruction stream (DX_CLK), Host FIFO read (HPU clock)
  input  logic        dx_instr_valid,
  input  logic [31:0] dx_instr_data,
  output logic        dx_instr_ready,
  input  logic        host_rd_en,
  output logic [33:0] host_rd_data,
  output logic        host_empty,

  // S-LINK (DCLK)
  output logic        slink_valid,
  output logic        slink_ctrl,
  output logic [31:0] slink_data,
  input  logic        slink_ready,

  // DX status
  output logic [1:0]       dx_front_busy,
  output logic [1:0][31:0] dx_front_words,
  output logic             dx_owner_b,
  output logic [31:0]      dx_handovers,
  output logic [31:0]      dx_fragments,

  // SCA controller (bc_clk)
  input  logic       sca_sample_en,
  input  logic       sca_l1a,
  input  logic [3:0] sca_n_ts,
  output logic [7:0] sca_wr_cell,
  output logic       sca_ro_valid,
  output sca_ts_t    sca_ro_ts,
  input  logic       sca_ro_ready,
  input  logic       sca_ro_done,
  output logic [7:0] sca_reserved,
  output logic       sca_fault,
  output logic [31:0] sca_l1_accepted,
  output logic [31:0] sca_shared_ts,
  output logic [31:0] sca_l1_overrun,

  // TTC trigger information (bc_clk)
  input  logic       ttc_bcr,
  input  logic       ttc_ecr,
  input  logic       ttc_l1a,
  input  logic [7:0] ttc_trig_type,
  input  logic       ttc_rd_en,
  output trig_info_t ttc_info,
  output logic       ttc_empty,
  output logic [31:0] ttc_lost,

  // power sequencing (pw_clk)
  input  logic rcc_power_en,
  input  logic bp5_ok,
  input  logic bp33_ok,
  input  logic vaok,
  input  logic vbok,
  input  logic vcok,
  output logic pena,
  output logic penb,
  output logic penb_surge,
  output logic penc,
  output logic power_good,
  output logic power_fault,

  // transition-module laser safety (bc_clk)
  input  logic        tm_interlock,
  input  logic [9:0]  tm_lock,
  input  logic        tm_clear,
  output logic        tm_tx_disable,
  output logic [9:0]  tm_fill_req,
  output logic [31:0] tm_total_losses
);
  // DX front-end bus signals per half and DPU
  logic [1:0][DPUS_PER_HALF-1:0]       src_valid, src_last, src_ready, dst_valid, dst_ready;
  logic [1:0][DPUS_PER_HALF-1:0][31:0] src_data;
  logic [1:0][31:0]                    dst_data;
  logic [1:0]                          dst_last;

  for (genvar h = 0; h < 2; h++) begin : g_half
    for (genvar s = 0; s < int'(SPUS_PER_HALF); s++) begin : g_spu
      logic [32:0] q;
      logic        empty;
      logic [$clog2(XB_DEPTH):0]       unused_xl;
      logic [$clog2(SPU_EMIF_DEPTH):0] unused_wl, unused_rl;

      xb_input_buffer #(.DEPTH(XB_DEPTH)) u_xb (
        .sclk(sclk), .s_rst_n(s_rst_n),
        .ic_valid(ic_valid[h][s]), .ic_data(ic_data[h][s]),
        .dsp_clk(dpu_clk), .d_rst_n(dpu_rst_n),
        .xb_rd_en(xb_rd_en[h][s]), .xb_rd_data(xb_rd_data[h][s]),
        .xb_empty(xb_empty[h][s]), .xb_level(unused_xl),
        .dropped(xb_dropped[h][s])
      );

      async_fifo #(.WIDTH(33), .DEPTH(SPU_EMIF_DEPTH)) u_emif_out (
        .wr_clk(dpu_clk), .wr_rst_n(dpu_rst_n),
        .wr_en(spu_wr_en[h][s]), .wr_data(spu_wr_data[h][s]),
        .wr_full(spu_full[h][s]), .wr_level(unused_wl),
        .rd_clk(dx_clk), .rd_rst_n(dx_rst_n),
        .rd_en(src_ready[h][s] && !empty), .rd_data(q),
        .rd_empty(empty), .rd_level(unused_rl)
      );
      assign src_valid[h][s] = !empty;
      assign src_data[h][s]  = q[31:0];
      assign src_last[h][s]  = q[32];
      assign dst_ready[h][s] = 1'b0;   // SPUs take no data from the DX
    end

    // RPU EMIF FPGA: input FIFO (from the DX) and output FIFO (to the DX)
    logic [32:0] rq;
    logic        r_empty, r_in_full;
    logic [$clog2(RPU_EMIF_DEPTH):0] unused_a, unused_b, unused_c, unused_d;

    async_fifo #(.WIDTH(33), .DEPTH(RPU_EMIF_DEPTH)) u_rpu_in (
      .wr_clk(dx_clk), .wr_rst_n(dx_rst_n),
      .wr_en(dst_valid[h][RPU_INDEX] && !r_in_full),
      .wr_data({dst_last[h], dst_data[h]}),
      .wr_full(r_in_full), .wr_level(unused_a),
      .rd_clk(dpu_clk), .rd_rst_n(dpu_rst_n),
      .rd_en(rpu_rd_en[h]), .rd_data(rpu_rd_data[h]),
      .rd_empty(rpu_empty[h]), .rd_level(unused_b)
    );
    assign dst_ready[h][RPU_INDEX] = !r_in_full;

    async_fifo #(.WIDTH(33), .DEPTH(RPU_EMIF_DEPTH)) u_rpu_out (
      .wr_clk(dpu_clk), .wr_rst_n(dpu_rst_n),
      .wr_en(rpu_wr_en[h]), .wr_data(rpu_wr_data[h]),
      .wr_full(rpu_full[h]), .wr_level(unused_c),
      .rd_clk(dx_clk), .rd_rst_n(dx_rst_n),
      .rd_en(src_ready[h][RPU_INDEX] && !r_empty), .rd_data(rq),
      .rd_empty(r_empty), .rd_level(unused_d)
    );
    assign src_valid[h][RPU_INDEX] = !r_empty;
    assign src_data[h][RPU_INDEX]  = rq[31:0];
    assign src_last[h][RPU_INDEX]  = rq[32];
  end

  data_exchange #(
    .FRONT_FIFO_DEPTH(FRONT_FIFO_DEPTH),
    .BACK_FIFO_DEPTH (BACK_FIFO_DEPTH),
    .HOST_FIFO_DEPTH (HOST_FIFO_DEPTH)
  ) u_dx (
    .dx_clk(dx_clk), .dx_rst_n(dx_rst_n),
    .int_clk(dxint_clk), .int_rst_n(int_rst_n),
    .dclk(dclk), .d_rst_n(d_rst_n),
    .hpu_clk(hpu_clk), .hpu_rst_n(hpu_rst_n),
    .instr_valid(dx_instr_valid), .instr_data(dx_instr_data), .instr_ready(dx_instr_ready),
    .src_valid(src_valid), .src_data(src_data), .src_last(src_last), .src_ready(src_ready),
    .dst_valid(dst_valid), .dst_data(dst_data), .dst_last(dst_last), .dst_ready(dst_ready),
    .slink_valid(slink_valid), .slink_ctrl(slink_ctrl),
    .slink_data(slink_data), .slink_ready(slink_ready),
    .host_rd_en(host_rd_en), .host_rd_data(host_rd_data), .host_empty(host_empty),
    .front_busy(dx_front_busy), .front_words(dx_front_words),
    .owner_b(dx_owner_b), .handovers(dx_handovers), .fragments_sent(dx_fragments)
  );

  sca_controller #(
    .CELLS(SCA_CELLS), .LATENCY(SCA_LATENCY), .MAX_PENDING(SCA_MAX_PENDING)
  ) u_sca (
    .clk(bc_clk), .rst_n(bc_rst_n),
    .sample_en(sca_sample_en), .l1a(sca_l1a), .n_ts(sca_n_ts),
    .wr_cell(sca_wr_cell),
    .ro_valid(sca_ro_valid), .ro_ts(sca_ro_ts), .ro_ready(sca_ro_ready), .ro_done(sca_ro_done),
    .reserved_count(sca_reserved), .fault(sca_fault),
    .l1_accepted(sca_l1_accepted), .shared_ts(sca_shared_ts), .l1_overrun(sca_l1_overrun)
  );

  ttc_trigger_info u_ttc (
    .clk(bc_clk), .rst_n(bc_rst_n),
    .bcr(ttc_bcr), .ecr(ttc_ecr), .l1a(ttc_l1a), .trig_type(ttc_trig_type),
    .rd_en(ttc_rd_en), .rd_info(ttc_info), .empty(ttc_empty), .lost(ttc_lost)
  );

  power_sequencer #(.TIMEOUT_CYCLES(PW_TIMEOUT), .SURGE_CYCLES(PW_SURGE)) u_pw (
    .clk(pw_clk), .rst_n(pw_rst_n),
    .rcc_power_en(rcc_power_en), .bp5_ok(bp5_ok), .bp33_ok(bp33_ok),
    .vaok(vaok), .vbok(vbok), .vcok(vcok),
    .pena(pena), .penb(penb), .penb_surge(penb_surge), .penc(penc),
    .power_good(power_good), .fault(power_fault)
  );

  logic [15:0] unused_ls_window;
  laser_safety #(.N_LINKS(10), .WINDOW_CYCLES(LS_WINDOW), .MAX_LOSSES(LS_MAX_LOSSES)) u_ls (
    .clk(bc_clk), .rst_n(bc_rst_n),
    .interlock(tm_interlock), .lock(tm_lock), .clear(tm_clear),
    .tx_disable(tm_tx_disable), .fill_req(tm_fill_req),
    .losses_in_window(unused_ls_window), .total_losses(tm_total_losses)
  );
endmodule
