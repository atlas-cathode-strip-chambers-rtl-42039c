// Data Exchange (DX) subsystem of the ROD.
//
// The DX builds events in two steps, both driven by one HPU instruction
// stream: first, in each half-ROD, the five SPUs' sparsified data are moved
// over the half's front-end bus into that half's RPU; then the two RPUs'
// data are merged, between a leader and a trailer written by the HPU, into
// one fragment for the Readout Link. It holds two front FPGAs (dxf, one per
// half), the DX internal bus with the back FPGA (dxb), and the 16 kW Host
// FIFO on the internal bus, through which the HPU can read back captured
// words.
//
// The instruction stream is offered to both fronts at once and accepted
// when both are idle, so an instruction for "A and B" costs one word, as in
// the document's per-L1 word count. Clocks, as in the document: DX_CLK for
// the instruction stream and the front-end buses, DXINT_CLK for the
// internal bus, DCLK towards the S-LINK, and the HPU's clock on the Host
// FIFO's read side.
module data_exchange
  import csc_rod_pkg::*;
#(
  parameter int unsigned FRONT_FIFO_DEPTH = 1024,
  parameter int unsigned BACK_FIFO_DEPTH  = 1024,
  parameter int unsigned HOST_FIFO_DEPTH  = 16384
) (
  input  logic dx_clk,   input logic dx_rst_n,
  input  logic int_clk,  input logic int_rst_n,
  input  logic dclk,     input logic d_rst_n,
  input  logic hpu_clk,  input logic hpu_rst_n,

  input  logic        instr_valid,
  input  logic [31:0] instr_data,
  output logic        instr_ready,

  // per half (0 = A, 1 = B), per DPU
  input  logic [1:0][DPUS_PER_HALF-1:0]       src_valid,
  input  logic [1:0][DPUS_PER_HALF-1:0][31:0] src_data,
  input  logic [1:0][DPUS_PER_HALF-1:0]       src_last,
  output logic [1:0][DPUS_PER_HALF-1:0]       src_ready,
  output logic [1:0][DPUS_PER_HALF-1:0]       dst_valid,
  output logic [1:0][31:0]                    dst_data,
  output logic [1:0]                          dst_last,
  input  logic [1:0][DPUS_PER_HALF-1:0]       dst_ready,

  // S-LINK
  output logic        slink_valid,
  output logic        slink_ctrl,
  output logic [31:0] slink_data,
  input  logic        slink_ready,

  // Host FIFO read side (HPU)
  input  logic        host_rd_en,
  output logic [33:0] host_rd_data,
  output logic        host_empty,

  output logic [1:0]  front_busy,
  output logic [1:0][31:0] front_words,
  output logic        owner_b,
  output logic [31:0] handovers,
  output logic [31:0] fragments_sent
);
  logic [1:0] f_ready;
  dx_word_t [1:0] f_word;
  logic [1:0] f_empty, f_rd_en;
  logic        host_wr_en, host_full;
  logic [33:0] host_wr_data;
  logic [$clog2(HOST_FIFO_DEPTH):0] unused_hwl, unused_hrl;

  assign instr_ready = &f_ready;

  for (genvar h = 0; h < 2; h++) begin : g_front
    dxf #(.SIDE(h[0]), .FIFO_DEPTH(FRONT_FIFO_DEPTH)) u_dxf (
      .clk        (dx_clk), .rst_n(dx_rst_n),
      .instr_valid(instr_valid && instr_ready),
      .instr_data (instr_data),
      .instr_ready(f_ready[h]),
      .src_valid  (src_valid[h]), .src_data(src_data[h]),
      .src_last   (src_last[h]),  .src_ready(src_ready[h]),
      .dst_valid  (dst_valid[h]), .dst_data(dst_data[h]),
      .dst_last   (dst_last[h]),  .dst_ready(dst_ready[h]),
      .int_clk    (int_clk), .int_rst_n(int_rst_n),
      .out_rd_en  (f_rd_en[h]), .out_word(f_word[h]), .out_empty(f_empty[h]),
      .busy       (front_busy[h]),
      .words_moved(front_words[h])
    );
  end

  dxb #(.FIFO_DEPTH(BACK_FIFO_DEPTH)) u_dxb (
    .int_clk(int_clk), .int_rst_n(int_rst_n),
    .a_word(f_word[0]), .a_empty(f_empty[0]), .a_rd_en(f_rd_en[0]),
    .b_word(f_word[1]), .b_empty(f_empty[1]), .b_rd_en(f_rd_en[1]),
    .host_wr_en(host_wr_en), .host_wr_data(host_wr_data), .host_full(host_full),
    .dclk(dclk), .d_rst_n(d_rst_n),
    .slink_valid(slink_valid), .slink_ctrl(slink_ctrl),
    .slink_data(slink_data), .slink_ready(slink_ready),
    .owner_b(owner_b), .handovers(handovers), .fragments_sent(fragments_sent)
  );

  async_fifo #(.WIDTH(34), .DEPTH(HOST_FIFO_DEPTH)) u_host_fifo (
    .wr_clk(int_clk), .wr_rst_n(int_rst_n),
    .wr_en(host_wr_en), .wr_data(host_wr_data),
    .wr_full(host_full), .wr_level(unused_hwl),
    .rd_clk(hpu_clk), .rd_rst_n(hpu_rst_n),
    .rd_en(host_rd_en), .rd_data(host_rd_data),
    .rd_empty(host_empty), .rd_level(unused_hrl)
  );
endmodule
