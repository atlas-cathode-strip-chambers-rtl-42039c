// DX back FPGA (DXB): merges the two half-ROD streams on the DX internal
// bus and forwards the event fragment to the Readout Link (S-LINK).
//
// Both front FPGAs feed the DX internal bus through their front FIFOs;
// only one of them drives it at a time. After reset half A owns the bus.
// The HPU's instruction stream makes a front write a command word
// "release DX internal bus" into its own stream, behind its data: when that
// word reaches the bus, ownership passes to the other half (A hands over to
// B after the leader and RPU A data; B returns it to A after the trailer
// and the end-of-fragment control word). Command words are consumed here.
// Every other word goes, as its tag says, into the 1 kW back FIFO towards
// the ROL and/or into the Host FIFO (the captured-data readback path).
//
// The back FIFO crosses from DXINT_CLK into DCLK. On the S-LINK side a word
// is offered with slink_valid and taken when slink_ready is high;
// slink_ctrl marks the control words (0xB0F00000 / 0xE0F00000). This
// flow control, and where the bus ownership is kept, are this design's
// choices; the document gives the handover sequence, the FIFO size and the
// clocks. Timing: one word per DXINT_CLK cycle on the internal bus.
module dxb
  import csc_rod_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic        int_clk,     // DXINT_CLK
  input  logic        int_rst_n,

  // front FIFO read ports, half A and half B
  input  dx_word_t    a_word,
  input  logic        a_empty,
  output logic        a_rd_en,
  input  dx_word_t    b_word,
  input  logic        b_empty,
  output logic        b_rd_en,

  // Host FIFO write port (internal-bus side)
  output logic        host_wr_en,
  output logic [33:0] host_wr_data,   // {kind, data}
  input  logic        host_full,

  // S-LINK side, DCLK domain
  input  logic        dclk,
  input  logic        d_rst_n,
  output logic        slink_valid,
  output logic        slink_ctrl,
  output logic [31:0] slink_data,
  input  logic        slink_ready,

  output logic        owner_b,        // 1 while half B drives the bus
  output logic [31:0] handovers,
  output logic [31:0] fragments_sent  // end-of-fragment words sent to the ROL
);
  dx_word_t w;
  logic     w_avail, is_release, back_full, can_take, take;
  logic [32:0] back_rd;
  logic        back_empty;
  logic [$clog2(FIFO_DEPTH):0] unused_wl, unused_rl;

  always_comb begin
    w          = owner_b ? b_word : a_word;
    w_avail    = owner_b ? !b_empty : !a_empty;
    is_release = (w.kind == KIND_CMD) && (w.data == CMD_RELEASE_BUS);
    can_take   = (w.kind == KIND_CMD) ||
                 ((!w.to_host || !host_full) && (!w.to_back || !back_full));
    take       = w_avail && can_take;
    a_rd_en    = take && !owner_b;
    b_rd_en    = take &&  owner_b;
    host_wr_en   = take && (w.kind != KIND_CMD) && w.to_host;
    host_wr_data = {w.kind, w.data};
  end

  always_ff @(posedge int_clk or negedge int_rst_n) begin
    if (!int_rst_n) begin
      owner_b   <= 1'b0;
      handovers <= '0;
    end else if (take && is_release) begin
      owner_b   <= !owner_b;
      handovers <= handovers + 1;
    end
  end

  async_fifo #(.WIDTH(33), .DEPTH(FIFO_DEPTH)) u_back_fifo (
    .wr_clk  (int_clk), .wr_rst_n(int_rst_n),
    .wr_en   (take && (w.kind != KIND_CMD) && w.to_back),
    .wr_data ({w.kind == KIND_CTRL, w.data}),
    .wr_full (back_full), .wr_level(unused_wl),
    .rd_clk  (dclk),    .rd_rst_n(d_rst_n),
    .rd_en   (slink_valid && slink_ready),
    .rd_data (back_rd),
    .rd_empty(back_empty), .rd_level(unused_rl)
  );

  assign slink_valid = !back_empty;
  assign slink_ctrl  = back_rd[32];
  assign slink_data  = back_rd[31:0];

  always_ff @(posedge dclk or negedge d_rst_n) begin
    if (!d_rst_n) fragments_sent <= '0;
    else if (slink_valid && slink_ready && slink_ctrl && slink_data == EOF_CTRL_WORD)
      fragments_sent <= fragments_sent + 1;
  end
endmodule
