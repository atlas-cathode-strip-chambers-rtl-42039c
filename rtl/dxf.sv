// DX front FPGA (DXF) of one half-ROD.
//
// The HPU controls the Data Exchange with an instruction stream. Each
// front FPGA sees the same stream and executes the instructions addressed
// to its side (A or B); an instruction addressed to both counts once. Two
// kinds of instruction do the work the document lists per L1 trigger:
//
//   OP_SEQ   "run front sequence": the listed source DPUs are served one
//            after the other in ascending index (SPU0..SPU4, then the RPU),
//            each until it presents a word marked last. The words go either
//            to one DPU of the same half (SPU's -> RPU, with last marked on
//            the final word of the final source) or towards the back end.
//   OP_WRITE the N words that follow the instruction are sent towards the
//            back end as data (leader, trailer), S-LINK control words
//            (0xB0F00000 / 0xE0F00000) or commands (release of the DX
//            internal bus).
//
// Words towards the back end are tagged (csc_rod_pkg::dx_word_t) and
// written into the front FIFO (1 kW, the document's "1 kW max"), which
// crosses from DX_CLK into DXINT_CLK, where the internal bus drains it.
//
// The instruction encoding, the last-word framing of a DPU's output and the
// DPU numbering (SPU0..4 = 0..4, RPU = 5) are this design's choices.
// Timing: one word per DX_CLK cycle on the front-end bus once a source has
// data and the sink has room; an instruction is taken when the front is
// idle, so the two fronts take the shared stream together.
module dxf
  import csc_rod_pkg::*;
#(
  parameter logic        SIDE       = 1'b0,   // 0 = half A, 1 = half B
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic        clk,          // DX_CLK
  input  logic        rst_n,

  // instruction stream from the HPU
  input  logic        instr_valid,
  input  logic [31:0] instr_data,
  output logic        instr_ready,

  // front-end bus: sources (DPU output FIFOs)
  input  logic [DPUS_PER_HALF-1:0]       src_valid,
  input  logic [DPUS_PER_HALF-1:0][31:0] src_data,
  input  logic [DPUS_PER_HALF-1:0]       src_last,
  output logic [DPUS_PER_HALF-1:0]       src_ready,

  // front-end bus: destinations (DPU input FIFOs)
  output logic [DPUS_PER_HALF-1:0] dst_valid,
  output logic [31:0]              dst_data,
  output logic                     dst_last,
  input  logic [DPUS_PER_HALF-1:0] dst_ready,

  // front FIFO read side, DXINT_CLK domain
  input  logic        int_clk,
  input  logic        int_rst_n,
  input  logic        out_rd_en,
  output dx_word_t    out_word,
  output logic        out_empty,

  output logic        busy,
  output logic [31:0] words_moved    // words carried on the front-end bus
);
  typedef enum logic [1:0] {S_IDLE, S_SEQ, S_WRITE, S_SKIP} state_e;
  state_e state;

  dx_instr_t                  cur;
  logic [DPUS_PER_HALF-1:0]   mask;      // sources still to serve
  logic [2:0]                 src_idx;   // source being served
  logic [11:0]                remaining;

  logic     fifo_wr_en, fifo_full;
  dx_word_t fifo_wr_word;
  logic [$clog2(FIFO_DEPTH):0] unused_wr_level, unused_rd_level;

  dx_instr_t in_i;
  assign in_i = dx_instr_t'(instr_data);

  function automatic logic [2:0] lowest(logic [DPUS_PER_HALF-1:0] m);
    for (int i = 0; i < int'(DPUS_PER_HALF); i++) if (m[i]) return 3'(i);
    return 3'd0;
  endfunction

  // ---------- combinational transfer ----------
  logic                       sink_ready, xfer, last_src;
  logic [DPUS_PER_HALF-1:0]   mask_next;

  always_comb begin
    mask_next = mask;
    mask_next[src_idx] = 1'b0;
    last_src   = (mask_next == '0);
    sink_ready = cur.dst_is_back ? !fifo_full : dst_ready[cur.dst];
    xfer       = (state == S_SEQ) && src_valid[src_idx] && sink_ready;

    src_ready = '0;
    dst_valid = '0;
    dst_data  = src_data[src_idx];
    dst_last  = src_last[src_idx] && last_src;
    fifo_wr_en   = 1'b0;
    fifo_wr_word = '0;

    if (state == S_SEQ) begin
      src_ready[src_idx] = sink_ready;
      if (cur.dst_is_back) begin
        fifo_wr_en           = xfer;
        fifo_wr_word.to_host = cur.dst[1];
        fifo_wr_word.to_back = cur.dst[0];
        fifo_wr_word.kind    = KIND_DATA;
        fifo_wr_word.data    = src_data[src_idx];
      end else begin
        dst_valid[cur.dst] = src_valid[src_idx];
      end
    end else if (state == S_WRITE) begin
      fifo_wr_en           = instr_valid && !fifo_full;
      fifo_wr_word.to_host = cur.dst[1];
      fifo_wr_word.to_back = cur.dst[0];
      fifo_wr_word.kind    = word_kind_e'(cur.src_mask[5:4]);
      fifo_wr_word.data    = instr_data;
    end

    unique case (state)
      S_IDLE:  instr_ready = 1'b1;
      S_WRITE: instr_ready = !fifo_full;
      S_SKIP:  instr_ready = 1'b1;
      default: instr_ready = 1'b0;
    endcase
  end

  assign busy = (state != S_IDLE);

  // ---------- sequencer ----------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cur         <= '0;
      mask        <= '0;
      src_idx     <= '0;
      remaining   <= '0;
      words_moved <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (instr_valid) begin
          cur <= in_i;
          if (!in_i.side[SIDE]) begin
            if (in_i.op == OP_WRITE && in_i.count != 0) begin
              remaining <= in_i.count;
              state     <= S_SKIP;
            end
          end else if (in_i.op == OP_SEQ && in_i.src_mask != '0) begin
            mask    <= in_i.src_mask;
            src_idx <= lowest(in_i.src_mask);
            state   <= S_SEQ;
          end else if (in_i.op == OP_WRITE && in_i.count != 0) begin
            remaining <= in_i.count;
            state     <= S_WRITE;
          end
        end
        S_SEQ: if (xfer) begin
          words_moved <= words_moved + 1;
          if (src_last[src_idx]) begin
            mask    <= mask_next;
            src_idx <= lowest(mask_next);
            if (last_src) state <= S_IDLE;
          end
        end
        S_WRITE: if (instr_valid && !fifo_full) begin
          remaining <= remaining - 1'b1;
          if (remaining == 12'd1) state <= S_IDLE;
        end
        S_SKIP: if (instr_valid) begin
          remaining <= remaining - 1'b1;
          if (remaining == 12'd1) state <= S_IDLE;
        end
      endcase
    end
  end

  async_fifo #(.WIDTH(DX_WORD_W), .DEPTH(FIFO_DEPTH)) u_front_fifo (
    .wr_clk  (clk),      .wr_rst_n(rst_n),
    .wr_en   (fifo_wr_en), .wr_data(fifo_wr_word),
    .wr_full (fifo_full), .wr_level(unused_wr_level),
    .rd_clk  (int_clk),  .rd_rst_n(int_rst_n),
    .rd_en   (out_rd_en), .rd_data(out_word),
    .rd_empty(out_empty), .rd_level(unused_rd_level)
  );

  // An instruction may only name one of the six DPUs of the half as destination.
  a_dst_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_SEQ && !cur.dst_is_back) |-> cur.dst < 3'(DPUS_PER_HALF))
    else $error("dxf: destination DPU index out of range");
endmodule
