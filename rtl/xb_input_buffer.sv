// Input buffer of an SPU's expansion-bus (XB) FPGA.
//
// Raw chamber data reach an SPU from the Interconnect as 25-bit words on
// its XGEN pins, clocked by SCLK. The XB FPGA reformats each word to 32
// bits and writes it into a 1K x 32 on-chip dual-port RAM; a write address
// generator steps through the RAM on the SCLK side and a read address
// generator on the DSP side, from which the DSP moves the words into its
// input buffer over the XB. The RAM and its two address generators are
// built as one dual-clock FIFO (async_fifo).
//
// Reformatting (this design's own; the document names the step but not
// the format): bits [24:0] carry the interconnect word unchanged, bits
// [30:25] are zero and bit 31 is set on the first word written after one
// or more words were lost because the RAM was full. Lost words are counted
// in dropped.
//
// Interface: ic_valid/ic_data on SCLK (no back-pressure: the interconnect
// streams at a fixed rate), xb_rd_en/xb_rd_data/xb_empty on the DSP clock.
module xb_input_buffer #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic        sclk,
  input  logic        s_rst_n,
  input  logic        ic_valid,
  input  logic [24:0] ic_data,

  input  logic        dsp_clk,
  input  logic        d_rst_n,
  input  logic        xb_rd_en,
  output logic [31:0] xb_rd_data,
  output logic        xb_empty,
  output logic [$clog2(DEPTH):0] xb_level,

  output logic [31:0] dropped
);
  logic full, lost;
  logic [$clog2(DEPTH):0] unused_wl;

  always_ff @(posedge sclk or negedge s_rst_n) begin
    if (!s_rst_n) begin
      lost    <= 1'b0;
      dropped <= '0;
    end else if (ic_valid) begin
      if (full) begin
        lost    <= 1'b1;
        dropped <= dropped + 1;
      end else begin
        lost    <= 1'b0;
      end
    end
  end

  async_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_dpram (
    .wr_clk(sclk), .wr_rst_n(s_rst_n),
    .wr_en(ic_valid && !full), .wr_data({lost, 6'b0, ic_data}),
    .wr_full(full), .wr_level(unused_wl),
    .rd_clk(dsp_clk), .rd_rst_n(d_rst_n),
    .rd_en(xb_rd_en), .rd_data(xb_rd_data),
    .rd_empty(xb_empty), .rd_level(xb_level)
  );
endmodule
