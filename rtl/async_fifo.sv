// Dual-clock FIFO, used for every FIFO of the ROD data path.
//
// The document draws each Data Exchange FIFO with a write clock on one
// side and a read clock on the other (DX_CLK into the front FIFOs,
// DXINT_CLK on the internal bus, DCLK towards the S-LINK), and gives their
// depths: 1 kW in each front (DXF) and back (DXB) FPGA, 16 kW for the Host
// FIFO, 1K x 32 in an SPU's EMIF FPGA and 512 x 32 in an RPU's. How the
// crossing is built is this design's choice: binary pointers one bit wider
// than the address, exchanged between the domains in Gray code through
// two-flop synchronisers. Full and empty are therefore pessimistic by the
// two synchroniser cycles, never optimistic.
//
// Interface: push with wr_en when !wr_full; the head word is shown on
// rd_data while !rd_empty (first-word fall-through) and rd_en pops it.
// wr_level / rd_level give the fill as seen from each side.
// DEPTH must be a power of two. Each side has its own active-low reset;
// both must be asserted together to empty the FIFO.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,
  output logic [$clog2(DEPTH):0] wr_level,

  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty,
  output logic [$clog2(DEPTH):0] rd_level
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wptr, rptr;            // binary, own domain
  logic [AW:0] wgray, rgray;          // Gray, own domain
  logic [AW:0] rgray_s1, rgray_s2;    // read pointer seen by writer
  logic [AW:0] wgray_s1, wgray_s2;    // write pointer seen by reader

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] rptr_w;
  assign rptr_w   = gray2bin(rgray_s2);
  assign wr_level = wptr - rptr_w;
  assign wr_full  = (wr_level == (AW+1)'(DEPTH));

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wptr     <= '0;
      wgray    <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      if (wr_en && !wr_full) begin
        wptr  <= wptr + 1'b1;
        wgray <= bin2gray(wptr + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wptr[AW-1:0]] <= wr_data;
  end

  // ---------------- read side ----------------
  logic [AW:0] wptr_r;
  assign wptr_r   = gray2bin(wgray_s2);
  assign rd_level = wptr_r - rptr;
  assign rd_empty = (rd_level == '0);
  assign rd_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rptr     <= '0;
      rgray    <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      if (rd_en && !rd_empty) begin
        rptr  <= rptr + 1'b1;
        rgray <= bin2gray(rptr + 1'b1);
      end
    end
  end

  // Pushing into a full FIFO or popping an empty one loses or invents data.
  a_no_overflow: assert property (@(posedge wr_clk) disable iff (!wr_rst_n) !(wr_en && wr_full))
    else $error("async_fifo: write while full");
  a_no_underflow: assert property (@(posedge rd_clk) disable iff (!rd_rst_n) !(rd_en && rd_empty))
    else $error("async_fifo: read while empty");
endmodule
