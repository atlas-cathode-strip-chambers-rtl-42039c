// SCA controller: cell bookkeeping for the chamber's switched capacitor
// arrays (SCA) and the queue of timeslices awaiting digitisation.
//
// Each SCA channel has 144 capacitor cells. A sample is written into one
// cell per sample_en; the write pointer steps round the array and skips
// every cell that holds a timeslice still awaiting readout, so about 70
// cells hold the trigger-latency pipeline and the rest form the reserve.
// On an L1A the n_ts consecutive timeslices written LATENCY samples before
// the trigger are reserved and queued for readout. A timeslice that two
// triggers share is queued only once: if its cell is already reserved it is
// not queued again (counted in shared_ts). The first timeslice of every
// trigger is flagged, also when it was queued by an earlier trigger and is
// still waiting; the flag travels with the cell when it leaves the queue.
// A readout engine takes one timeslice at a time (ro_valid/ro_ready) and
// reports with ro_done that the cell has been digitised, which frees it.
// At most MAX_PENDING (32) timeslices wait at once.
//
// fault (sticky) is raised when the capacitor reserve is exhausted: when a
// trigger arrives while the cells still reserved leave fewer free cells
// than the latency pipeline plus that trigger's timeslices need, or when
// the readout queue is full.
//
// Timing: clocked by the bunch-crossing clock. An L1A is noted at once
// (which timeslices it wants, and how many) in a queue of TRIG_QUEUE
// triggers, and processed one timeslice per clock; an L1A that finds that
// queue full is not served and is counted in l1_overrun. With the ATLAS
// trigger rule of four BCs of dead time after each L1A, four timeslices
// per trigger are processed before the next L1A can come.
//
// From the document: 144 cells, ~70 for latency, at most 32 awaiting
// readout, read-once sharing, the first-timeslice flag and the fault on an
// exhausted reserve. The skipping write pointer, the history of written
// cells, the one-per-clock processing and the exact fault rule are this
// design's own.
module sca_controller
  import csc_rod_pkg::*;
#(
  parameter int unsigned CELLS       = 144,
  parameter int unsigned LATENCY     = 70,
  parameter int unsigned MAX_PENDING = 32,
  parameter int unsigned TRIG_QUEUE  = 4,     // L1As waiting to be processed
  parameter int unsigned HIST_DEPTH  = 256    // > LATENCY + 15 * (TRIG_QUEUE + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample_en,    // a sample is written into wr_cell now
  input  logic       l1a,
  input  logic [3:0] n_ts,         // timeslices read out per trigger, 1..15

  output logic [7:0] wr_cell,      // cell receiving the current sample

  output logic       ro_valid,
  output sca_ts_t    ro_ts,
  input  logic       ro_ready,
  input  logic       ro_done,      // the cell taken last has been digitised

  output logic [7:0]  reserved_count,
  output logic        fault,
  output logic [31:0] l1_accepted,
  output logic [31:0] shared_ts,
  output logic [31:0] l1_overrun
);
  localparam int unsigned HW = $clog2(HIST_DEPTH);
  localparam int unsigned QW = $clog2(MAX_PENDING);

  logic [CELLS-1:0] reserved, first_flag;
  logic [7:0]       hist [HIST_DEPTH];
  logic [HW-1:0]    hptr;

  // readout queue of cell addresses
  logic [7:0]  queue [MAX_PENDING];
  logic [QW:0] q_wr, q_rd;
  logic        q_empty, q_full;
  assign q_empty = (q_wr == q_rd);
  assign q_full  = (q_wr - q_rd) == (QW+1)'(MAX_PENDING);

  // triggers waiting: {first history index, number of timeslices}
  logic [HW+3:0] trig_q [TRIG_QUEUE];
  logic [$clog2(TRIG_QUEUE):0] t_wr, t_rd;
  logic          t_empty, t_full;
  assign t_empty = (t_wr == t_rd);
  assign t_full  = (t_wr - t_rd) == ($clog2(TRIG_QUEUE)+1)'(TRIG_QUEUE);

  // trigger processing
  logic [3:0]    ts_left;
  logic [HW-1:0] ts_idx;
  logic          ts_first;
  logic [7:0]    ts_cell;
  assign ts_cell = hist[ts_idx];

  logic       ro_busy;
  logic [7:0] ro_cell;

  // next free cell after wr_cell
  logic [7:0] next_free;
  always_comb begin
    logic [8:0] c;
    logic       found;
    next_free = wr_cell;
    found     = 1'b0;
    c         = {1'b0, wr_cell};
    for (int k = 1; k <= int'(CELLS); k++) begin
      c = (c == 9'(CELLS - 1)) ? 9'd0 : c + 9'd1;
      if (!found && !reserved[c[7:0]]) begin
        next_free = c[7:0];
        found     = 1'b1;
      end
    end
  end

  assign ro_valid = !q_empty && !ro_busy;
  assign ro_ts    = '{first: first_flag[queue[q_rd[QW-1:0]]], cell_addr: queue[q_rd[QW-1:0]]};

  always_comb begin
    reserved_count = '0;
    for (int i = 0; i < int'(CELLS); i++) reserved_count += 8'(reserved[i]);
  end

  always_ff @(posedge clk) begin
    if (sample_en) hist[hptr] <= wr_cell;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_cell     <= '0;
      hptr        <= '0;
      reserved    <= '0;
      first_flag  <= '0;
      q_wr        <= '0;
      q_rd        <= '0;
      t_wr        <= '0;
      t_rd        <= '0;
      ts_left     <= '0;
      ts_idx      <= '0;
      ts_first    <= 1'b0;
      ro_busy     <= 1'b0;
      ro_cell     <= '0;
      fault       <= 1'b0;
      l1_accepted <= '0;
      shared_ts   <= '0;
      l1_overrun  <= '0;
    end else begin
      if (sample_en) begin
        hptr    <= hptr + 1'b1;
        wr_cell <= next_free;
      end

      // readout engine
      if (ro_valid && ro_ready) begin
        ro_busy <= 1'b1;
        ro_cell <= queue[q_rd[QW-1:0]];
        first_flag[queue[q_rd[QW-1:0]]] <= 1'b0;
        q_rd    <= q_rd + 1'b1;
      end else if (ro_busy && ro_done) begin
        ro_busy           <= 1'b0;
        reserved[ro_cell] <= 1'b0;
      end

      // new trigger: note which timeslices it wants
      if (l1a && n_ts != 0) begin
        if (t_full) begin
          l1_overrun <= l1_overrun + 1;
        end else begin
          trig_q[t_wr[$clog2(TRIG_QUEUE)-1:0]] <= {hptr - HW'(LATENCY), n_ts};
          t_wr        <= t_wr + 1'b1;
          l1_accepted <= l1_accepted + 1;
        end
      end

      // start the next waiting trigger
      if (ts_left == 0 && !t_empty) begin
        {ts_idx, ts_left} <= trig_q[t_rd[$clog2(TRIG_QUEUE)-1:0]];
        ts_first <= 1'b1;
        t_rd     <= t_rd + 1'b1;
        if (32'(reserved_count) + LATENCY + 32'(trig_q[t_rd[$clog2(TRIG_QUEUE)-1:0]][3:0]) > CELLS)
          fault <= 1'b1;
      end

      // one timeslice of the trigger per clock
      if (ts_left != 0) begin
        ts_left  <= ts_left - 1'b1;
        ts_idx   <= ts_idx + 1'b1;
        ts_first <= 1'b0;
        if (ts_first) first_flag[ts_cell] <= 1'b1;
        if (reserved[ts_cell]) begin
          shared_ts <= shared_ts + 1;
        end else if (q_full) begin
          fault <= 1'b1;
        end else begin
          reserved[ts_cell]     <= 1'b1;
          queue[q_wr[QW-1:0]]   <= ts_cell;
          q_wr                  <= q_wr + 1'b1;
        end
      end
    end
  end

  a_latency_fits: assert property (@(posedge clk)
    1'b1 |-> (LATENCY + 15 * (TRIG_QUEUE + 1) < HIST_DEPTH) && (LATENCY < CELLS))
    else $error("sca_controller: HIST_DEPTH too small for LATENCY and TRIG_QUEUE");
endmodule
