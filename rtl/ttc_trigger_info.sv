// Trigger-information recorder of the TTC FPGA.
//
// The TTC FPGA on the ROD receives the ATLAS Timing, Trigger and Control
// signals from the crate's TIM and gives the HPU a stream of trigger
// information: trigger type, arrival time, L1ID and BCID. This module
// keeps a bunch counter (reset by BCR, wrapping after BC_PER_ORBIT), an
// event counter (L1ID, reset by ECR) and a free-running time counter, and
// on every L1A pushes one record (csc_rod_pkg::trig_info_t) into a FIFO
// that the HPU reads. A record that finds the FIFO full is dropped and
// counted in lost.
//
// The four fields are the document's; their widths, the orbit length of
// 3564 bunch crossings, the ECR/BCR behaviour and sampling the trigger type
// together with the L1A are this design's assumptions (the LHC and ATLAS
// TTC conventions). The L1ID of a trigger is the number of L1As since the
// last ECR, starting at 0.
// Timing: one clock per bunch crossing; a record is visible at the FIFO
// output one clock after its L1A.
module ttc_trigger_info
  import csc_rod_pkg::*;
#(
  parameter int unsigned BC_PER_ORBIT = 3564,
  parameter int unsigned FIFO_DEPTH   = 64
) (
  input  logic       clk,        // TCLK, one cycle per bunch crossing
  input  logic       rst_n,
  input  logic       bcr,        // bunch counter reset
  input  logic       ecr,        // event counter reset
  input  logic       l1a,
  input  logic [7:0] trig_type,

  input  logic       rd_en,
  output trig_info_t rd_info,
  output logic       empty,
  output logic [31:0] lost
);
  logic [11:0] bcid;
  logic [23:0] l1id;
  logic [31:0] now;
  logic        full;
  logic [$clog2(FIFO_DEPTH):0] unused_level;
  trig_info_t  rec;

  assign rec = '{trig_type: trig_type, l1id: l1id, bcid: bcid, arrival: now};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcid <= '0;
      l1id <= '0;
      now  <= '0;
      lost <= '0;
    end else begin
      now  <= now + 1;
      if (bcr || bcid == 12'(BC_PER_ORBIT - 1)) bcid <= '0;
      else                                      bcid <= bcid + 1'b1;
      if (ecr)      l1id <= '0;
      else if (l1a) l1id <= l1id + 1'b1;
      if (l1a && full) lost <= lost + 1;
    end
  end

  sync_fifo #(.WIDTH($bits(trig_info_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk), .rst_n(rst_n),
    .wr_en(l1a), .wr_data(rec), .full(full),
    .rd_en(rd_en), .rd_data(rd_info), .empty(empty), .level(unused_level)
  );
endmodule
