// Shared types and constants of the CSC ROD readout logic.
//
// The Data Exchange (DX) moves 32-bit words between the DPUs of a
// half-ROD, the Host FIFO and the Readout Link (ROL). Every word that
// leaves a front FPGA towards the back end carries a small tag saying what
// kind of word it is and where it goes. The HPU drives the DX with an
// instruction stream; the encoding of those instruction words is this
// design's own (the document gives only what the instructions do and how
// many words each costs), and is defined here.
//
// The two S-LINK control words 0xB0F00000 (beginning of fragment) and
// 0xE0F00000 (end of fragment) are the document's numbers.
package csc_rod_pkg;

  // DPUs per half-ROD: SPU0..SPU4 on indices 0..4, the RPU on index 5.
  localparam int unsigned DPUS_PER_HALF = 6;
  localparam int unsigned RPU_INDEX     = 5;
  localparam int unsigned SPUS_PER_HALF = 5;

  localparam logic [31:0] BOF_CTRL_WORD = 32'hB0F0_0000;
  localparam logic [31:0] EOF_CTRL_WORD = 32'hE0F0_0000;

  // Payload of a command word that hands the DX internal bus to the
  // other half-ROD.
  localparam logic [31:0] CMD_RELEASE_BUS = 32'h0000_0001;

  typedef enum logic [1:0] {
    KIND_DATA = 2'd0,   // event data or leader/trailer words
    KIND_CTRL = 2'd1,   // S-LINK control word
    KIND_CMD  = 2'd2    // command to the back end (not forwarded)
  } word_kind_e;

  // One word in a front FIFO / on the DX internal bus.
  typedef struct packed {
    logic       to_host;   // copy into the Host FIFO (captured-data readback)
    logic       to_back;   // send to the back end (ROL)
    word_kind_e kind;
    logic [31:0] data;
  } dx_word_t;             // 36 bits

  localparam int unsigned DX_WORD_W = $bits(dx_word_t);

  // Instruction words (bits [31:28] opcode).
  typedef enum logic [3:0] {
    OP_NOP   = 4'h0,
    OP_SEQ   = 4'h1,  // run front sequence: sources -> destination
    OP_WRITE = 4'h2   // HPU words follow, sent to the back end
  } dx_op_e;

  // OP_SEQ:   [27:26] side mask (bit 0 = A, bit 1 = B)
  //           [25:20] source mask, DPU 0..5, served in ascending order
  //           [19]    destination is the back end side (else a DPU)
  //           [18:16] destination DPU index        (when [19] = 0)
  //           [17]    to_host, [16] to_back         (when [19] = 1)
  // OP_WRITE: [27:26] side mask
  //           [25:24] word kind of the following words
  //           [17]    to_host, [16] to_back
  //           [11:0]  number N of words that follow the instruction
  typedef struct packed {
    dx_op_e      op;
    logic [1:0]  side;
    logic [5:0]  src_mask;
    logic        dst_is_back;
    logic [2:0]  dst;
    logic [3:0]  reserved;
    logic [11:0] count;
  } dx_instr_t;

  function automatic logic [31:0] instr_seq(logic [1:0] side, logic [5:0] src_mask,
                                            logic dst_is_back, logic [2:0] dst);
    dx_instr_t i;
    i = '0;
    i.op = OP_SEQ; i.side = side; i.src_mask = src_mask;
    i.dst_is_back = dst_is_back; i.dst = dst;
    return i;
  endfunction

  function automatic logic [31:0] instr_write(logic [1:0] side, word_kind_e kind,
                                              logic to_host, logic to_back,
                                              logic [11:0] count);
    dx_instr_t i;
    i = '0;
    i.op = OP_WRITE; i.side = side; i.src_mask = {kind, 4'b0000};
    i.dst = {1'b0, to_host, to_back}; i.count = count;
    return i;
  endfunction

  // SCA readout request: one timeslice (SCA cell) to be digitised.
  typedef struct packed {
    logic       first;     // first timeslice of a trigger
    logic [7:0] cell_addr;
  } sca_ts_t;

  // Record the TTC FPGA keeps per L1A.
  typedef struct packed {
    logic [7:0]  trig_type;
    logic [23:0] l1id;
    logic [11:0] bcid;
    logic [31:0] arrival;
  } trig_info_t;            // 76 bits

endpackage
