// p6_pkg: shared sizes, types and the instruction encoding of the P6-style
// out-of-order core (Tomasulo's algorithm with a re-order buffer).
//
// Tags name ROB entries. Tag 0 is reserved and means "no tag": in the map
// table it says the value is in the register file, in a reservation station
// it says the operand value is present. ROB entries are therefore numbered
// 1..ROB_DEPTH, as in the document's tables. The reservation-station mix
// (1 ALU, 1 load, 1 store, 2 three-cycle FP) is the document's; the word
// size, register count, ROB/LSQ depth and the instruction encoding are this
// design's own choices.
//
// Instruction word (this design's encoding):
//   [31:28] opcode  [27:24] rd  [23:20] ra  [19:16] rb  [15:0] imm (signed)
//   ADD  rd = ra + rb          SUB  rd = ra - rb        ADDI rd = ra + imm
//   MULF rd = ra *fp32 rb      LDF  rd = M[rb + imm]    STF  M[rb + imm] = ra
//   BNE  if (ra != rb) pc = pc + imm (byte offset)      HALT stop
// Registers 0..7 are r0..r7 and 8..15 are f0..f7; all are ordinary
// 32-bit registers.
package p6_pkg;

  localparam int unsigned XLEN      = 32;
  localparam int unsigned NUM_AREGS = 16;
  localparam int unsigned AREG_W    = $clog2(NUM_AREGS);
  localparam int unsigned ROB_DEPTH = 7;                    // entries 1..7
  localparam int unsigned TAG_W     = $clog2(ROB_DEPTH + 1);
  localparam int unsigned LSQ_DEPTH = 4;
  localparam int unsigned LSQ_W     = $clog2(LSQ_DEPTH);
  localparam int unsigned FP_LAT    = 3;                    // X cycles of mulf
  localparam int unsigned NUM_RS    = 5;                    // ALU, LD, ST, FP1, FP2

  // Reservation station numbers (index into the RS array).
  localparam int unsigned RS_ALU = 0;
  localparam int unsigned RS_LD  = 1;
  localparam int unsigned RS_ST  = 2;
  localparam int unsigned RS_FP1 = 3;
  localparam int unsigned RS_FP2 = 4;

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [AREG_W-1:0] areg_t;
  typedef logic [LSQ_W-1:0]  lsq_idx_t;

  typedef enum logic [3:0] {
    OP_HALT = 4'd0,
    OP_ADD  = 4'd1,
    OP_SUB  = 4'd2,
    OP_ADDI = 4'd3,
    OP_MULF = 4'd4,
    OP_LDF  = 4'd5,
    OP_STF  = 4'd6,
    OP_BNE  = 4'd7
  } opcode_t;

  typedef enum logic [2:0] {
    FU_NONE = 3'd0,
    FU_ALU  = 3'd1,
    FU_LD   = 3'd2,
    FU_ST   = 3'd3,
    FU_FP   = 3'd4
  } fu_class_t;

  // Result status carried with a completion.
  typedef enum logic [1:0] {
    EXC_NONE       = 2'd0,
    EXC_PAGE_FAULT = 2'd1,   // load/store touched a non-present page
    EXC_TAKEN      = 2'd2    // branch taken: value is the target, refetch
  } exc_t;

  // Decoded instruction.
  typedef struct packed {
    opcode_t   op;
    fu_class_t fu;
    logic      has_dest;
    areg_t     rd;
    logic      use_a;      // operand slot 1 reads register ra
    areg_t     ra;
    logic      use_b;      // operand slot 2 reads register rb
    areg_t     rb;
    word_t     imm;        // sign-extended immediate
  } dec_t;

  // Common data bus.
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t value;
    exc_t  exc;
  } cdb_t;

  // One reservation station (fields named as in the document's tables).
  typedef struct packed {
    logic     busy;
    opcode_t  op;
    tag_t     t;       // destination ROB#
    tag_t     t1;      // ROB# still awaited for V1 (0 = V1 valid)
    tag_t     t2;
    word_t    v1;
    word_t    v2;
    word_t    imm;     // immediate; for BNE the branch target
    lsq_idx_t lsq;     // LSQ slot of a load or store
  } rs_t;

  // Packet handed from a reservation station to its functional unit (S -> X).
  typedef struct packed {
    logic     valid;
    opcode_t  op;
    tag_t     t;
    word_t    v1;
    word_t    v2;
    word_t    imm;
    lsq_idx_t lsq;
  } issue_t;

  // Functional-unit result waiting for the CDB (C stage).
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t value;
    exc_t  exc;
  } result_t;

  // One re-order buffer entry.
  typedef struct packed {
    logic    valid;
    logic    complete;
    logic    has_dest;
    areg_t   r;        // output register (R)
    word_t   v;        // output value (V); fault address or branch target
    exc_t    exc;
    logic    is_load;
    logic    is_store;
    logic    is_halt;
    word_t   pc;
  } rob_entry_t;

  // Per-cycle event strobes brought out of the core for counting.
  typedef struct packed {
    logic dispatch;
    logic stall_rob_full;
    logic stall_rs_full;
    logic stall_lsq_full;
    logic src_from_rob;      // a source was read from the ROB (T+)
    logic src_from_cdb;      // a source was caught on the CDB at dispatch
    logic rs_cdb_capture;    // a waiting RS grabbed CDB.V
    logic cdb_conflict;      // more than one FU wanted the CDB
    logic retire;
    logic retire_stall;      // head valid but not complete
    logic store_commit;
    logic load_forward;
    logic flush_fault;
    logic flush_order;
    logic flush_branch;
    logic flush_irq;         // an interrupt was taken
  } events_t;

endpackage
