// dispatch_unit: the D stage of the P6 core (decode and dispatch).
//
// Purely combinational. It decodes the instruction in the fetch register and
// decides whether it can be dispatched this cycle: it needs a free ROB entry,
// a free reservation station of its class (ALU, LD, ST, or either FP
// station, FP1 first) and, for a load or store, a free LSQ slot. If one is
// missing it stalls ("structural hazard? stall"). Otherwise it
//  - allocates the ROB entry at the tail and records the output register R;
//  - fills the station with the op, T = the new ROB#, and for each source
//    register the map-table lookup result: tag 0 -> the register-file value;
//    tag with ready-in-ROB (+) -> the value from the ROB; otherwise the tag,
//    unless that tag is on the CDB in this very cycle, in which case the CDB
//    value is taken instead (otherwise it would never be seen again);
//  - sets the destination's map-table entry to the new ROB#, "+" clear;
//  - allocates an LSQ slot for a load or store.
// A HALT needs no station: its ROB entry is complete from the start.
// Operand slots follow the document's tables: for LDF the base register is
// in slot 2, for STF the data is in slot 1 and the base in slot 2.
// The sequence of dispatch steps is the document's; the CDB catch at
// dispatch, the FP1-before-FP2 choice and the encoding are this design's.
module dispatch_unit
  import p6_pkg::*;
(
  input  logic          fq_valid,
  input  word_t         fq_insn,
  input  word_t         fq_pc,
  input  logic          flush,
  // map table lookups
  output areg_t         src_a,
  output areg_t         src_b,
  input  tag_t          map_tag_a,
  input  logic          map_rdy_a,
  input  tag_t          map_tag_b,
  input  logic          map_rdy_b,
  // register file and ROB values
  input  word_t         rf_a,
  input  word_t         rf_b,
  input  word_t         rob_a,
  input  word_t         rob_b,
  input  cdb_t          cdb,
  // structural state
  input  logic [NUM_RS-1:0] rs_busy,
  input  logic          rob_full,
  input  tag_t          rob_tail,
  input  logic          lsq_full,
  input  lsq_idx_t      lsq_tail,
  // outputs
  output logic          take,
  output logic [NUM_RS-1:0] rs_alloc,
  output rs_t           rs_new,
  output logic          rob_alloc,
  output rob_entry_t    rob_new,
  output logic          lsq_alloc,
  output logic          lsq_store,
  output logic          map_we,
  output areg_t         map_reg,
  output tag_t          map_tag,
  output logic          stall_rob,
  output logic          stall_rs,
  output logic          stall_lsq,
  output logic          from_rob,
  output logic          from_cdb
);
  dec_t d;
  logic need_lsq, rs_ok;
  logic [NUM_RS-1:0] pick;

  // decode
  always_comb begin
    d          = '0;
    d.op       = opcode_t'(fq_insn[31:28]);
    d.rd       = fq_insn[27:24];
    d.ra       = fq_insn[23:20];
    d.rb       = fq_insn[19:16];
    d.imm      = {{16{fq_insn[15]}}, fq_insn[15:0]};
    unique case (d.op)
      OP_ADD, OP_SUB: begin d.fu = FU_ALU; d.has_dest = 1'b1; d.use_a = 1'b1; d.use_b = 1'b1; end
      OP_ADDI:        begin d.fu = FU_ALU; d.has_dest = 1'b1; d.use_a = 1'b1; end
      OP_BNE:         begin d.fu = FU_ALU; d.use_a = 1'b1; d.use_b = 1'b1; end
      OP_MULF:        begin d.fu = FU_FP;  d.has_dest = 1'b1; d.use_a = 1'b1; d.use_b = 1'b1; end
      OP_LDF:         begin d.fu = FU_LD;  d.has_dest = 1'b1; d.use_b = 1'b1; end
      OP_STF:         begin d.fu = FU_ST;  d.use_a = 1'b1; d.use_b = 1'b1; end
      default:        begin d.op = OP_HALT; d.fu = FU_NONE; end
    endcase
  end

  assign src_a = d.ra;
  assign src_b = d.rb;

  // pick a reservation station
  always_comb begin
    pick = '0;
    unique case (d.fu)
      FU_ALU: pick[RS_ALU] = !rs_busy[RS_ALU];
      FU_LD:  pick[RS_LD]  = !rs_busy[RS_LD];
      FU_ST:  pick[RS_ST]  = !rs_busy[RS_ST];
      FU_FP:  if (!rs_busy[RS_FP1]) pick[RS_FP1] = 1'b1;
              else                  pick[RS_FP2] = !rs_busy[RS_FP2];
      default: ;
    endcase
  end

  assign need_lsq  = (d.fu == FU_LD) || (d.fu == FU_ST);
  assign rs_ok     = (d.fu == FU_NONE) || (pick != '0);
  assign take      = fq_valid && !flush && !rob_full && rs_ok && !(need_lsq && lsq_full);
  assign stall_rob = fq_valid && !flush && rob_full;
  assign stall_rs  = fq_valid && !flush && !rs_ok;
  assign stall_lsq = fq_valid && !flush && need_lsq && lsq_full;

  assign rs_alloc  = take ? pick : '0;
  assign rob_alloc = take;
  assign lsq_alloc = take && need_lsq;
  assign lsq_store = (d.fu == FU_ST);
  assign map_we    = take && d.has_dest;
  assign map_reg   = d.rd;
  assign map_tag   = rob_tail;

  // operand read: regfile, ROB (+), CDB, or wait on a tag
  always_comb begin
    from_rob = 1'b0;
    from_cdb = 1'b0;
    rs_new      = '0;
    rs_new.busy = 1'b1;
    rs_new.op   = d.op;
    rs_new.t    = rob_tail;
    rs_new.imm  = (d.op == OP_BNE) ? fq_pc + d.imm : d.imm;
    rs_new.lsq  = lsq_tail;
    if (d.use_a) begin
      if (map_tag_a == '0)      rs_new.v1 = rf_a;
      else if (map_rdy_a)       begin rs_new.v1 = rob_a; from_rob = take; end
      else if (cdb.valid && cdb.tag == map_tag_a)
                                begin rs_new.v1 = cdb.value; from_cdb = take; end
      else                      rs_new.t1 = map_tag_a;
    end
    if (d.use_b) begin
      if (map_tag_b == '0)      rs_new.v2 = rf_b;
      else if (map_rdy_b)       begin rs_new.v2 = rob_b; from_rob = take; end
      else if (cdb.valid && cdb.tag == map_tag_b)
                                begin rs_new.v2 = cdb.value; from_cdb = take; end
      else                      rs_new.t2 = map_tag_b;
    end
  end

  // ROB entry
  always_comb begin
    rob_new          = '0;
    rob_new.valid    = 1'b1;
    rob_new.complete = (d.op == OP_HALT);
    rob_new.has_dest = d.has_dest;
    rob_new.r        = d.has_dest ? d.rd : '0;
    rob_new.exc      = EXC_NONE;
    rob_new.is_load  = (d.fu == FU_LD);
    rob_new.is_store = (d.fu == FU_ST);
    rob_new.is_halt  = (d.op == OP_HALT);
    rob_new.pc       = fq_pc;
  end
endmodule
