// tb_dispatch_unit: decode and dispatch decisions, one instruction at a
// time: the station chosen for each class (FP1 before FP2), the stalls for a
// full ROB, a busy station and a full LSQ, and the three operand sources of
// the document (map tag 0 -> register file, tag with "+" -> ROB value, tag
// without "+" -> wait on the tag) plus the catch of a tag that is on the CDB
// in the same cycle; the walk-through's RS contents for ldf, mulf and stf.
`timescale 1ns/1ps
module tb_dispatch_unit;
  import p6_pkg::*;
  logic fq_valid = 0, flush = 0, map_rdy_a = 0, map_rdy_b = 0, rob_full = 0, lsq_full = 0;
  word_t fq_insn = 0, fq_pc = 0, rf_a = 32'hA0A0, rf_b = 32'hB0B0, rob_a = 32'hA1A1, rob_b = 32'hB1B1;
  areg_t src_a, src_b, map_reg;
  tag_t map_tag_a = 0, map_tag_b = 0, rob_tail = 3, map_tag;
  cdb_t cdb = '0;
  logic [NUM_RS-1:0] rs_busy = '0, rs_alloc;
  lsq_idx_t lsq_tail = 2;
  logic take, rob_alloc, lsq_alloc, lsq_store, map_we, stall_rob, stall_rs, stall_lsq, from_rob, from_cdb;
  rs_t rs_new;
  rob_entry_t rob_new;
  int checks = 0, failures = 0;

  dispatch_unit dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  function automatic word_t enc(opcode_t op, int rd, int ra, int rb, int imm);
    return {op, 4'(rd), 4'(ra), 4'(rb), 16'(imm)};
  endfunction

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    fq_valid = 1;
    // ldf X(r1), f1 with r1 in the register file -> LD station, V2 = [r1]
    fq_insn = enc(OP_LDF, 9, 0, 1, 'h100); fq_pc = 32'h0; #1;
    check(src_b == 1, "ldf reads r1 in slot 2");
    check(take && rs_alloc == 5'b00010 && lsq_alloc && !lsq_store, "ldf -> LD station + LSQ");
    check(rs_new.t == 3 && rs_new.t2 == 0 && rs_new.v2 == 32'hB0B0 && rs_new.imm == 32'h100 &&
          rs_new.lsq == 2, "ldf station contents");
    check(map_we && map_reg == 9 && map_tag == 3, "f1 -> ROB#3");
    check(rob_alloc && rob_new.r == 9 && rob_new.has_dest && rob_new.is_load && !rob_new.complete, "ROB entry");
    // mulf f0, f1, f2: f1 waits on ROB#1 -> T2 = 1, V1 = [f0]
    fq_insn = enc(OP_MULF, 10, 8, 9, 0); map_tag_b = 1; #1;
    check(take && rs_alloc == 5'b01000, "mulf -> FP1");
    check(rs_new.t1 == 0 && rs_new.v1 == 32'hA0A0 && rs_new.t2 == 1, "mulf waits on ROB#1");
    rs_busy[RS_FP1] = 1; #1;
    check(take && rs_alloc == 5'b10000, "mulf -> FP2 when FP1 busy");
    rs_busy[RS_FP2] = 1; #1;
    check(!take && stall_rs && rs_alloc == 0 && !map_we && !rob_alloc, "stall: both FP busy");
    rs_busy = 0;
    // ready-in-ROB: T+ -> value from the ROB
    map_rdy_b = 1; #1;
    check(take && rs_new.t2 == 0 && rs_new.v2 == 32'hB1B1 && from_rob, "value from ROB");
    map_rdy_b = 0;
    // tag on the CDB this cycle
    cdb = '{valid: 1, tag: 1, value: 32'hCDB0, exc: EXC_NONE}; #1;
    check(rs_new.t2 == 0 && rs_new.v2 == 32'hCDB0 && from_cdb, "value from CDB");
    cdb = '0; map_tag_b = 0;
    // stf f2, Z(r1): data f2 (ROB#2) in slot 1, base r1 in slot 2
    fq_insn = enc(OP_STF, 0, 10, 1, 'h200); map_tag_a = 2; #1;
    check(take && rs_alloc == 5'b00100 && lsq_alloc && lsq_store, "stf -> ST station");
    check(rs_new.t1 == 2 && rs_new.t2 == 0 && rs_new.v2 == 32'hB0B0, "stf operands");
    check(!map_we && rob_new.is_store && !rob_new.has_dest, "stf has no output register");
    lsq_full = 1; #1;
    check(!take && stall_lsq, "stall: LSQ full");
    lsq_full = 0; map_tag_a = 0;
    // addi, add, bne -> ALU
    fq_insn = enc(OP_ADDI, 1, 1, 0, 4); #1;
    check(take && rs_alloc == 5'b00001 && rs_new.v1 == 32'hA0A0 && rs_new.imm == 4 && rs_new.t2 == 0, "addi");
    fq_insn = enc(OP_BNE, 0, 1, 2, -8); fq_pc = 32'h40; #1;
    check(take && rs_alloc == 5'b00001 && rs_new.imm == 32'h38 && !map_we, "bne target");
    rob_full = 1; #1;
    check(!take && stall_rob && !rob_alloc, "stall: ROB full");
    rob_full = 0;
    // HALT: ROB only, complete at once
    fq_insn = 32'h0; #1;
    check(take && rs_alloc == 0 && rob_new.is_halt && rob_new.complete, "halt");
    flush = 1; #1;
    check(!take && !rob_alloc, "no dispatch during flush");
    flush = 0; fq_valid = 0; #1;
    check(!take, "nothing to dispatch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
