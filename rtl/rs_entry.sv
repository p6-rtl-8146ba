// rs_entry: one reservation station of the P6 core.
//
// Each station belongs to one functional unit (the document's Simple-P6 has
// five: ALU, LD, ST, FP1, FP2). Dispatch fills it with the operation, the
// destination ROB# (T), and for each operand either its value (V1/V2, with
// T1/T2 = 0) or the ROB# that will produce it. While it waits, the station
// compares T1/T2 with the CDB tag every cycle and copies CDB.V on a match.
// It may issue (S) once both operands are present, counting an operand that
// is on the CDB this very cycle as present (its value is forwarded straight
// into the issue packet). It issues when its unit can accept (fu_ready);
// the station is then free from the next cycle, i.e. during X, so a new
// instruction can be dispatched into it while the previous one executes.
// A station filled this cycle cannot issue before the next one.
// Comparing tags against the CDB, grabbing CDB.V and freeing at X are the
// document's; forwarding a same-cycle CDB value into issue is how this
// design reproduces the document's timing (an instruction issuing in the
// cycle its last operand is broadcast).
module rs_entry
  import p6_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  input  logic   alloc,
  input  rs_t    alloc_rs,
  input  cdb_t   cdb,
  input  logic   fu_ready,
  output rs_t    rs,
  output issue_t issue,
  output logic   captured     // a waiting operand was taken from the CDB
);
  rs_t  q;
  logic hit1, hit2, rdy1, rdy2, fire;

  assign hit1 = cdb.valid && q.t1 != '0 && q.t1 == cdb.tag;
  assign hit2 = cdb.valid && q.t2 != '0 && q.t2 == cdb.tag;
  assign rdy1 = (q.t1 == '0) || hit1;
  assign rdy2 = (q.t2 == '0) || hit2;
  assign fire = q.busy && rdy1 && rdy2 && fu_ready && !flush;

  always_comb begin
    issue       = '0;
    issue.valid = fire;
    issue.op    = q.op;
    issue.t     = q.t;
    issue.v1    = hit1 ? cdb.value : q.v1;
    issue.v2    = hit2 ? cdb.value : q.v2;
    issue.imm   = q.imm;
    issue.lsq   = q.lsq;
  end

  assign rs       = q;
  assign captured = q.busy && (hit1 || hit2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (flush) begin
      q.busy <= 1'b0;
    end else if (alloc) begin
      q      <= alloc_rs;
      q.busy <= 1'b1;
    end else if (fire) begin
      q.busy <= 1'b0;
    end else if (q.busy) begin
      if (hit1) begin
        q.v1 <= cdb.value;
        q.t1 <= '0;
      end
      if (hit2) begin
        q.v2 <= cdb.value;
        q.t2 <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (alloc) assert (!q.busy || flush);
  end
endmodule
