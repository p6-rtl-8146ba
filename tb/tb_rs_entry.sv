// tb_rs_entry: a reservation station waiting on two tags: it must catch
// CDB.V for each, issue in the same cycle as its last operand is broadcast
// (value forwarded), not issue while the unit is busy, free itself after
// issuing, ignore other tags, and clear on flush.
`timescale 1ns/1ps
module tb_rs_entry;
  import p6_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, alloc = 0, fu_ready = 1, captured;
  rs_t alloc_rs = '0, rs;
  cdb_t cdb = '0;
  issue_t issue;
  int checks = 0, failures = 0;

  rs_entry dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  task automatic step();
    @(posedge clk); #1; alloc = 0; flush = 0; cdb = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; #1;
    check(!rs.busy && !issue.valid, "reset empty");
    // stf-like: waits on T1 = 2, V2 present
    alloc = 1;
    alloc_rs = '{busy: 1, op: OP_STF, t: 3, t1: 2, t2: 0, v1: 0, v2: 32'h1234, imm: 32'h200, lsq: 1};
    #1 check(!issue.valid, "no issue in the dispatch cycle");
    step();
    check(rs.busy && !issue.valid, "waiting");
    cdb = '{valid: 1, tag: 5, value: 32'hDEAD, exc: EXC_NONE}; #1;
    check(!issue.valid && !captured, "other tag ignored");
    step();
    cdb = '{valid: 1, tag: 2, value: 32'hF2F2, exc: EXC_NONE}; #1;
    check(issue.valid && issue.v1 == 32'hF2F2 && issue.v2 == 32'h1234 && issue.t == 3 &&
          issue.imm == 32'h200 && issue.lsq == 1 && captured, "issue with CDB value in same cycle");
    step();
    check(!rs.busy, "freed after issue");
    // mulf-like: waits on T2 = 5 while unit busy
    alloc = 1;
    alloc_rs = '{busy: 1, op: OP_MULF, t: 6, t1: 0, t2: 5, v1: 32'h3F80_0000, v2: 0, imm: 0, lsq: 0};
    step();
    fu_ready = 0;
    cdb = '{valid: 1, tag: 5, value: 32'h4000_0000, exc: EXC_NONE}; #1;
    check(!issue.valid, "no issue while unit busy");
    step();
    check(rs.busy && rs.t2 == 0 && rs.v2 == 32'h4000_0000, "V2 grabbed from CDB");
    fu_ready = 1; #1;
    check(issue.valid && issue.v2 == 32'h4000_0000, "issue once unit free");
    step();
    // two tags, both arrive on separate cycles
    alloc = 1;
    alloc_rs = '{busy: 1, op: OP_ADD, t: 7, t1: 1, t2: 4, v1: 0, v2: 0, imm: 0, lsq: 0};
    step();
    cdb = '{valid: 1, tag: 4, value: 32'd40, exc: EXC_NONE}; #1 check(!issue.valid, "half ready");
    step();
    cdb = '{valid: 1, tag: 1, value: 32'd10, exc: EXC_NONE}; #1;
    check(issue.valid && issue.v1 == 10 && issue.v2 == 40, "both operands");
    step();
    // flush
    alloc = 1;
    alloc_rs = '{busy: 1, op: OP_ADD, t: 1, t1: 2, t2: 0, v1: 0, v2: 0, imm: 0, lsq: 0};
    step();
    flush = 1; step();
    check(!rs.busy, "flush clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
