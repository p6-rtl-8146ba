// tb_rob: directed and random tests of the re-order buffer: allocation
// numbers 1..7 with wrap-around, full detection, completion by CDB and by the
// store port, in-order head, value read ports, violation marks, and both
// kinds of flush (keep head / step past the retiring head). Random phase:
// allocate, complete out of order and retire in order against a model queue.
`timescale 1ns/1ps
module tb_rob;
  import p6_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, alloc = 0, st_done = 0, retire = 0, full, empty, head_viol;
  rob_entry_t alloc_entry = '0, head;
  tag_t alloc_tag, st_tag = 0, rtag_a = 0, rtag_b = 0, head_tag;
  exc_t st_exc = EXC_NONE;
  word_t st_addr = 0, rval_a, rval_b;
  cdb_t cdb = '0;
  logic [ROB_DEPTH:1] viol_set = '0;
  int checks = 0, failures = 0;

  rob dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic step();
    @(posedge clk); #1;
    alloc = 0; st_done = 0; retire = 0; flush = 0; cdb = '0; viol_set = '0;
  endtask

  function automatic rob_entry_t mk(areg_t r, word_t pc);
    rob_entry_t e = '0;
    e.valid = 1; e.has_dest = 1; e.r = r; e.pc = pc;
    return e;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    tag_t q [$];
    repeat (2) @(negedge clk);
    rst_n = 1; #1;
    check(empty && !full && alloc_tag == 1 && head_tag == 1, "reset state");
    // fill all seven entries
    for (int i = 1; i <= ROB_DEPTH; i++) begin
      check(alloc_tag == tag_t'(i), $sformatf("alloc tag %0d exp %0d", alloc_tag, i));
      alloc = 1; alloc_entry = mk(areg_t'(i), word_t'(i * 4)); step();
    end
    check(full, "full after 7");
    check(head.valid && !head.complete && head.r == 1, "head is entry 1");
    // complete #3 and #1 by CDB, #2 by store port
    cdb = '{valid: 1, tag: 3, value: 32'h33, exc: EXC_NONE}; step();
    cdb = '{valid: 1, tag: 1, value: 32'h11, exc: EXC_NONE}; st_done = 1; st_tag = 2; st_exc = EXC_NONE; st_addr = 32'h200; step();
    rtag_a = 3; rtag_b = 1; #1;
    check(rval_a == 32'h33 && rval_b == 32'h11, "read ports");
    check(head.complete && head.v == 32'h11, "head complete");
    viol_set[2] = 1; retire = 1; step();
    check(head_tag == 2 && head.complete && head_viol && head.v == 32'h200, "entry 2 complete, marked");
    check(!full, "not full after retire");
    // wrap: allocate entry 1 again
    check(alloc_tag == 1, "tail wrapped to 1");
    alloc = 1; alloc_entry = mk(5, 32'h40); step();
    check(full, "full again");
    // flush keeping head (fault at head 2)
    flush = 1; step();
    check(empty && head_tag == 2 && alloc_tag == 2 && !head.valid && !head_viol, "flush keeps head");
    // allocate two, complete first, branch-style flush with retire
    alloc = 1; alloc_entry = mk(1, 0); step();
    alloc = 1; alloc_entry = mk(2, 4); step();
    cdb = '{valid: 1, tag: 2, value: 32'h80, exc: EXC_TAKEN}; step();
    check(head.exc == EXC_TAKEN && head.v == 32'h80, "branch status stored");
    flush = 1; retire = 1; step();
    check(empty && head_tag == 3 && alloc_tag == 3, "flush past retiring head");
    // random: allocate / complete / retire in order
    for (int n = 0; n < 3000; n++) begin
      if (!full && $urandom_range(0, 2) != 0) begin
        alloc = 1; alloc_entry = mk(areg_t'($urandom), $urandom);
        q.push_back(alloc_tag);
      end
      if (q.size() > 0 && $urandom_range(0, 1)) begin
        int k = $urandom_range(0, q.size() - 1);
        cdb = '{valid: 1, tag: q[k], value: {24'h0, 8'(q[k])}, exc: EXC_NONE};
      end
      if (head.valid && head.complete && $urandom_range(0, 1)) begin
        check(q.size() > 0 && head_tag == q[0] && head.v == {24'h0, 8'(q[0])}, "in-order head");
        retire = 1; void'(q.pop_front());
      end
      step();
      check(full == (q.size() == ROB_DEPTH) && empty == (q.size() == 0), "occupancy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
