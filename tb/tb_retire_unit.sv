// tb_retire_unit: the four ways the ROB head is handled: not complete
// (stall), normal (register write, map clear with the head's tag, store to
// memory from the LSQ head, LSQ pop), page fault (flush, report, refetch at
// the faulting PC, nothing retired), load order violation (flush and
// refetch the load, no report) and taken branch (retire, flush, fetch the
// target); HALT retires and raises halt. An interrupt request is taken only
// with a valid head, complete or not, and wins over every other case:
// nothing retires, everything is cleared, and fetch restarts at the head.
`timescale 1ns/1ps
module tb_retire_unit;
  import p6_pkg::*;
  rob_entry_t head = '0;
  tag_t head_tag = 4, map_tag;
  logic head_viol = 0, irq = 0, irq_ack;
  word_t irq_pc;
  word_t lsq_addr = 32'h200, lsq_data = 32'h5555;
  logic retire, rf_we, map_clr, mem_we, lsq_pop, flush, os_fault, halt, stall, flush_fault, flush_order, flush_branch;
  areg_t rf_waddr, map_reg;
  word_t rf_wdata, mem_addr, mem_data, redirect_pc, os_fault_pc, os_fault_addr;
  int checks = 0, failures = 0;

  retire_unit dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 check(!retire && !flush && !stall, "empty ROB");
    head.valid = 1; head.has_dest = 1; head.r = 9; head.v = 32'h1234; head.pc = 32'h10; #1;
    check(stall && !retire && !rf_we && !flush, "head not complete: stall");
    head.complete = 1; #1;
    check(retire && rf_we && rf_waddr == 9 && rf_wdata == 32'h1234 && !flush, "normal retire");
    check(map_clr && map_reg == 9 && map_tag == 4, "map clear with head tag");
    check(!mem_we && !lsq_pop, "no memory for an ALU op");
    head.is_load = 1; #1 check(lsq_pop && !mem_we, "load pops LSQ");
    head.is_load = 0; head.has_dest = 0; head.is_store = 1; #1;
    check(retire && mem_we && mem_addr == 32'h200 && mem_data == 32'h5555 && lsq_pop && !rf_we, "store commit");
    head.exc = EXC_PAGE_FAULT; head.v = 32'h204; #1;
    check(!retire && !mem_we && !lsq_pop && flush && flush_fault && redirect_pc == 32'h10, "page fault flush");
    check(os_fault && os_fault_pc == 32'h10 && os_fault_addr == 32'h204, "fault report");
    head.exc = EXC_NONE; head.is_store = 0; head.is_load = 1; head.has_dest = 1; head_viol = 1; #1;
    check(!retire && flush && flush_order && !os_fault && redirect_pc == 32'h10 && !rf_we, "order violation");
    head_viol = 0; head.is_load = 0; head.has_dest = 0; head.exc = EXC_TAKEN; head.v = 32'h80; #1;
    check(retire && flush && flush_branch && redirect_pc == 32'h80 && !os_fault, "taken branch");
    head.exc = EXC_NONE; head.is_halt = 1; #1;
    check(retire && halt && !flush && !irq_ack, "halt");
    // interrupts
    head = '0; irq = 1; #1;
    check(!irq_ack && !flush && !retire, "interrupt waits with an empty ROB");
    head.valid = 1; head.pc = 32'h44; #1;
    check(irq_ack && irq_pc == 32'h44 && flush && redirect_pc == 32'h44 && !stall && !retire, "interrupt, head incomplete");
    head.complete = 1; head.has_dest = 1; head.is_store = 1; head.exc = EXC_TAKEN; head.v = 32'h90; #1;
    check(irq_ack && flush && !retire && !rf_we && !mem_we && !lsq_pop && !map_clr && redirect_pc == 32'h44 &&
          !flush_branch, "interrupt wins over a taken branch");
    head.exc = EXC_PAGE_FAULT; head_viol = 1; #1;
    check(irq_ack && !os_fault && !flush_fault && !flush_order && redirect_pc == 32'h44, "interrupt wins over fault and order");
    irq = 0; head_viol = 0; head.exc = EXC_NONE; head.is_halt = 1; #1;
    check(!irq_ack && retire && halt, "no interrupt after it is dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
