// retire_unit: the R stage of the P6 core, which keeps state precise.
//
// Combinational. It looks at the ROB head. If the head is not complete it
// does nothing ("ROB head not complete? stall"): younger complete
// instructions wait. A complete head is handled in one of four ways:
//  - normal: free the ROB entry, write V to the register file if the
//    instruction has an output register, clear that register's map-table
//    entry if it still holds this ROB#, and for a store write the LSQ head's
//    address and data to the D$; a load or store frees the LSQ head;
//  - page fault: nothing is retired; the ROB, stations, map table, LSQ and
//    functional units are all cleared (flush), the fault is reported to the
//    operating system (os_fault with PC and address) and fetch restarts at
//    the faulting instruction;
//  - load flagged by the LSQ (it read memory before an older store to the
//    same word wrote it): cleared the same way and fetched again, with no
//    report;
//  - taken branch: the branch retires, then everything younger is cleared and
//    fetch restarts at the target; a HALT retires and sets halted.
// An external interrupt (irq, a level held until irq_ack) is taken at the
// next cycle with a valid ROB head, complete or not, ahead of all of the
// above: nothing retires, everything is cleared, irq_ack pulses with irq_pc =
// the head's PC (every older instruction has retired, none younger has), and
// fetch restarts there. With an empty ROB (halted or refilling after a clear)
// the interrupt waits. The requester must drop irq after irq_ack, or the core
// clears again on the next instruction at the head.
// Clearing works because 0 means "empty" in the ROB and stations and
// "value in the register file" in the map table, and because the register
// file and D$ are written only here. This is the document's retire and
// precise-state scheme, whose list of things that can go wrong (mispredicted
// branch, fault, interrupt) is handled by that one clear; the order-violation
// case and the interrupt hand-shake are this design's own.
module retire_unit
  import p6_pkg::*;
(
  input  rob_entry_t head,
  input  tag_t       head_tag,
  input  logic       head_viol,
  input  logic       irq,
  input  word_t      lsq_addr,
  input  word_t      lsq_data,
  output logic       retire,
  output logic       rf_we,
  output areg_t      rf_waddr,
  output word_t      rf_wdata,
  output logic       map_clr,
  output areg_t      map_reg,
  output tag_t       map_tag,
  output logic       mem_we,
  output word_t      mem_addr,
  output word_t      mem_data,
  output logic       lsq_pop,
  output logic       flush,
  output word_t      redirect_pc,
  output logic       os_fault,
  output word_t      os_fault_pc,
  output word_t      os_fault_addr,
  output logic       halt,
  output logic       stall,
  output logic       flush_fault,
  output logic       flush_order,
  output logic       flush_branch,
  output logic       irq_ack,
  output word_t      irq_pc
);
  logic ready, fault, order, normal, intr;

  assign intr   = irq && head.valid;
  assign ready  = head.valid && head.complete && !intr;
  assign order  = ready && head_viol;
  assign fault  = ready && !head_viol && head.exc == EXC_PAGE_FAULT;
  assign normal = ready && !order && !fault;

  assign stall         = head.valid && !head.complete && !intr;
  assign retire        = normal;
  assign rf_we         = normal && head.has_dest;
  assign rf_waddr      = head.r;
  assign rf_wdata      = head.v;
  assign map_clr       = rf_we;
  assign map_reg       = head.r;
  assign map_tag       = head_tag;
  assign mem_we        = normal && head.is_store;
  assign mem_addr      = lsq_addr;
  assign mem_data      = lsq_data;
  assign lsq_pop       = normal && (head.is_load || head.is_store);
  assign flush_fault   = fault;
  assign flush_order   = order;
  assign flush_branch  = normal && head.exc == EXC_TAKEN;
  assign flush         = fault || order || flush_branch || intr;
  assign redirect_pc   = flush_branch ? head.v : head.pc;
  assign os_fault      = fault;
  assign os_fault_pc   = head.pc;
  assign os_fault_addr = head.v;
  assign halt          = normal && head.is_halt;
  assign irq_ack       = intr;
  assign irq_pc        = head.pc;
endmodule
