// tb_lsq: the load/store queue: allocation in order and full at four slots;
// forwarding from the youngest older executed store to the same word (and
// never from a younger store); the order check flagging a younger load that
// already executed, or executes in the same cycle, to the same word; head
// data for the D$ at retire; flush.
`timescale 1ns/1ps
module tb_lsq;
  import p6_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, alloc = 0, alloc_store = 0, full, ld_we = 0, fwd_hit, st_we = 0, pop = 0, head_store;
  tag_t alloc_tag = 0;
  lsq_idx_t alloc_idx, ld_idx = 0, st_idx = 0;
  word_t ld_addr = 0, fwd_data, st_addr = 0, st_data = 0, head_addr, head_data;
  logic [ROB_DEPTH:1] viol;
  int checks = 0, failures = 0;

  lsq dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  task automatic step();
    @(posedge clk); #1; alloc = 0; ld_we = 0; st_we = 0; pop = 0; flush = 0;
  endtask
  task automatic put(bit s, tag_t t, output lsq_idx_t i);
    i = alloc_idx; alloc = 1; alloc_store = s; alloc_tag = t; step();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    lsq_idx_t s1, s2, l3, l4, s5, l6;
    repeat (2) @(negedge clk);
    rst_n = 1; #1;
    // program order: st1 [0x10], st2 [0x10], ld3 [0x10], ld4 [0x20]
    put(1, 1, s1); put(1, 2, s2); put(0, 3, l3); put(0, 4, l4);
    check(full, "full at four");
    check(s1 == 0 && s2 == 1 && l3 == 2 && l4 == 3, "slots in order");
    // st1 executes
    st_we = 1; st_idx = s1; st_addr = 32'h10; st_data = 32'hAAAA; #1;
    check(viol == 0, "no load executed yet");
    step();
    // ld3 executes: forwards from st1 (st2 not executed)
    ld_idx = l3; ld_addr = 32'h10; #1;
    check(fwd_hit && fwd_data == 32'hAAAA, "forward from st1");
    ld_we = 1; step();
    // ld4 to another word: no forward
    ld_idx = l4; ld_addr = 32'h20; #1 check(!fwd_hit, "no forward for another word");
    ld_we = 1; step();
    // st2 executes to 0x10: ld3 (tag 3) is younger and done -> flagged; ld4 not
    st_we = 1; st_idx = s2; st_addr = 32'h10; st_data = 32'hBBBB; #1;
    check(viol == 7'b0000100, $sformatf("violation mask %b", viol));
    step();
    // now ld3's forward comes from st2, the youngest older store
    ld_idx = l3; ld_addr = 32'h10; #1 check(fwd_hit && fwd_data == 32'hBBBB, "youngest older store");
    // st1 at head: retire writes it out
    check(head_store && head_addr == 32'h10 && head_data == 32'hAAAA, "head store");
    pop = 1; step();
    check(!full, "not full after pop");
    put(1, 5, s5);   // younger store, slot 0 again
    st_we = 1; st_idx = s5; st_addr = 32'h20; st_data = 32'hCCCC; #1;
    check(viol == 0, "older load never flagged");
    step();
    ld_idx = l4; ld_addr = 32'h20; #1 check(!fwd_hit, "no forward from a younger store");
    pop = 1; step(); pop = 1; step(); pop = 1; step();
    // same-cycle load and store: store older, same word
    put(0, 6, l6);
    ld_we = 1; ld_idx = l6; ld_addr = 32'h20; st_we = 1; st_idx = s5; st_addr = 32'h20; #1;
    check(viol[6], "same-cycle younger load flagged");
    step();
    flush = 1; step();
    check(!full && alloc_idx == 0, "flush empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
