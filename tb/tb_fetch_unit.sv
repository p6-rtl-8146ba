// tb_fetch_unit: sequential fetch from address 0 once run is high, holding
// the word while dispatch does not take it, a redirect that loads the target
// word in the same cycle, and the stop after a HALT until a redirect.
`timescale 1ns/1ps
module tb_fetch_unit;
  import p6_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic run = 0, take = 0, redirect = 0, fq_valid, imem_we = 0;
  word_t redirect_pc = 0, fq_insn, fq_pc, imem_addr = 0, imem_wdata = 0;
  int checks = 0, failures = 0;

  fetch_unit dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  // word i: opcode ADD with i in the immediate; word 20 is a HALT
  function automatic word_t w(int i);
    return (i == 20) ? 32'h0000_0000 : {4'(OP_ADD), 12'h0, 16'(i)};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      imem_we = 1; imem_addr = i * 4; imem_wdata = w(i); @(negedge clk);
    end
    imem_we = 0;
    check(!fq_valid, "idle while run low");
    run = 1; @(negedge clk);
    check(fq_valid && fq_pc == 0 && fq_insn == w(0), "first word");
    @(negedge clk);
    check(fq_valid && fq_pc == 0, "held while not taken");
    for (int i = 0; i < 10; i++) begin
      take = 1; @(negedge clk);
      check(fq_valid && fq_pc == (i + 1) * 4 && fq_insn == w(i + 1), $sformatf("word %0d", i + 1));
    end
    take = 0;
    // redirect to 0x48 (word 18) with the register holding word 10
    redirect = 1; redirect_pc = 32'h48; @(negedge clk); redirect = 0;
    check(fq_valid && fq_pc == 32'h48 && fq_insn == w(18), "redirect target loaded at once");
    take = 1; @(negedge clk);
    check(fq_pc == 32'h4C, "sequential after redirect");
    @(negedge clk);
    check(fq_pc == 32'h50 && fq_insn == w(20), "HALT fetched");
    @(negedge clk);
    check(!fq_valid, "stopped after HALT");
    @(negedge clk);
    check(!fq_valid, "still stopped");
    redirect = 1; redirect_pc = 32'h8; @(negedge clk); redirect = 0;
    check(fq_valid && fq_pc == 32'h8, "redirect restarts");
    @(negedge clk);
    check(fq_valid && fq_pc == 32'hC, "running again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
