// tb_regfile: random writes and reads of the register file against a model;
// checks reset to zero and that a write is visible from the next cycle.
`timescale 1ns/1ps
module tb_regfile;
  import p6_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  always #5 clk = ~clk;
  areg_t ra1 = 0, ra2 = 0, wa = 0;
  word_t rd1, rd2, wd = 0;
  word_t model [NUM_AREGS];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst_n, .raddr1(ra1), .rdata1(rd1), .raddr2(ra2), .rdata2(rd2),
               .we, .waddr(wa), .wdata(wd));

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NUM_AREGS; i++) begin
      ra1 = areg_t'(i); #1; check(rd1 == 0, $sformatf("reset r%0d", i));
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ra1 = areg_t'($urandom); ra2 = areg_t'($urandom);
      #1;
      check(rd1 == model[ra1] && rd2 == model[ra2], $sformatf("read %0d %0d", ra1, ra2));
      we = 1'($urandom); wa = areg_t'($urandom); wd = $urandom;
      #1;
      // not visible before the edge
      if (we && wa == ra1 && wd != model[ra1]) check(rd1 == model[ra1], "write visible too early");
      @(posedge clk);
      if (we) model[wa] = wd;
      #1 we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
