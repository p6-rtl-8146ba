// tb_alu_unit: random ADD/SUB/ADDI/BNE issued back to back; each result must
// reach the completion register exactly two cycles after issue (X then C),
// with the right value and status, and be held while the CDB is not granted.
`timescale 1ns/1ps
module tb_alu_unit;
  import p6_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, fu_ready, grant = 0;
  issue_t in = '0;
  result_t res;
  int checks = 0, failures = 0;

  alu_unit dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  result_t expq [$];
  int      expc [$];
  int      cyc = 0;

  function automatic result_t model(issue_t i);
    result_t r = '0;
    r.valid = 1; r.tag = i.t; r.exc = EXC_NONE;
    case (i.op)
      OP_ADD:  r.value = i.v1 + i.v2;
      OP_SUB:  r.value = i.v1 - i.v2;
      OP_ADDI: r.value = i.v1 + i.imm;
      OP_BNE:  begin r.value = i.imm; r.exc = (i.v1 != i.v2) ? EXC_TAKEN : EXC_NONE; end
      default: ;
    endcase
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      opcode_t ops [4] = '{OP_ADD, OP_SUB, OP_ADDI, OP_BNE};
      @(negedge clk);
      cyc++;
      // check the completion register
      if (res.valid) begin
        check(expq.size() > 0, "unexpected result");
        if (expq.size() > 0) begin
          check(res == expq[0], $sformatf("result %h exp %h", res.value, expq[0].value));
          if (n < 400) check(cyc - expc[0] == 2, $sformatf("latency %0d", cyc - expc[0]));
        end
      end
      grant = (n < 400) ? 1'b1 : 1'($urandom);
      if (res.valid && grant) begin void'(expq.pop_front()); void'(expc.pop_front()); end
      #1;
      in = '0;
      if (fu_ready && $urandom_range(0, 3) != 0) begin
        in.valid = 1; in.op = ops[$urandom_range(0, 3)]; in.t = tag_t'($urandom);
        in.v1 = $urandom; in.v2 = ($urandom_range(0, 3) == 0) ? in.v1 : $urandom; in.imm = $urandom;
        expq.push_back(model(in)); expc.push_back(cyc);
      end
    end
    check(expq.size() <= 2, "results lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
