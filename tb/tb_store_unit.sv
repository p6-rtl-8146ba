// tb_store_unit: stores must compute V2 + imm, write address and data (V1)
// into their LSQ slot during X, and report completion (tag, status, address)
// one cycle later; a store to an absent page reports EXC_PAGE_FAULT; a flush
// drops a store in flight.
`timescale 1ns/1ps
module tb_store_unit;
  import p6_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, fu_ready, chk_fault, lsq_we, done;
  issue_t in = '0;
  word_t chk_addr, lsq_addr, lsq_data, done_addr;
  lsq_idx_t lsq_idx;
  tag_t done_tag;
  exc_t done_exc;
  int checks = 0, failures = 0;

  store_unit dut (.*);
  assign chk_fault = chk_addr[9:8] == 2'b10;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      word_t a, d;
      tag_t t;
      lsq_idx_t q;
      a = {22'd0, 8'($urandom), 2'b00}; d = $urandom; t = tag_t'($urandom_range(1, 7));
      q = lsq_idx_t'($urandom);
      in = '0; in.valid = 1; in.op = OP_STF; in.t = t; in.v1 = d; in.v2 = a + 32'h8;
      in.imm = -32'sd8; in.lsq = q;
      check(fu_ready, "ready");
      @(negedge clk);  // X
      in = '0;
      check(lsq_we && lsq_idx == q && lsq_addr == a && lsq_data == d, "LSQ write in X");
      check(!done || done_tag != t, "not complete in X");
      @(negedge clk);  // C
      check(done && done_tag == t && done_addr == a &&
            done_exc == ((a[9:8] == 2'b10) ? EXC_PAGE_FAULT : EXC_NONE), "completion");
      check(!lsq_we, "idle");
    end
    in = '0; in.valid = 1; in.t = 3;
    @(negedge clk);
    in = '0; flush = 1;
    @(negedge clk);
    flush = 0;
    check(!done, "flush drops the store");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
