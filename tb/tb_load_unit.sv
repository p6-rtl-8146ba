// tb_load_unit: loads against a small memory model in the testbench: the
// address must be V2 + imm, the value the memory word or, when the LSQ
// reports a hit, the forwarded data; a fault must give status
// EXC_PAGE_FAULT with the address; the LSQ record is written only in the
// cycle the load leaves X; latency issue -> C is two cycles.
`timescale 1ns/1ps
module tb_load_unit;
  import p6_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, fu_ready, grant = 1, mem_fault, lsq_we, fwd_hit;
  issue_t in = '0;
  result_t res;
  word_t mem_addr, mem_data, lsq_addr, fwd_data;
  lsq_idx_t lsq_idx;
  int checks = 0, failures = 0;

  load_unit dut (.*);

  // memory model: word = address * 3 + 1; pages 0x300..0x3FF absent;
  // the LSQ "has" an older store to 0x40 with data 0xF0F0
  assign mem_data  = mem_addr * 3 + 1;
  assign mem_fault = mem_addr[9:8] == 2'b11;
  assign fwd_hit   = mem_addr == 32'h40;
  assign fwd_data  = 32'hF0F0;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    result_t e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      word_t a;
      tag_t t;
      bit hold;
      a = (n % 7 == 0) ? 32'h40 : {22'd0, 8'($urandom), 2'b00};
      in = '0; in.valid = 1; in.op = OP_LDF; t = tag_t'($urandom_range(1, 7)); in.t = t;
      in.v2 = a - 32'h10; in.imm = 32'h10; in.lsq = lsq_idx_t'($urandom);
      check(fu_ready, "ready");
      @(negedge clk);  // X
      in = '0;
      hold = (n % 5 == 0);
      check(mem_addr == a && lsq_addr == a, "address");
      check(lsq_we, "lsq record while leaving X");
      e = '0; e.valid = 1; e.tag = t;
      if (a[9:8] == 2'b11) begin e.value = a; e.exc = EXC_PAGE_FAULT; end
      else if (a == 32'h40) e.value = 32'hF0F0;
      else e.value = a * 3 + 1;
      grant = !hold;
      @(negedge clk);  // C
      check(res == e, $sformatf("load %h -> %h exp %h", a, res.value, e.value));
      if (hold) begin
        check(!lsq_we, "no record while idle");
        @(negedge clk);
        check(res == e, "held while CDB busy");
        grant = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
