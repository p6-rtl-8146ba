// tb_fp_mul: the single-precision multiplier against a reference computed
// in double precision (exact product, then rounded to nearest even in the
// testbench), over random normal numbers, special values (zero, infinity,
// NaN, subnormal) and overflow/underflow. With the CDB always granted each
// result must appear four cycles after issue (three X cycles, then C); with
// random grants results must stay in order and none may be lost.
`timescale 1ns/1ps
module tb_fp_mul;
  import p6_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, fu_ready, grant = 0;
  issue_t in = '0;
  result_t res;
  int checks = 0, failures = 0;

  fp_mul dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic word_t ref_mul(word_t a, word_t b);
    logic [7:0] ea, eb;
    logic za, zb, ia, ib, na, nb, s;
    real da, db;
    logic [63:0] bits;
    int de;
    logic [23:0] keep;
    ea = a[30:23]; eb = b[30:23];
    za = ea == 0; zb = eb == 0;
    ia = ea == 8'hFF && a[22:0] == 0; ib = eb == 8'hFF && b[22:0] == 0;
    na = ea == 8'hFF && a[22:0] != 0; nb = eb == 8'hFF && b[22:0] != 0;
    s = a[31] ^ b[31];
    if (na || nb || (ia && zb) || (ib && za)) return 32'h7FC00000;
    if (ia || ib) return {s, 8'hFF, 23'd0};
    if (za || zb) return {s, 31'd0};
    da = $bitstoreal({1'b0, 11'(int'(ea) + 896), a[22:0], 29'd0});
    db = $bitstoreal({1'b0, 11'(int'(eb) + 896), b[22:0], 29'd0});
    bits = $realtobits(da * db);
    de = int'(bits[62:52]) - 896;
    keep = {1'b0, bits[51:29]};
    if (bits[28] && (|bits[27:0] || bits[29])) keep = keep + 1;
    if (keep[23]) begin keep = 0; de = de + 1; end
    if (de >= 255) return {s, 8'hFF, 23'd0};
    if (de <= 0) return {s, 31'd0};
    return {s, 8'(de), keep[22:0]};
  endfunction

  function automatic word_t pick();
    case ($urandom_range(0, 9))
      0: return {1'($urandom), 8'd0, 23'($urandom)};            // zero / subnormal
      1: return {1'($urandom), 8'hFF, 23'd0};                   // infinity
      2: return {1'($urandom), 8'hFF, 23'($urandom) | 23'd1};   // NaN
      3: return {1'($urandom), 8'($urandom_range(200, 254)), 23'($urandom)}; // large
      4: return {1'($urandom), 8'($urandom_range(1, 60)), 23'($urandom)};    // small
      default: return {1'($urandom), 8'($urandom_range(100, 154)), 23'($urandom)};
    endcase
  endfunction

  result_t expq [$];
  int      expc [$];
  int      cyc = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // a few exact cases: 1.5 * 2.0 = 3.0, -0.5 * 0.5 = -0.25
    check(ref_mul(32'h3FC0_0000, 32'h4000_0000) == 32'h4040_0000, "reference 1.5*2");
    check(ref_mul(32'hBF00_0000, 32'h3F00_0000) == 32'hBE80_0000, "reference -0.5*0.5");
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      cyc++;
      if (res.valid) begin
        check(expq.size() > 0, "unexpected result");
        if (expq.size() > 0) begin
          check(res.value == expq[0].value && res.tag == expq[0].tag,
                $sformatf("result %h exp %h", res.value, expq[0].value));
          if (n < 2000) check(cyc - expc[0] == 4, $sformatf("latency %0d", cyc - expc[0]));
        end
      end
      grant = (n < 2000) ? 1'b1 : 1'($urandom);
      if (res.valid && grant) begin void'(expq.pop_front()); void'(expc.pop_front()); end
      #1;
      in = '0;
      if (fu_ready && $urandom_range(0, 2) != 0) begin
        in.valid = 1; in.op = OP_MULF; in.t = tag_t'($urandom);
        in.v1 = pick(); in.v2 = pick();
        expq.push_back('{valid: 1, tag: in.t, value: ref_mul(in.v1, in.v2), exc: EXC_NONE});
        expc.push_back(cyc);
      end
    end
    check(expq.size() <= 4, "results lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
