// tb_map_table: the map table against a reference model under random
// dispatch writes, CDB broadcasts, retirements and flushes, plus the
// walk-through's cases: "+" is set only while the entry still holds the
// broadcast tag, and retire clears only an entry that still holds its tag.
`timescale 1ns/1ps
module tb_map_table;
  import p6_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic  flush = 0, disp_we = 0, cdb_valid = 0, ret_valid = 0;
  areg_t rd_a = 0, rd_b = 0, disp_reg = 0, ret_reg = 0;
  tag_t  disp_tag = 0, cdb_tag = 0, ret_tag = 0, tag_a, tag_b;
  logic  rdy_a, rdy_b;
  tag_t  mt [NUM_AREGS];
  logic  mr [NUM_AREGS];
  int checks = 0, failures = 0;

  map_table dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic step();
    @(posedge clk);
    // model update
    if (flush) foreach (mt[i]) begin mt[i] = 0; mr[i] = 0; end
    else begin
      for (int i = 0; i < NUM_AREGS; i++) begin
        if (disp_we && disp_reg == i) begin mt[i] = disp_tag; mr[i] = 0; end
        else if (ret_valid && ret_reg == i && mt[i] == ret_tag) begin mt[i] = 0; mr[i] = 0; end
        else if (cdb_valid && mt[i] != 0 && mt[i] == cdb_tag) mr[i] = 1;
      end
    end
    #1;
    flush = 0; disp_we = 0; cdb_valid = 0; ret_valid = 0;
  endtask

  task automatic compare();
    for (int i = 0; i < NUM_AREGS; i++) begin
      rd_a = areg_t'(i); rd_b = areg_t'(NUM_AREGS - 1 - i); #1;
      check(tag_a == mt[i] && rdy_a == mr[i], $sformatf("reg %0d tag %0d%s exp %0d%s", i,
            tag_a, rdy_a ? "+" : "", mt[i], mr[i] ? "+" : ""));
      check(tag_b == mt[NUM_AREGS-1-i] && rdy_b == mr[NUM_AREGS-1-i], "port b");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (mt[i]) begin mt[i] = 0; mr[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare();
    // walk-through: f1 <- ROB#1, f1 gets ROB#1+, then f1 <- ROB#5, retire of ROB#1 leaves f1
    disp_we = 1; disp_reg = 9; disp_tag = 1; step();
    cdb_valid = 1; cdb_tag = 1; step();
    rd_a = 9; #1 check(tag_a == 1 && rdy_a, "f1 = ROB#1+");
    disp_we = 1; disp_reg = 9; disp_tag = 5; ret_valid = 1; ret_reg = 9; ret_tag = 1; step();
    rd_a = 9; #1 check(tag_a == 5 && !rdy_a, "f1 = ROB#5 after retire of ROB#1");
    // f2 <- ROB#2 then ROB#6; broadcast of ROB#2 must not set +
    disp_we = 1; disp_reg = 10; disp_tag = 2; step();
    disp_we = 1; disp_reg = 10; disp_tag = 6; step();
    cdb_valid = 1; cdb_tag = 2; step();
    rd_a = 10; #1 check(tag_a == 6 && !rdy_a, "f2 stays ROB#6");
    compare();
    // random
    for (int n = 0; n < 3000; n++) begin
      disp_we = 1'($urandom); disp_reg = areg_t'($urandom); disp_tag = tag_t'($urandom_range(1, ROB_DEPTH));
      cdb_valid = 1'($urandom); cdb_tag = tag_t'($urandom_range(1, ROB_DEPTH));
      ret_valid = 1'($urandom); ret_reg = areg_t'($urandom); ret_tag = tag_t'($urandom_range(1, ROB_DEPTH));
      flush = ($urandom_range(0, 50) == 0);
      step();
      if (n % 10 == 0) compare();
    end
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
