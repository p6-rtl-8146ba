// tb_dcache: the data memory: host writes then reads back, a commit write
// visible to the load port from the next cycle, and
// the page-present bits (all present after reset; clearing one page makes
// loads and stores in that page, and only there, fault).
`timescale 1ns/1ps
module tb_dcache;
  import p6_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  word_t ld_addr = 0, ld_data, st_addr = 0, waddr = 0, wdata = 0, host_addr = 0, host_wdata = 0, host_rdata, os_addr = 0;
  logic ld_fault, st_fault, we = 0, host_we = 0, os_we = 0, os_present = 0;
  word_t model [256];
  int checks = 0, failures = 0;

  dcache dut (.*);

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
    for (int i = 0; i < 256; i++) begin
      host_we = 1; host_addr = i * 4; host_wdata = $urandom; model[i] = host_wdata;
      @(negedge clk);
    end
    host_we = 0;
    for (int n = 0; n < 1000; n++) begin
      int i;
      i = $urandom_range(0, 255);
      ld_addr = i * 4; host_addr = $urandom_range(0, 255) * 4; #1;
      check(ld_data == model[i] && host_rdata == model[host_addr[9:2]], "read");
      check(!ld_fault, "all pages present");
      we = 1'($urandom); waddr = $urandom_range(0, 255) * 4; wdata = $urandom;
      host_we = !we && ($urandom_range(0, 7) == 0); host_addr = $urandom_range(0, 255) * 4; host_wdata = $urandom;
      @(negedge clk);
      if (host_we) model[host_addr[9:2]] = host_wdata;
      if (we && !host_we) model[waddr[9:2]] = wdata;
      we = 0; host_we = 0;
    end
    // page 5 (0x140..0x17F) absent
    os_we = 1; os_addr = 32'h150; os_present = 0; @(negedge clk); os_we = 0;
    for (int a = 0; a < 1024; a += 4) begin
      ld_addr = a; st_addr = a; #1;
      check(ld_fault == (a >= 32'h140 && a < 32'h180) && st_fault == ld_fault,
            $sformatf("page fault at %h", a));
    end
    @(negedge clk);
    os_we = 1; os_addr = 32'h17C; os_present = 1; @(negedge clk); os_we = 0;
    ld_addr = 32'h140; #1 check(!ld_fault, "page present again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
