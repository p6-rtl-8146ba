// tb_cdb_arbiter: random request patterns; the lowest-numbered requester
// must own the bus, exactly one grant is given when any request is present,
// and the conflict flag must say whether more than one requested.
`timescale 1ns/1ps
module tb_cdb_arbiter;
  import p6_pkg::*;
  result_t    req [4];
  logic [3:0] grant;
  cdb_t       cdb;
  logic       conflict;
  int checks = 0, failures = 0;

  cdb_arbiter #(.NREQ(4)) dut (.req, .grant, .cdb, .conflict);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int w, cnt;
      w = -1; cnt = 0;
      for (int i = 0; i < 4; i++) begin
        req[i].valid = 1'($urandom);
        req[i].tag   = tag_t'($urandom);
        req[i].value = $urandom;
        req[i].exc   = exc_t'($urandom_range(0, 2));
        if (req[i].valid) begin cnt++; if (w < 0) w = i; end
      end
      #1;
      check(conflict == (cnt > 1), "conflict flag");
      if (w < 0) check(grant == 0 && !cdb.valid, "idle bus");
      else begin
        check(grant == 4'(1 << w), $sformatf("grant %b exp %0d", grant, w));
        check(cdb.valid && cdb.tag == req[w].tag && cdb.value == req[w].value &&
              cdb.exc == req[w].exc, "bus contents");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
