// cdb_arbiter: the common data bus (CDB) of the P6 core.
//
// Functional units that produce a register value hold it in a completion
// register until they win the bus. Each cycle this arbiter grants one of the
// NREQ requesters, the lowest index first, and drives the CDB with its
// <tag, value, status>; the others wait ("structural hazard (CDB)? wait").
// Purely combinational: request in, grant and bus out in the same cycle.
// The single bus and the waiting are the document's; fixed priority is this
// design's choice (the core orders the requesters FP1, FP2, LD, ALU).
module cdb_arbiter
  import p6_pkg::*;
#(
  parameter int unsigned NREQ = 4
) (
  input  result_t          req   [NREQ],
  output logic [NREQ-1:0]  grant,
  output cdb_t             cdb,
  output logic             conflict   // more than one requester this cycle
);
  always_comb begin
    grant    = '0;
    cdb      = '0;
    for (int i = NREQ - 1; i >= 0; i--) begin
      if (req[i].valid) begin
        grant     = '0;
        grant[i]  = 1'b1;
        cdb.valid = 1'b1;
        cdb.tag   = req[i].tag;
        cdb.value = req[i].value;
        cdb.exc   = req[i].exc;
      end
    end
  end

  always_comb begin
    int n;
    n = 0;
    for (int i = 0; i < NREQ; i++) n += int'(req[i].valid);
    conflict = (n > 1);
  end
endmodule
