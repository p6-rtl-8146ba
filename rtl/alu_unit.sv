// alu_unit: the integer functional unit behind the ALU reservation station.
//
// One X cycle: ADD, SUB, ADDI and BNE. The result goes into a completion
// register (the C stage) that requests the CDB and holds its contents until
// granted. BNE has no register result: it puts its target address on the
// CDB with status EXC_TAKEN when taken, so that retire redirects fetch, and
// status EXC_NONE when not taken (fetch always continues in sequence).
// Timing: issue in cycle S, execute in S+1, request the CDB from S+2.
// fu_ready tells the station the unit can take a new instruction this cycle.
// A one-cycle ALU is the document's ("1 ALU"); the operation set and branch
// handling are this design's.
module alu_unit
  import p6_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  input  issue_t  in,
  output logic    fu_ready,
  output result_t res,
  input  logic    grant
);
  issue_t  x_q;
  result_t c_q, x_res;
  logic    c_free;

  assign c_free   = !c_q.valid || grant;
  assign fu_ready = !x_q.valid || c_free;
  assign res      = c_q;

  always_comb begin
    x_res       = '0;
    x_res.valid = x_q.valid;
    x_res.tag   = x_q.t;
    x_res.exc   = EXC_NONE;
    unique case (x_q.op)
      OP_ADD:  x_res.value = x_q.v1 + x_q.v2;
      OP_SUB:  x_res.value = x_q.v1 - x_q.v2;
      OP_ADDI: x_res.value = x_q.v1 + x_q.imm;
      OP_BNE: begin
        x_res.value = x_q.imm;
        x_res.exc   = (x_q.v1 != x_q.v2) ? EXC_TAKEN : EXC_NONE;
      end
      default: x_res.value = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      c_q <= '0;
    end else if (flush) begin
      x_q.valid <= 1'b0;
      c_q.valid <= 1'b0;
    end else begin
      if (c_free)   c_q <= x_res;
      if (fu_ready) x_q <= in;
    end
  end
endmodule
