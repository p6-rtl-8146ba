// load_unit: the functional unit behind the load reservation station (LDF).
//
// One X cycle: the address is V2 + imm. In that cycle the unit asks the
// D$ for the word and whether its page is present, and asks the LSQ whether
// an older store to the same word has already executed; the youngest such
// store's data is forwarded instead of the D$ word. On advancing out of X the
// address is recorded in the load's LSQ slot, so that an older store that
// executes later can detect that this load read memory too early. The result
// waits in the completion register (C) for the CDB. A load to a non-present
// page completes with status EXC_PAGE_FAULT and the address as its value.
// Timing: issue S, execute S+1, CDB request from S+2 (ldf: S c2, X c3, C c4
// in the document's example). The load station and the one-cycle load are
// the document's; forwarding and the page check are this design's.
module load_unit
  import p6_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     flush,
  input  issue_t   in,
  output logic     fu_ready,
  output result_t  res,
  input  logic     grant,
  // D$ read port
  output word_t    mem_addr,
  input  word_t    mem_data,
  input  logic     mem_fault,
  // LSQ: forwarding query and address record
  output logic     lsq_we,
  output lsq_idx_t lsq_idx,
  output word_t    lsq_addr,
  input  logic     fwd_hit,
  input  word_t    fwd_data
);
  issue_t  x_q;
  result_t c_q, x_res;
  logic    c_free;

  assign c_free   = !c_q.valid || grant;
  assign fu_ready = !x_q.valid || c_free;
  assign res      = c_q;

  assign mem_addr = x_q.v2 + x_q.imm;
  assign lsq_idx  = x_q.lsq;
  assign lsq_addr = mem_addr;
  assign lsq_we   = x_q.valid && c_free && !flush;

  always_comb begin
    x_res       = '0;
    x_res.valid = x_q.valid;
    x_res.tag   = x_q.t;
    if (mem_fault) begin
      x_res.value = mem_addr;
      x_res.exc   = EXC_PAGE_FAULT;
    end else begin
      x_res.value = fwd_hit ? fwd_data : mem_data;
      x_res.exc   = EXC_NONE;
    end
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
