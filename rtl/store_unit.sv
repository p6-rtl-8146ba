// store_unit: the functional unit behind the store reservation station (STF).
//
// One X cycle: the address is V2 + imm and the data is V1. Both are written
// into the store's LSQ slot, and the page is checked. The store does not
// write the D$ here: that happens only when it retires, which is what keeps
// memory precise. In the following cycle (C) the store marks its ROB entry
// complete through a port of its own, not through the CDB, since it has no
// register result; a page fault is reported with it. The unit never stalls.
// Timing: issue S, execute S+1, complete S+2 (stf: S c8, X c9, C c10 in the
// document's example). The store station and the deferred D$ write are the
// document's; the separate completion port is this design's choice, matching
// the document's tables in which a completing store leaves the CDB empty.
module store_unit
  import p6_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     flush,
  input  issue_t   in,
  output logic     fu_ready,
  // page check
  output word_t    chk_addr,
  input  logic     chk_fault,
  // LSQ write of address and data
  output logic     lsq_we,
  output lsq_idx_t lsq_idx,
  output word_t    lsq_addr,
  output word_t    lsq_data,
  // completion to the ROB
  output logic     done,
  output tag_t     done_tag,
  output exc_t     done_exc,
  output word_t    done_addr
);
  issue_t  x_q;
  result_t c_q;

  assign fu_ready  = 1'b1;
  assign chk_addr  = x_q.v2 + x_q.imm;
  assign lsq_we    = x_q.valid && !flush;
  assign lsq_idx   = x_q.lsq;
  assign lsq_addr  = chk_addr;
  assign lsq_data  = x_q.v1;
  assign done      = c_q.valid;
  assign done_tag  = c_q.tag;
  assign done_exc  = c_q.exc;
  assign done_addr = c_q.value;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      c_q <= '0;
    end else if (flush) begin
      x_q.valid <= 1'b0;
      c_q.valid <= 1'b0;
    end else begin
      c_q.valid <= x_q.valid;
      c_q.tag   <= x_q.t;
      c_q.value <= chk_addr;
      c_q.exc   <= chk_fault ? EXC_PAGE_FAULT : EXC_NONE;
      x_q       <= in;
    end
  end
endmodule
