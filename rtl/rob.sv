// rob: re-order buffer of the P6 core.
//
// A circular buffer of ROB_DEPTH entries numbered 1..ROB_DEPTH (number 0 is
// the "no tag" value). Dispatch allocates the entry at the tail and records
// the output register R; the entry number is the instruction's tag. At
// complete (C) the CDB writes the value V into the entry named by its tag and
// marks it complete; stores, which produce no register value, complete
// through a separate port. Retire (R) reads the head and, when told to,
// frees it. Dispatch reads completed values of earlier instructions through
// two read ports (the "ready-in-ROB" case). A load found by the LSQ to have
// read memory too early is marked through viol_set (bit i = ROB# i).
// On flush every entry is freed and head and tail are both set to the entry
// after the retiring one (when retire is also asserted, e.g. a taken branch)
// or left at the head (a faulting instruction, which is then fetched again).
// All updates take effect at the clock edge; reads are combinational.
// Head/tail, R, V and the complete bit are the document's; the separate
// store-completion port, the exception fields and the depth (seven, as in the
// document's example table) are this design's choices.
module rob
  import p6_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 flush,
  // dispatch (D)
  input  logic                 alloc,
  input  rob_entry_t           alloc_entry,
  output tag_t                 alloc_tag,
  output logic                 full,
  // complete (C)
  input  cdb_t                 cdb,
  input  logic                 st_done,
  input  tag_t                 st_tag,
  input  exc_t                 st_exc,
  input  word_t                st_addr,
  input  logic [ROB_DEPTH:1]   viol_set,
  // operand reads for dispatch
  input  tag_t                 rtag_a,
  output word_t                rval_a,
  input  tag_t                 rtag_b,
  output word_t                rval_b,
  // retire (R)
  output tag_t                 head_tag,
  output rob_entry_t           head,
  output logic                 head_viol,
  input  logic                 retire,
  output logic                 empty
);
  rob_entry_t             ent  [1:ROB_DEPTH];
  logic [ROB_DEPTH:1]     viol;
  tag_t                   head_q, tail_q;
  logic [TAG_W:0]         count_q;

  function automatic tag_t next_tag(tag_t t);
    return (t == tag_t'(ROB_DEPTH)) ? tag_t'(1) : t + tag_t'(1);
  endfunction

  assign full      = (count_q == (TAG_W+1)'(ROB_DEPTH));
  assign empty     = (count_q == '0);
  assign alloc_tag = tail_q;
  assign head_tag  = head_q;
  assign head      = ent[head_q];
  assign head_viol = viol[head_q];
  assign rval_a    = (rtag_a != '0) ? ent[rtag_a].v : '0;
  assign rval_b    = (rtag_b != '0) ? ent[rtag_b].v : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= tag_t'(1);
      tail_q  <= tag_t'(1);
      count_q <= '0;
      viol    <= '0;
      for (int i = 1; i <= ROB_DEPTH; i++) ent[i] <= '0;
    end else if (flush) begin
      head_q  <= retire ? next_tag(head_q) : head_q;
      tail_q  <= retire ? next_tag(head_q) : head_q;
      count_q <= '0;
      viol    <= '0;
      for (int i = 1; i <= ROB_DEPTH; i++) begin
        ent[i].valid    <= 1'b0;
        ent[i].complete <= 1'b0;
      end
    end else begin
      // complete
      if (cdb.valid && cdb.tag != '0 && ent[cdb.tag].valid) begin
        ent[cdb.tag].v        <= cdb.value;
        ent[cdb.tag].exc      <= cdb.exc;
        ent[cdb.tag].complete <= 1'b1;
      end
      if (st_done && st_tag != '0 && ent[st_tag].valid) begin
        ent[st_tag].v        <= st_addr;
        ent[st_tag].exc      <= st_exc;
        ent[st_tag].complete <= 1'b1;
      end
      viol <= viol | viol_set;
      // retire
      if (retire) begin
        ent[head_q].valid    <= 1'b0;
        ent[head_q].complete <= 1'b0;
        viol[head_q]         <= 1'b0;
        head_q               <= next_tag(head_q);
      end
      // dispatch
      if (alloc && !full) begin
        ent[tail_q]       <= alloc_entry;
        ent[tail_q].valid <= 1'b1;
        viol[tail_q]      <= 1'b0;
        tail_q            <= next_tag(tail_q);
      end
      count_q <= count_q + (TAG_W+1)'(alloc && !full) - (TAG_W+1)'(retire);
    end
  end

  // A retired entry must be valid and complete.
  always_ff @(posedge clk) begin
    if (retire) assert (head.valid && head.complete);
  end
endmodule
