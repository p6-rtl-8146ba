// lsq: load/store queue of the P6 core.
//
// A circular queue of LSQ_DEPTH slots in program order. Dispatch allocates a
// slot at the tail for every load and store; retire frees the head slot, and
// a retiring store's address and data are then written to the D$ (so the
// D$, like the register file, only ever holds committed state). When a store
// executes it writes its address and data into its slot; when a load
// executes it writes its address.
// Two searches keep memory order correct while loads run ahead of stores:
//  - forwarding: a load takes the data of the youngest older store to the
//    same word that has already executed;
//  - ordering check: an executing store flags every younger load to the same
//    word that has already executed (or executes in the same cycle) by
//    setting that load's ROB# in viol. Retire then treats the load like a
//    fault: everything is cleared and the load is fetched again.
// Both searches are combinational; slot updates happen at the clock edge.
// A flush empties the queue. That loads and stores are allocated in an LSQ at
// dispatch and stores write the D$ from its head at retire is the document's;
// the searches and the depth are this design's choices, the document being
// silent on memory ordering.
module lsq
  import p6_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flush,
  // dispatch
  input  logic               alloc,
  input  logic               alloc_store,
  input  tag_t               alloc_tag,
  output lsq_idx_t           alloc_idx,
  output logic               full,
  // load execute
  input  logic               ld_we,
  input  lsq_idx_t           ld_idx,
  input  word_t              ld_addr,
  output logic               fwd_hit,
  output word_t              fwd_data,
  // store execute
  input  logic               st_we,
  input  lsq_idx_t           st_idx,
  input  word_t              st_addr,
  input  word_t              st_data,
  output logic [ROB_DEPTH:1] viol,
  // retire
  input  logic               pop,
  output logic               head_store,
  output word_t              head_addr,
  output word_t              head_data
);
  typedef struct packed {
    logic  valid;
    logic  store;
    logic  done;     // address (and store data) known
    tag_t  tag;
    word_t addr;
    word_t data;
  } slot_t;

  slot_t          q [LSQ_DEPTH];
  lsq_idx_t       head_q, tail_q;
  logic [LSQ_W:0] count_q;

  function automatic lsq_idx_t age(lsq_idx_t i, lsq_idx_t h);
    return i - h;   // LSQ_DEPTH is a power of two: wraps naturally
  endfunction

  assign full       = (count_q == (LSQ_W+1)'(LSQ_DEPTH));
  assign alloc_idx  = tail_q;
  assign head_store = q[head_q].store;
  assign head_addr  = q[head_q].addr;
  assign head_data  = q[head_q].data;

  // forwarding search for the executing load
  always_comb begin
    fwd_hit  = 1'b0;
    fwd_data = '0;
    for (int k = 0; k < LSQ_DEPTH; k++) begin
      lsq_idx_t j;
      j = head_q + lsq_idx_t'(k);
      if (lsq_idx_t'(k) < age(ld_idx, head_q) && q[j].valid && q[j].store &&
          q[j].done && q[j].addr[31:2] == ld_addr[31:2]) begin
        fwd_hit  = 1'b1;
        fwd_data = q[j].data;
      end
    end
  end

  // ordering check for the executing store
  always_comb begin
    viol = '0;
    if (st_we) begin
      for (int j = 0; j < LSQ_DEPTH; j++) begin
        if (q[j].valid && !q[j].store && q[j].done &&
            age(lsq_idx_t'(j), head_q) > age(st_idx, head_q) &&
            q[j].addr[31:2] == st_addr[31:2] && q[j].tag != '0)
          viol[q[j].tag] = 1'b1;
      end
      if (ld_we && age(ld_idx, head_q) > age(st_idx, head_q) &&
          ld_addr[31:2] == st_addr[31:2] && q[ld_idx].tag != '0)
        viol[q[ld_idx].tag] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      for (int i = 0; i < LSQ_DEPTH; i++) q[i] <= '0;
    end else if (flush) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      for (int i = 0; i < LSQ_DEPTH; i++) q[i].valid <= 1'b0;
    end else begin
      if (ld_we) begin
        q[ld_idx].addr <= ld_addr;
        q[ld_idx].done <= 1'b1;
      end
      if (st_we) begin
        q[st_idx].addr <= st_addr;
        q[st_idx].data <= st_data;
        q[st_idx].done <= 1'b1;
      end
      if (pop) begin
        q[head_q].valid <= 1'b0;
        head_q          <= head_q + 1'b1;
      end
      if (alloc && !full) begin
        q[tail_q] <= '{valid: 1'b1, store: alloc_store, done: 1'b0,
                       tag: alloc_tag, addr: '0, data: '0};
        tail_q    <= tail_q + 1'b1;
      end
      count_q <= count_q + (LSQ_W+1)'(alloc && !full) - (LSQ_W+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (pop) assert (q[head_q].valid);
  end
endmodule
