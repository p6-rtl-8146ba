// p6_top: a single-issue P6-style out-of-order core: Tomasulo's algorithm
// with a re-order buffer (ROB) for precise state.
//
// Pipeline F, D, S, X, C, R:
//   F  fetch_unit fetches in sequence into a one-entry fetch register.
//   D  dispatch_unit allocates a ROB entry, a reservation station and (loads
//      and stores) an LSQ slot, reads ready operands from the register file
//      or the ROB, and renames the output register to the new ROB# in the
//      map table. Any structure full: stall.
//   S  a station whose operands are present issues to its unit; the station
//      is free again from the next cycle.
//   X  ALU, load and store units take one cycle, the two FP multipliers
//      three.
//   C  one result per cycle goes on the CDB (fixed priority FP1, FP2, LD,
//      ALU); it is written into its ROB entry, caught by waiting stations,
//      and sets the map table's ready-in-ROB bit if still current. Stores
//      complete through their own port.
//   R  the ROB head retires in order: register-file write, store to the D$,
//      map-table clear; a fault, a mis-ordered load or a taken branch
//      clears everything and restarts fetch.
// Stations (the document's Simple-P6): 0 ALU, 1 LD, 2 ST, 3 FP1, 4 FP2.
// Host side: load the instruction and data memories while run is low, then
// raise run; the core fetches from address 0 until a HALT retires (halted).
// os_fault pulses for one cycle when a page fault reaches the ROB head; the
// core then refetches the faulting instruction at once, so the handler must
// mark the page present (os_page_*) in that cycle or the next.
// irq is an external interrupt request, held until irq_ack: the core clears
// everything at the next instruction at the ROB head, pulses irq_ack with
// irq_pc (where the interrupted program resumes) and restarts fetch there.
// The ret_* and events outputs show every retirement and every stall, bypass
// and flush, for checking and counting.
module p6_top
  import p6_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256,
  parameter int unsigned PAGE_BYTES = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    run,
  // host: instruction memory
  input  logic    imem_we,
  input  word_t   imem_addr,
  input  word_t   imem_wdata,
  // host: data memory
  input  logic    dmem_we,
  input  word_t   dmem_addr,
  input  word_t   dmem_wdata,
  output word_t   dmem_rdata,
  // operating system: page present bits and fault report
  input  logic    os_page_we,
  input  word_t   os_page_addr,
  input  logic    os_page_present,
  output logic    os_fault,
  output word_t   os_fault_pc,
  output word_t   os_fault_addr,
  // external interrupt
  input  logic    irq,
  output logic    irq_ack,
  output word_t   irq_pc,
  // status and retirement trace
  output logic    halted,
  output logic    ret_valid,
  output word_t   ret_pc,
  output logic    ret_rf_we,
  output areg_t   ret_rd,
  output word_t   ret_value,
  output logic    ret_st_we,
  output word_t   ret_st_addr,
  output word_t   ret_st_data,
  output events_t events
);
  // ---------------- wires ----------------
  logic       flush, take;
  word_t      redirect_pc;
  logic       fq_valid;
  word_t      fq_insn, fq_pc;

  areg_t      src_a, src_b;
  tag_t       map_tag_a, map_tag_b;
  logic       map_rdy_a, map_rdy_b;
  word_t      rf_a, rf_b, rob_a, rob_b;
  logic       map_we;
  areg_t      map_reg;
  tag_t       map_tag;

  logic [NUM_RS-1:0] rs_alloc, rs_busy, fu_ready, rs_capt;
  rs_t        rs_new;
  rs_t        rs_q    [NUM_RS];
  issue_t     iss     [NUM_RS];

  logic       rob_alloc, rob_full;
  rob_entry_t rob_new, rob_head;
  tag_t       rob_tail, rob_head_tag;
  logic       rob_head_viol;

  logic       lsq_alloc, lsq_store, lsq_full;
  lsq_idx_t   lsq_tail;
  logic       lsq_ld_we, lsq_st_we, lsq_fwd_hit, lsq_pop;
  lsq_idx_t   lsq_ld_idx, lsq_st_idx;
  word_t      lsq_ld_addr, lsq_st_addr, lsq_st_data, lsq_fwd_data;
  logic [ROB_DEPTH:1] lsq_viol;
  logic       lsq_head_store;
  word_t      lsq_head_addr, lsq_head_data;

  result_t    cres    [4];
  logic [3:0] cgrant;
  cdb_t       cdb;
  logic       cdb_conflict;

  word_t      ld_mem_addr, ld_mem_data, st_chk_addr;
  logic       ld_mem_fault, st_chk_fault;
  logic       st_done;
  tag_t       st_done_tag;
  exc_t       st_done_exc;
  word_t      st_done_addr;

  logic       retire, rf_we, map_clr, mem_we, halt_now, ret_stall;
  areg_t      rf_waddr, map_clr_reg;
  tag_t       map_clr_tag;
  word_t      rf_wdata, mem_addr, mem_data;
  logic       stall_rob, stall_rs, stall_lsq, from_rob, from_cdb;
  logic       fl_fault, fl_order, fl_branch;

  // ---------------- F ----------------
  fetch_unit #(.WORDS(IMEM_WORDS)) u_fetch (
    .clk, .rst_n, .run, .take, .redirect(flush), .redirect_pc,
    .fq_valid, .fq_insn, .fq_pc, .imem_we, .imem_addr, .imem_wdata
  );

  // ---------------- D ----------------
  for (genvar i = 0; i < NUM_RS; i++) begin : g_busy
    assign rs_busy[i] = rs_q[i].busy;
  end

  dispatch_unit u_disp (
    .fq_valid, .fq_insn, .fq_pc, .flush,
    .src_a, .src_b, .map_tag_a, .map_rdy_a, .map_tag_b, .map_rdy_b,
    .rf_a, .rf_b, .rob_a, .rob_b, .cdb,
    .rs_busy, .rob_full, .rob_tail, .lsq_full, .lsq_tail,
    .take, .rs_alloc, .rs_new, .rob_alloc, .rob_new, .lsq_alloc, .lsq_store,
    .map_we, .map_reg, .map_tag,
    .stall_rob, .stall_rs, .stall_lsq, .from_rob, .from_cdb
  );

  map_table u_map (
    .clk, .rst_n, .flush,
    .rd_a(src_a), .tag_a(map_tag_a), .rdy_a(map_rdy_a),
    .rd_b(src_b), .tag_b(map_tag_b), .rdy_b(map_rdy_b),
    .disp_we(map_we), .disp_reg(map_reg), .disp_tag(map_tag),
    .cdb_valid(cdb.valid), .cdb_tag(cdb.tag),
    .ret_valid(map_clr), .ret_reg(map_clr_reg), .ret_tag(map_clr_tag)
  );

  regfile u_rf (
    .clk, .rst_n,
    .raddr1(src_a), .rdata1(rf_a), .raddr2(src_b), .rdata2(rf_b),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata)
  );

  rob u_rob (
    .clk, .rst_n, .flush,
    .alloc(rob_alloc), .alloc_entry(rob_new), .alloc_tag(rob_tail), .full(rob_full),
    .cdb, .st_done, .st_tag(st_done_tag), .st_exc(st_done_exc), .st_addr(st_done_addr),
    .viol_set(lsq_viol),
    .rtag_a(map_tag_a), .rval_a(rob_a), .rtag_b(map_tag_b), .rval_b(rob_b),
    .head_tag(rob_head_tag), .head(rob_head), .head_viol(rob_head_viol),
    .retire, .empty()
  );

  lsq u_lsq (
    .clk, .rst_n, .flush,
    .alloc(lsq_alloc), .alloc_store(lsq_store), .alloc_tag(rob_tail),
    .alloc_idx(lsq_tail), .full(lsq_full),
    .ld_we(lsq_ld_we), .ld_idx(lsq_ld_idx), .ld_addr(lsq_ld_addr),
    .fwd_hit(lsq_fwd_hit), .fwd_data(lsq_fwd_data),
    .st_we(lsq_st_we), .st_idx(lsq_st_idx), .st_addr(lsq_st_addr), .st_data(lsq_st_data),
    .viol(lsq_viol),
    .pop(lsq_pop), .head_store(lsq_head_store), .head_addr(lsq_head_addr),
    .head_data(lsq_head_data)
  );

  // ---------------- S: reservation stations ----------------
  for (genvar i = 0; i < NUM_RS; i++) begin : g_rs
    rs_entry u_rs (
      .clk, .rst_n, .flush,
      .alloc(rs_alloc[i]), .alloc_rs(rs_new), .cdb,
      .fu_ready(fu_ready[i]), .rs(rs_q[i]), .issue(iss[i]), .captured(rs_capt[i])
    );
  end

  // ---------------- X / C: functional units ----------------
  fp_mul u_fp1 (
    .clk, .rst_n, .flush, .in(iss[RS_FP1]), .fu_ready(fu_ready[RS_FP1]),
    .res(cres[0]), .grant(cgrant[0])
  );

  fp_mul u_fp2 (
    .clk, .rst_n, .flush, .in(iss[RS_FP2]), .fu_ready(fu_ready[RS_FP2]),
    .res(cres[1]), .grant(cgrant[1])
  );

  load_unit u_ld (
    .clk, .rst_n, .flush, .in(iss[RS_LD]), .fu_ready(fu_ready[RS_LD]),
    .res(cres[2]), .grant(cgrant[2]),
    .mem_addr(ld_mem_addr), .mem_data(ld_mem_data), .mem_fault(ld_mem_fault),
    .lsq_we(lsq_ld_we), .lsq_idx(lsq_ld_idx), .lsq_addr(lsq_ld_addr),
    .fwd_hit(lsq_fwd_hit), .fwd_data(lsq_fwd_data)
  );

  alu_unit u_alu (
    .clk, .rst_n, .flush, .in(iss[RS_ALU]), .fu_ready(fu_ready[RS_ALU]),
    .res(cres[3]), .grant(cgrant[3])
  );

  store_unit u_st (
    .clk, .rst_n, .flush, .in(iss[RS_ST]), .fu_ready(fu_ready[RS_ST]),
    .chk_addr(st_chk_addr), .chk_fault(st_chk_fault),
    .lsq_we(lsq_st_we), .lsq_idx(lsq_st_idx), .lsq_addr(lsq_st_addr), .lsq_data(lsq_st_data),
    .done(st_done), .done_tag(st_done_tag), .done_exc(st_done_exc), .done_addr(st_done_addr)
  );

  cdb_arbiter #(.NREQ(4)) u_cdb (
    .req(cres), .grant(cgrant), .cdb, .conflict(cdb_conflict)
  );

  dcache #(.WORDS(DMEM_WORDS), .PAGE_BYTES(PAGE_BYTES)) u_dc (
    .clk, .rst_n,
    .ld_addr(ld_mem_addr), .ld_data(ld_mem_data), .ld_fault(ld_mem_fault),
    .st_addr(st_chk_addr), .st_fault(st_chk_fault),
    .we(mem_we), .waddr(mem_addr), .wdata(mem_data),
    .host_we(dmem_we), .host_addr(dmem_addr), .host_wdata(dmem_wdata), .host_rdata(dmem_rdata),
    .os_we(os_page_we), .os_addr(os_page_addr), .os_present(os_page_present)
  );

  // ---------------- R ----------------
  retire_unit u_ret (
    .head(rob_head), .head_tag(rob_head_tag), .head_viol(rob_head_viol), .irq,
    .lsq_addr(lsq_head_addr), .lsq_data(lsq_head_data),
    .retire, .rf_we, .rf_waddr, .rf_wdata,
    .map_clr, .map_reg(map_clr_reg), .map_tag(map_clr_tag),
    .mem_we, .mem_addr, .mem_data, .lsq_pop,
    .flush, .redirect_pc, .os_fault, .os_fault_pc, .os_fault_addr,
    .halt(halt_now), .stall(ret_stall),
    .flush_fault(fl_fault), .flush_order(fl_order), .flush_branch(fl_branch),
    .irq_ack, .irq_pc
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        halted <= 1'b0;
    else if (halt_now) halted <= 1'b1;
  end

  // ---------------- trace and events ----------------
  assign ret_valid   = retire;
  assign ret_pc      = rob_head.pc;
  assign ret_rf_we   = rf_we;
  assign ret_rd      = rf_waddr;
  assign ret_value   = rf_wdata;
  assign ret_st_we   = mem_we;
  assign ret_st_addr = mem_addr;
  assign ret_st_data = mem_data;

  always_comb begin
    events                = '0;
    events.dispatch       = take;
    events.stall_rob_full = stall_rob;
    events.stall_rs_full  = stall_rs;
    events.stall_lsq_full = stall_lsq;
    events.src_from_rob   = from_rob;
    events.src_from_cdb   = from_cdb;
    events.rs_cdb_capture = |rs_capt;
    events.cdb_conflict   = cdb_conflict;
    events.retire         = retire;
    events.retire_stall   = ret_stall;
    events.store_commit   = mem_we;
    events.load_forward   = lsq_ld_we && lsq_fwd_hit;
    events.flush_fault    = fl_fault;
    events.flush_order    = fl_order;
    events.flush_branch   = fl_branch;
    events.flush_irq      = irq_ack;
  end

  always_ff @(posedge clk) begin
    if (mem_we) assert (lsq_head_store);
  end
endmodule
