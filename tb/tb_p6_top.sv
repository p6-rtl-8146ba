// tb_p6_top: end-to-end test of the P6 core at its default sizes.
//
// A reference interpreter in this testbench executes each program on its
// own copy of registers and memory; every retirement of the core (PC,
// register write, store) must match the interpreter's next instruction, and
// the data memory must match at the end. Programs:
//   1. the seven-instruction example of the P6 walk-through (ldf, mulf, stf,
//      addi, ldf, mulf, stf); the cycle of every dispatch, CDB broadcast and
//      retirement is checked against the walk-through's table;
//   2. the same program with the first store's page not present: the store
//      faults at the ROB head, everything is cleared, the handler maps the
//      page and the store is fetched again (precise state);
//   3. the example as a loop (y[i] = a * x[i], 16 elements, with BNE);
//   4. a program that fills the ROB behind a long multiply chain;
//   5. random programs with forward branches and many loads and stores to a
//      few words, which exercise forwarding and the load/store order check;
//      half of them, and a second run of the loop, with random interrupt
//      requests. An interrupt changes no architectural state, so the same
//      reference applies; in addition the first retirement after each
//      irq_ack must be the instruction at irq_pc (precise interrupt).
// Every mechanism (each stall, bypass, flush) must occur at least once.
`timescale 1ns/1ps
module tb_p6_top;
  import p6_pkg::*;

  logic clk = 0, rst_n = 0, run = 0;
  always #5 clk = ~clk;

  logic    imem_we = 0, dmem_we = 0, os_page_we = 0, os_page_present = 0;
  word_t   imem_addr = 0, imem_wdata = 0, dmem_addr = 0, dmem_wdata = 0, os_page_addr = 0;
  word_t   dmem_rdata, os_fault_pc, os_fault_addr, ret_pc, ret_value, ret_st_addr, ret_st_data;
  logic    os_fault, halted, ret_valid, ret_rf_we, ret_st_we;
  logic    irq = 0, irq_ack;
  word_t   irq_pc;
  areg_t   ret_rd;
  events_t ev;

  p6_top dut (
    .clk, .rst_n, .run, .imem_we, .imem_addr, .imem_wdata,
    .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .os_page_we, .os_page_addr, .os_page_present, .os_fault, .os_fault_pc, .os_fault_addr,
    .irq, .irq_ack, .irq_pc,
    .halted, .ret_valid, .ret_pc, .ret_rf_we, .ret_rd, .ret_value,
    .ret_st_we, .ret_st_addr, .ret_st_data, .events(ev)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- encoding ----------------
  localparam areg_t R0 = 0, R1 = 1, R2 = 2, R3 = 3, F0 = 8, F1 = 9, F2 = 10;
  function automatic word_t enc(opcode_t op, areg_t rd, areg_t ra, areg_t rb, int imm);
    return {op, rd, ra, rb, 16'(imm)};
  endfunction

  // ---------------- reference model ----------------
  function automatic word_t fpmul_ref(word_t a, word_t b);
    logic [7:0] ea = a[30:23], eb = b[30:23];
    logic za = ea == 0, zb = eb == 0;
    logic ia = ea == 8'hFF && a[22:0] == 0, ib = eb == 8'hFF && b[22:0] == 0;
    logic na = ea == 8'hFF && a[22:0] != 0, nb = eb == 8'hFF && b[22:0] != 0;
    logic s = a[31] ^ b[31];
    real  da, db, p;
    logic [63:0] bits;
    int   de;
    logic [23:0] keep;
    if (na || nb || (ia && zb) || (ib && za)) return 32'h7FC00000;
    if (ia || ib) return {s, 8'hFF, 23'd0};
    if (za || zb) return {s, 31'd0};
    da = $bitstoreal({1'b0, 11'(int'(ea) - 127 + 1023), a[22:0], 29'd0});
    db = $bitstoreal({1'b0, 11'(int'(eb) - 127 + 1023), b[22:0], 29'd0});
    p = da * db;
    bits = $realtobits(p);
    de = int'(bits[62:52]) - 1023 + 127;
    keep = {1'b0, bits[51:29]};
    if (bits[28] && (|bits[27:0] || bits[29])) keep = keep + 1;
    if (keep[23]) begin keep = 0; de = de + 1; end
    if (de >= 255) return {s, 8'hFF, 23'd0};
    if (de <= 0) return {s, 31'd0};
    return {s, 8'(de), keep[22:0]};
  endfunction

  word_t prog [256];
  int    plen;
  word_t dmem_init [256];
  logic  page_absent [16];

  // expected retirement trace
  word_t e_pc [$];
  bit    e_we [$];
  areg_t e_rd [$];
  word_t e_val [$];
  bit    e_st [$];
  word_t e_sa [$], e_sd [$];
  word_t ref_mem [256];

  task automatic run_ref();
    word_t r [16];
    word_t pc = 0;
    int steps = 0;
    foreach (r[i]) r[i] = 0;
    foreach (ref_mem[i]) ref_mem[i] = dmem_init[i];
    e_pc.delete(); e_we.delete(); e_rd.delete(); e_val.delete();
    e_st.delete(); e_sa.delete(); e_sd.delete();
    while (steps < 20000) begin
      word_t in, imm, v, a, npc;
      opcode_t op;
      areg_t rd, ra, rb;
      bit we, st;
      in = prog[pc[9:2]];
      op = opcode_t'(in[31:28]);
      rd = in[27:24]; ra = in[23:20]; rb = in[19:16];
      imm = {{16{in[15]}}, in[15:0]};
      v = 0; a = 0; we = 0; st = 0;
      npc = pc + 4;
      steps++;
      case (op)
        OP_ADD:  begin v = r[ra] + r[rb]; we = 1; end
        OP_SUB:  begin v = r[ra] - r[rb]; we = 1; end
        OP_ADDI: begin v = r[ra] + imm; we = 1; end
        OP_MULF: begin v = fpmul_ref(r[ra], r[rb]); we = 1; end
        OP_LDF:  begin a = r[rb] + imm; v = ref_mem[a[9:2]]; we = 1; end
        OP_STF:  begin a = r[rb] + imm; st = 1; end
        OP_BNE:  if (r[ra] != r[rb]) npc = pc + imm;
        default: ;
      endcase
      e_pc.push_back(pc); e_we.push_back(we); e_rd.push_back(rd); e_val.push_back(v);
      e_st.push_back(st); e_sa.push_back(a); e_sd.push_back(r[ra]);
      if (st) ref_mem[a[9:2]] = r[ra];
      if (we) r[rd] = v;
      if (!(op inside {OP_ADD, OP_SUB, OP_ADDI, OP_MULF, OP_LDF, OP_STF, OP_BNE})) break;
      pc = npc;
    end
  endtask

  // ---------------- monitor ----------------
  int cyc, first_disp;
  int disp_cyc [$], ret_cyc [$], cdb_cyc [$], cdb_tag [$];
  int n_ev [16];
  bit monitor_on = 0;
  bit irq_on = 0, irq_expect = 0;
  word_t irq_expect_pc;

  // interrupt requester: raises irq at random, drops it after irq_ack
  always @(posedge clk) begin
    if (monitor_on && irq_on) begin
      if (irq_ack)                                irq <= 0;
      else if (!irq && $urandom_range(0, 24) == 0) irq <= 1;
    end else irq <= 0;
  end

  always @(negedge clk) begin
    if (monitor_on) begin
      cyc++;
      if (ev.dispatch && first_disp < 0) first_disp = cyc;
      if (ev.dispatch) disp_cyc.push_back(cyc - first_disp + 1);
      if (dut.cdb.valid) begin
        cdb_cyc.push_back(cyc - first_disp + 1);
        cdb_tag.push_back(int'(dut.cdb.tag));
      end
      for (int i = 0; i < 16; i++) n_ev[i] += int'(ev[15 - i]);
      if (irq_ack) begin
        // a second interrupt before any retirement must name the same place
        if (irq_expect)
          check(irq_pc == irq_expect_pc, $sformatf("irq_pc %h changed to %h with no retirement", irq_expect_pc, irq_pc));
        irq_expect    = 1;
        irq_expect_pc = irq_pc;
      end
      if (ret_valid && irq_expect) begin
        check(ret_pc == irq_expect_pc, $sformatf("resume after interrupt at %h exp %h", ret_pc, irq_expect_pc));
        irq_expect = 0;
      end
      if (ret_valid) begin
        ret_cyc.push_back(cyc - first_disp + 1);
        if (e_pc.size() == 0) check(0, "retirement beyond end of program");
        else begin
          word_t p, v, sa, sd;
          bit w, s;
          areg_t d;
          p = e_pc.pop_front();
          w = e_we.pop_front();
          d = e_rd.pop_front();
          v = e_val.pop_front();
          s = e_st.pop_front();
          sa = e_sa.pop_front();
          sd = e_sd.pop_front();
          check(ret_pc == p, $sformatf("retire pc %h exp %h", ret_pc, p));
          check(ret_rf_we == w, $sformatf("retire pc %h reg write %0b exp %0b", p, ret_rf_we, w));
          if (w) check(ret_rd == d && ret_value == v,
                       $sformatf("retire pc %h r%0d=%h exp r%0d=%h", p, ret_rd, ret_value, d, v));
          check(ret_st_we == s, $sformatf("retire pc %h store %0b exp %0b", p, ret_st_we, s));
          if (s) check(ret_st_addr[9:2] == sa[9:2] && ret_st_data == sd,
                       $sformatf("store [%h]=%h exp [%h]=%h", ret_st_addr, ret_st_data, sa, sd));
        end
      end
      // operating system: map the faulting page
      os_page_we <= 0;
      if (os_fault) begin
        os_page_we      <= 1;
        os_page_addr    <= os_fault_addr;
        os_page_present <= 1;
      end
    end
  end

  // ---------------- program runner ----------------
  task automatic run_program(string name, int max_cycles);
    int t;
    run_ref();
    rst_n = 0; run = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      imem_we = 1; imem_addr = i * 4; imem_wdata = (i < plen) ? prog[i] : enc(OP_HALT, 0, 0, 0, 0);
      dmem_we = 1; dmem_addr = i * 4; dmem_wdata = dmem_init[i];
      @(negedge clk);
    end
    imem_we = 0; dmem_we = 0;
    for (int p = 0; p < 16; p++) if (page_absent[p]) begin
      os_page_we = 1; os_page_addr = p * 64; os_page_present = 0;
      @(negedge clk);
    end
    os_page_we = 0;
    cyc = 0; first_disp = -1; irq_expect = 0;
    disp_cyc.delete(); ret_cyc.delete(); cdb_cyc.delete(); cdb_tag.delete();
    monitor_on = 1;
    run = 1;
    t = 0;
    while (!halted && t < max_cycles) begin @(negedge clk); t++; end
    monitor_on = 0;
    run = 0;
    check(halted, {name, ": halted"});
    check(e_pc.size() == 0, $sformatf("%s: %0d instructions not retired", name, e_pc.size()));
    check(!irq_expect, {name, ": no retirement after the last interrupt"});
    for (int i = 0; i < 256; i++) begin
      dmem_addr = i * 4;
      #1;
      if (dmem_rdata != ref_mem[i]) begin
        check(0, $sformatf("%s: mem[%0d]=%h exp %h", name, i, dmem_rdata, ref_mem[i]));
        break;
      end
    end
    checks++;
    $display("%s: %0d cycles, %0d dispatches", name, cyc, disp_cyc.size());
  endtask

  function automatic word_t rand_float();
    return {1'($urandom), 8'(110 + $urandom_range(0, 34)), 23'($urandom)};
  endfunction

  task automatic load_example();
    foreach (prog[i]) prog[i] = 0;
    prog[0] = enc(OP_LDF,  F1, R0, R1, 'h100);  // ldf X(r1), f1
    prog[1] = enc(OP_MULF, F2, F0, F1, 0);      // mulf f0, f1, f2
    prog[2] = enc(OP_STF,  R0, F2, R1, 'h200);  // stf f2, Z(r1)
    prog[3] = enc(OP_ADDI, R1, R1, R0, 4);      // addi r1, 4, r1
    prog[4] = enc(OP_LDF,  F1, R0, R1, 'h100);
    prog[5] = enc(OP_MULF, F2, F0, F1, 0);
    prog[6] = enc(OP_STF,  R0, F2, R1, 'h200);
    prog[7] = enc(OP_HALT, 0, 0, 0, 0);
    plen = 8;
    foreach (dmem_init[i]) dmem_init[i] = rand_float();
    foreach (page_absent[i]) page_absent[i] = 0;
  endtask

  function automatic bit same(int q [$], int e [$]);
    if (q.size() != e.size()) return 0;
    foreach (q[i]) if (q[i] != e[i]) return 0;
    return 1;
  endfunction

  function automatic string show(int q [$]);
    string s = "";
    foreach (q[i]) s = {s, $sformatf("%0d ", q[i])};
    return s;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_disp [$], exp_cdb_c [$], exp_cdb_t [$], exp_ret [$];
    foreach (n_ev[i]) n_ev[i] = 0;

    // ---- 1. walk-through example ----
    load_example();
    run_program("example", 200);
    // dispatch c1..c6, stf #7 stalls (no free ST station) until c9, halt c10
    exp_disp = '{1, 2, 3, 4, 5, 6, 9, 10};
    // CDB: ROB#1 c4, ROB#4 c7, ROB#2 c8, ROB#5 c9, ROB#6 c13
    exp_cdb_c = '{4, 7, 8, 9, 13};
    exp_cdb_t = '{1, 4, 2, 5, 6};
    // retire: ldf c5, mulf c9, stf c11, addi c12, ldf c13, mulf c14, stf c16, halt c17
    exp_ret = '{5, 9, 11, 12, 13, 14, 16, 17};
    check(same(disp_cyc, exp_disp), {"example dispatch cycles: ", show(disp_cyc)});
    check(same(cdb_cyc, exp_cdb_c), {"example CDB cycles: ", show(cdb_cyc)});
    check(same(cdb_tag, exp_cdb_t), {"example CDB tags: ", show(cdb_tag)});
    check(same(ret_cyc, exp_ret), {"example retire cycles: ", show(ret_cyc)});

    // ---- 2. precise state: page fault in the first stf ----
    load_example();
    page_absent[8] = 1;            // Z(r1) = 0x200 lies in page 8
    run_program("page_fault", 300);
    check(n_ev[12] >= 1, "page fault flush happened");
    // the store faults at the head in c11 and is dispatched again as ROB#3 in c12
    check(disp_cyc.size() > 8 && disp_cyc[8] == 12, {"refetch after fault: ", show(disp_cyc)});

    // ---- 3. the example as a loop over 16 elements ----
    foreach (prog[i]) prog[i] = 0;
    prog[0] = enc(OP_ADDI, R3, R0, R0, 64);      // r3 = 16 * 4
    prog[1] = enc(OP_LDF,  F0, R0, R0, 'h0);     // f0 = a
    prog[2] = enc(OP_LDF,  F1, R0, R1, 'h100);   // loop: ldf X(r1), f1
    prog[3] = enc(OP_MULF, F2, F0, F1, 0);
    prog[4] = enc(OP_STF,  R0, F2, R1, 'h200);
    prog[5] = enc(OP_ADDI, R1, R1, R0, 4);
    prog[6] = enc(OP_BNE,  R0, R1, R3, -16);
    prog[7] = enc(OP_HALT, 0, 0, 0, 0);
    plen = 8;
    foreach (dmem_init[i]) dmem_init[i] = rand_float();
    run_program("loop", 2000);
    irq_on = 1;
    run_program("loop_irq", 4000);
    irq_on = 0;

    // ---- 4. ROB fills behind a multiply chain ----
    foreach (prog[i]) prog[i] = 0;
    prog[0] = enc(OP_LDF,  F0, R0, R0, 'h0);
    for (int i = 1; i <= 4; i++) prog[i] = enc(OP_MULF, F0, F0, F0, 0);
    for (int i = 5; i <= 16; i++) prog[i] = enc(OP_ADDI, areg_t'(1 + i % 6), R0, R0, i);
    prog[17] = enc(OP_HALT, 0, 0, 0, 0);
    plen = 18;
    dmem_init[0] = 32'h3F80_0001;
    run_program("rob_full", 500);

    // ---- 5. random programs ----
    for (int seed = 0; seed < 200; seed++) begin
      foreach (prog[i]) prog[i] = 0;
      plen = 48;
      for (int i = 0; i < plen - 1; i++) begin
        int k, off;
        areg_t rd, ra, rb;
        k   = $urandom_range(0, 9);
        rd  = areg_t'($urandom_range(1, 15));
        ra  = areg_t'($urandom_range(0, 15));
        rb  = areg_t'($urandom_range(0, 15));
        off = 4 * $urandom_range(0, 5);
        case (k)
          0:    prog[i] = enc(OP_ADD, rd, ra, rb, 0);
          1:    prog[i] = enc(OP_SUB, rd, ra, rb, 0);
          2:    prog[i] = enc(OP_ADDI, rd, ra, R0, int'($urandom_range(0, 200)) - 100);
          3:    prog[i] = enc(OP_MULF, rd, ra, rb, 0);
          4, 5: prog[i] = enc(OP_LDF, rd, R0, R0, off);
          6, 7: prog[i] = enc(OP_STF, R0, ra, R0, off);
          8:    prog[i] = enc(OP_BNE, R0, ra, rb, 4 * $urandom_range(1, 3));
          default: prog[i] = enc(OP_MULF, rd, ra, ra, 0);
        endcase
        if (i + 4 > plen && k == 8) prog[i] = enc(OP_ADD, rd, ra, rb, 0);
      end
      prog[plen - 1] = enc(OP_HALT, 0, 0, 0, 0);
      foreach (dmem_init[i]) dmem_init[i] = rand_float();
      irq_on = seed >= 100;
      run_program($sformatf("random%0d", seed), 4000);
    end

    // ---- every mechanism happened ----
    begin
      string names [16] = '{"dispatch", "stall_rob_full", "stall_rs_full", "stall_lsq_full",
                            "src_from_rob", "src_from_cdb", "rs_cdb_capture", "cdb_conflict",
                            "retire", "retire_stall", "store_commit", "load_forward",
                            "flush_fault", "flush_order", "flush_branch", "flush_irq"};
      for (int i = 0; i < 16; i++) begin
        $display("event %-15s %0d", names[i], n_ev[i]);
        check(n_ev[i] > 0, {"mechanism never happened: ", names[i]});
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
