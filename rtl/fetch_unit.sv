// fetch_unit: the F stage of the P6 core: program counter, instruction
// memory and the one-entry fetch register that feeds dispatch.
//
// While run is high, the unit reads the word at the PC and places it, with
// its PC, in the fetch register whenever that register is empty or being
// taken by dispatch (take), and then steps the PC by 4. Fetch is always in
// sequence (a branch is predicted not taken). A redirect from retire (a taken
// branch, or a faulting instruction to be fetched again) overrides all
// of this: the word at the new PC is loaded into the fetch register in the
// same cycle, so dispatch can use it in the next. After fetching a HALT the
// unit stops until a redirect. The host loads the instruction memory
// through the imem_* port while run is low.
// Timing: a word fetched in cycle n is dispatched at the earliest in n+1.
// The F stage is the document's; everything in it is this design's choice.
module fetch_unit
  import p6_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  run,
  input  logic  take,
  input  logic  redirect,
  input  word_t redirect_pc,
  output logic  fq_valid,
  output word_t fq_insn,
  output word_t fq_pc,
  // host load of the instruction memory
  input  logic  imem_we,
  input  word_t imem_addr,
  input  word_t imem_wdata
);
  localparam int unsigned IW = $clog2(WORDS);

  word_t mem [WORDS];
  word_t pc_q, fpc, finsn;
  logic  stopped_q, load;

  assign fpc   = redirect ? redirect_pc : pc_q;
  assign finsn = mem[fpc[2 +: IW]];
  assign load  = redirect || (run && !stopped_q && (!fq_valid || take));

  always_ff @(posedge clk) begin
    if (imem_we) mem[imem_addr[2 +: IW]] <= imem_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q      <= '0;
      stopped_q <= 1'b0;
      fq_valid  <= 1'b0;
      fq_insn   <= '0;
      fq_pc     <= '0;
    end else if (load) begin
      fq_valid  <= 1'b1;
      fq_insn   <= finsn;
      fq_pc     <= fpc;
      pc_q      <= fpc + 32'd4;
      stopped_q <= (opcode_t'(finsn[31:28]) == OP_HALT);
    end else if (take) begin
      fq_valid  <= 1'b0;
    end
  end
endmodule
