// regfile: the architectural register file of the P6 core.
//
// It holds only committed state: the single write port is driven by the
// retire stage, which copies the value of the instruction at the ROB head
// into its output register. Two asynchronous read ports serve dispatch,
// which reads the registers whose map-table tag is 0. A write becomes
// visible on the read ports from the next cycle. All registers reset to 0.
// The two read ports and one write port follow from the document's
// single-issue pipeline; the reset value and register count are this
// design's choices.
module regfile
  import p6_pkg::*;
#(
  parameter int unsigned NREGS = NUM_AREGS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] raddr1,
  output word_t                    rdata1,
  input  logic [$clog2(NREGS)-1:0] raddr2,
  output word_t                    rdata2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  word_t                    wdata
);
  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = regs[raddr1];
  assign rdata2 = regs[raddr2];
endmodule
