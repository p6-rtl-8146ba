// map_table: register renaming table of the P6 core ("T+" column).
//
// For every architectural register it keeps the ROB# of the youngest
// in-flight instruction that writes it (tag 0: the value is in the register
// file) and a ready-in-ROB bit ("+": that instruction has completed and its
// value sits in the ROB). Dispatch reads two source entries and writes the
// destination entry with the new ROB# and a clear "+" bit. A CDB broadcast
// sets "+" on the entry that still holds the broadcast tag; retire clears the
// entry to 0 if it still holds the retiring tag. A flush clears everything.
// Reads are combinational and see the state before this cycle's updates;
// a dispatch write takes priority over a CDB or retire update of the same
// register. All of this follows the document; only the priority order and
// the asynchronous reset are this design's wording of it.
module map_table
  import p6_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  // dispatch reads
  input  areg_t rd_a,
  output tag_t  tag_a,
  output logic  rdy_a,
  input  areg_t rd_b,
  output tag_t  tag_b,
  output logic  rdy_b,
  // dispatch write of the destination
  input  logic  disp_we,
  input  areg_t disp_reg,
  input  tag_t  disp_tag,
  // complete: CDB broadcast
  input  logic  cdb_valid,
  input  tag_t  cdb_tag,
  // retire
  input  logic  ret_valid,
  input  areg_t ret_reg,
  input  tag_t  ret_tag
);
  tag_t tag_q [NUM_AREGS];
  logic rdy_q [NUM_AREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_AREGS; i++) begin
        tag_q[i] <= '0;
        rdy_q[i] <= 1'b0;
      end
    end else if (flush) begin
      for (int i = 0; i < NUM_AREGS; i++) begin
        tag_q[i] <= '0;
        rdy_q[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < NUM_AREGS; i++) begin
        if (disp_we && disp_reg == areg_t'(i)) begin
          tag_q[i] <= disp_tag;
          rdy_q[i] <= 1'b0;
        end else if (ret_valid && ret_reg == areg_t'(i) && tag_q[i] == ret_tag) begin
          tag_q[i] <= '0;
          rdy_q[i] <= 1'b0;
        end else if (cdb_valid && tag_q[i] != '0 && tag_q[i] == cdb_tag) begin
          rdy_q[i] <= 1'b1;
        end
      end
    end
  end

  assign tag_a = tag_q[rd_a];
  assign rdy_a = rdy_q[rd_a];
  assign tag_b = tag_q[rd_b];
  assign rdy_b = rdy_q[rd_b];
endmodule
