// nr_clause_reg: the stateful register array of one NETREACT conjunction
// lane. Entry k is the bitmap of clause k (k = Clause ID); each bit holds the
// latest Boolean value of one atomic predicate of that OR-clause, so the
// clause is true when any bit is set.
//
// A packet whose predicate was evaluated merges its result into the stored
// bitmap: a true result ORs the bit in, a false result ANDs it out. The new
// bitmap is written back and also tells whether the clause is now true. A
// packet with no evaluation (NOP, or no bit position found) only reads the
// stored bitmap. The array is accessed once per packet, read-modify-write in
// a single cycle, as a switch register would be. Bitmaps read as zero after
// reset (a per-entry valid bit is cleared); clr_* clears one entry.
//
// Timing: in_* at cycle t, out_* at t+1. A packet at t+1 already sees the
// write of the packet at t. This merging scheme is the document's; the reset
// and clear port are this design's own.
module nr_clause_reg
  import nr_pkg::*;
#(
  parameter int unsigned DEPTH = 2 ** CLAUSE_ID_W
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,     // packet uses this lane's clause
  input  clause_id_t in_clause_id,
  input  logic       in_update,    // merge in_result at in_bitpos
  input  logic       in_result,
  input  bitpos_t    in_bitpos,
  input  logic       clr_en,
  input  clause_id_t clr_clause_id,
  output logic       out_valid,
  output logic       out_clause_true,
  output bitmap_t    out_bitmap
);

  bitmap_t          mem [DEPTH];
  logic [DEPTH-1:0] vld;

  bitmap_t cur, mask, nxt;
  always_comb begin
    cur  = vld[in_clause_id] ? mem[in_clause_id] : '0;
    mask = bitmap_t'(1) << in_bitpos;
    if (!in_update)     nxt = cur;
    else if (in_result) nxt = cur | mask;
    else                nxt = cur & ~mask;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_update) mem[in_clause_id] <= nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld             <= '0;
      out_valid       <= 1'b0;
      out_clause_true <= 1'b0;
      out_bitmap      <= '0;
    end else begin
      if (clr_en) vld[clr_clause_id] <= 1'b0;
      if (in_valid && in_update) vld[in_clause_id] <= 1'b1;
      out_valid       <= in_valid;
      out_clause_true <= in_valid && (|nxt);
      out_bitmap      <= in_valid ? nxt : '0;
    end
  end

endmodule
