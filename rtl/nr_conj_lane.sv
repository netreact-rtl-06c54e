// nr_conj_lane: one of the n conjunction stages of the NETREACT pipeline. It
// evaluates, for each sensor packet, the (at most one) clause that this lane
// holds for the packet's sensor and keeps that clause's state.
//
// Pipeline (one packet per cycle, no stalls):
//   L0  conjunction table looked up with the sensor ID     (nr_conj_table)
//   L1  preparation: operands minus the sensor value       (nr_prep)
//   L2  sign check gives the predicate result              (nr_pred_eval),
//       bit position looked up by {sensor ID, Clause ID}   (nr_bitpos_table)
//   L3  clause bitmap read, merged (AND/OR), written back  (nr_clause_reg)
// out_* appear 4 cycles after in_*. out_used says the lane had a clause for
// this sensor; out_clause_true is then that clause's value after the update.
// The order of operations is the document's; the exact register stages are
// this design's own.
module nr_conj_lane
  import nr_pkg::*;
#(
  parameter int unsigned BITPOS_DEPTH = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  // packet
  input  logic       in_valid,      // sensor packet
  input  sensor_id_t in_sensor_id,
  input  value_t     in_value,
  // control plane
  input  logic       tbl_wr_en,
  input  sensor_id_t tbl_wr_sensor_id,
  input  conj_entry_t tbl_wr_entry,
  input  logic       bp_wr_en,
  input  logic [7:0] bp_wr_index,
  input  logic       bp_wr_valid,
  input  sensor_id_t bp_wr_sensor_id,
  input  clause_id_t bp_wr_clause_id,
  input  bitpos_t    bp_wr_bitpos,
  input  logic       clr_en,
  input  clause_id_t clr_clause_id,
  // result
  output logic       out_valid,
  output logic       out_used,
  output logic       out_clause_true,
  output bitmap_t    out_bitmap
);

  // ---------------- L0: table lookup --------------------------------------
  conj_entry_t ent1;
  logic        v1;
  sensor_id_t  sid1;
  value_t      val1;

  nr_conj_table u_tbl (
    .clk, .rst_n,
    .wr_en(tbl_wr_en), .wr_sensor_id(tbl_wr_sensor_id), .wr_entry(tbl_wr_entry),
    .lk_sensor_id(in_sensor_id), .lk_entry(ent1)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; sid1 <= '0; val1 <= '0;
    end else begin
      v1 <= in_valid; sid1 <= in_sensor_id; val1 <= in_value;
    end
  end

  // ---------------- L1: preparation ---------------------------------------
  diff_t da1, db1;
  nr_prep u_prep (.value(val1), .opnd_a(ent1.opnd_a), .opnd_b(ent1.opnd_b),
                  .diff_a(da1), .diff_b(db1));

  logic       v2, use2;
  sensor_id_t sid2;
  clause_id_t cid2;
  op_e        op2;
  diff_t      da2, db2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; use2 <= 1'b0; sid2 <= '0; cid2 <= '0; op2 <= OP_NOP; da2 <= '0; db2 <= '0;
    end else begin
      v2   <= v1;
      use2 <= v1 && ent1.valid;
      sid2 <= sid1;
      cid2 <= ent1.clause_id;
      op2  <= ent1.op;
      da2  <= da1;
      db2  <= db1;
    end
  end

  // ---------------- L2: evaluation and bit position lookup ----------------
  logic res2, upd2;
  nr_pred_eval u_eval (.op(op2), .diff_a(da2), .diff_b(db2), .result(res2), .do_update(upd2));

  logic    bp_hit3;
  bitpos_t bp3;
  nr_bitpos_table #(.DEPTH(BITPOS_DEPTH)) u_bp (
    .clk, .rst_n,
    .wr_en(bp_wr_en), .wr_index(bp_wr_index), .wr_valid(bp_wr_valid),
    .wr_sensor_id(bp_wr_sensor_id), .wr_clause_id(bp_wr_clause_id), .wr_bitpos(bp_wr_bitpos),
    .lk_sensor_id(sid2), .lk_clause_id(cid2), .lk_hit(bp_hit3), .lk_bitpos(bp3)
  );

  logic       v3, use3, res3, upd3;
  clause_id_t cid3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3 <= 1'b0; use3 <= 1'b0; res3 <= 1'b0; upd3 <= 1'b0; cid3 <= '0;
    end else begin
      v3   <= v2;
      use3 <= use2;
      res3 <= res2;
      upd3 <= upd2;
      cid3 <= cid2;
    end
  end

  // ---------------- L3: clause register -----------------------------------
  logic cr_valid;
  nr_clause_reg u_reg (
    .clk, .rst_n,
    .in_valid(use3), .in_clause_id(cid3), .in_update(upd3 && bp_hit3),
    .in_result(res3), .in_bitpos(bp3),
    .clr_en, .clr_clause_id,
    .out_valid(cr_valid), .out_clause_true(out_clause_true), .out_bitmap(out_bitmap)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v3;
  end
  assign out_used = cr_valid;

  // a lane reports a clause only for a packet that is present
  a_used_valid: assert property (@(posedge clk) disable iff (!rst_n) out_used |-> out_valid);
  a_true_used:  assert property (@(posedge clk) disable iff (!rst_n) out_clause_true |-> out_used);

endmodule
