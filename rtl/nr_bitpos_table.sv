// nr_bitpos_table: lookup table of a NETREACT conjunction lane that gives,
// for a (sensor ID, Clause ID) pair, the bit position that carries this
// sensor's predicate result inside the clause's bitmap register.
//
// It is an exact-match table built as a small associative memory: DEPTH
// entries, each a key {sensor ID, Clause ID} and a bit position, all compared
// in parallel (own choice of structure and depth; the document gives neither).
// The Boolean result of the predicate, the third key field the document
// names, selects between the set (OR) and clear (AND) action in nr_clause_reg
// instead of doubling the entries here.
//
// Interface: wr_* writes entry wr_index (control plane). lk_* is looked up and
// lk_hit/lk_bitpos are valid one cycle later. Should two entries hold the same
// key, the lowest index wins.
module nr_bitpos_table
  import nr_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [7:0] wr_index,
  input  logic       wr_valid,
  input  sensor_id_t wr_sensor_id,
  input  clause_id_t wr_clause_id,
  input  bitpos_t    wr_bitpos,
  input  sensor_id_t lk_sensor_id,
  input  clause_id_t lk_clause_id,
  output logic       lk_hit,
  output bitpos_t    lk_bitpos
);

  typedef struct packed {
    sensor_id_t sensor_id;
    clause_id_t clause_id;
    bitpos_t    bitpos;
  } bp_entry_t;

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [IDX_W-1:0] wr_idx;
  assign wr_idx = IDX_W'(wr_index);

  bp_entry_t        ent [DEPTH];
  logic [DEPTH-1:0] vld;

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_index) < DEPTH))
      ent[wr_idx] <= '{sensor_id: wr_sensor_id, clause_id: wr_clause_id, bitpos: wr_bitpos};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (wr_en && (32'(wr_index) < DEPTH)) vld[wr_idx] <= wr_valid;
  end

  logic    hit_c;
  bitpos_t pos_c;
  always_comb begin
    hit_c = 1'b0;
    pos_c = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (vld[i] && ent[i].sensor_id == lk_sensor_id && ent[i].clause_id == lk_clause_id) begin
        hit_c = 1'b1;
        pos_c = ent[i].bitpos;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lk_hit    <= 1'b0;
      lk_bitpos <= '0;
    end else begin
      lk_hit    <= hit_c;
      lk_bitpos <= pos_c;
    end
  end

  // the control plane must write existing slots only
  a_wr_index: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (32'(wr_index) < DEPTH));

endmodule
