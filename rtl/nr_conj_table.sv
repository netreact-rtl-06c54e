// nr_conj_table: one conjunction table of NETREACT. For each sensor it holds
// zero or one clause of that sensor's rule: the Clause ID (the index of the
// clause's bitmap register), the operation and up to two operands.
//
// The table is matched exactly on the sensor ID. With SENSOR_ID_W-bit IDs an
// exact match over the whole key space is a memory addressed by the ID, which
// is what is built here (own choice; the document only says "exact
// matching"). Entry valid bits are cleared by reset; the entry data are not.
//
// Interface: wr_* is the control-plane write port (one entry per cycle);
// lk_sensor_id is looked up and lk_entry is valid one cycle later (registered
// read). A write and a lookup of the same ID in one cycle return the old entry.
module nr_conj_table
  import nr_pkg::*;
#(
  parameter int unsigned DEPTH = 2 ** SENSOR_ID_W
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  sensor_id_t  wr_sensor_id,
  input  conj_entry_t wr_entry,
  input  sensor_id_t  lk_sensor_id,
  output conj_entry_t lk_entry
);

  localparam int unsigned DATA_W = $bits(conj_entry_t) - 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DEPTH-1:0]  vld;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_sensor_id] <= wr_entry[DATA_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (wr_en) vld[wr_sensor_id] <= wr_entry.valid;
  end

  always_ff @(posedge clk) begin
    lk_entry <= {vld[lk_sensor_id], mem[lk_sensor_id]};
  end

endmodule
