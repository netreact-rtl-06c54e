// nr_history: per-sensor history of the last DEPTH values, kept in DEPTH
// register arrays that act together as a queue. Each sensor packet shifts its
// sensor's queue by one: slot 0 takes the new value, slot k takes slot k-1,
// and the value in the last slot is pushed out.
//
// The queue of registers with configurable size is the document's; the depth
// of 4, reset behaviour (a per-sensor fill count, slots not yet written read
// as zero) and outputs are this design's own.
//
// Interface: in_valid/in_sensor_id/in_value at cycle t; at t+1 out_window
// holds the sensor's queue after the update (slot 0 newest), out_evicted the
// value that left it (zero while the queue was not yet full) and out_value
// the new value. One packet per cycle; each register array is read and
// written once per packet.
module nr_history
  import nr_pkg::*;
#(
  parameter int unsigned DEPTH     = 4,
  parameter int unsigned N_SENSORS = 2 ** SENSOR_ID_W
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sensor_id_t in_sensor_id,
  input  value_t     in_value,
  output logic       out_valid,
  output sensor_id_t out_sensor_id,
  output value_t     out_value,
  output value_t     out_evicted,
  output value_t     out_window [DEPTH]
);

  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  value_t           hist [DEPTH][N_SENSORS];
  logic [CNT_W-1:0] fill [N_SENSORS];

  // current queue of the sensor, unfilled slots as zero
  value_t cur [DEPTH];
  always_comb begin
    for (int k = 0; k < DEPTH; k++)
      cur[k] = (32'(fill[in_sensor_id]) > k) ? hist[k][in_sensor_id] : '0;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      hist[0][in_sensor_id] <= in_value;
      for (int k = 1; k < DEPTH; k++) hist[k][in_sensor_id] <= cur[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SENSORS; s++) fill[s] <= '0;
    end else if (in_valid && (32'(fill[in_sensor_id]) < DEPTH)) begin
      fill[in_sensor_id] <= fill[in_sensor_id] + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_sensor_id <= '0;
      out_value     <= '0;
      out_evicted   <= '0;
      for (int k = 0; k < DEPTH; k++) out_window[k] <= '0;
    end else begin
      out_valid     <= in_valid;
      out_sensor_id <= in_sensor_id;
      out_value     <= in_value;
      out_evicted   <= cur[DEPTH-1];
      out_window[0] <= in_value;
      for (int k = 1; k < DEPTH; k++) out_window[k] <= cur[k-1];
    end
  end

endmodule
