// nr_moving_avg: moving average of each sensor's values over the window kept
// by nr_history. For every sensor it keeps the running sum of the window;
// each sensor packet adds the new value and subtracts the value the history
// queue pushed out, and the average is the sum divided by the window length
// (an arithmetic shift, so WINDOW must be a power of two).
//
// The document only says that a per-sensor moving average can be tracked;
// computing it from the history queue with a running sum is this design's
// choice. Before the window is full the missing values count as zero.
//
// Timing: in_* at cycle t (the outputs of nr_history), out_avg at t+1.
module nr_moving_avg
  import nr_pkg::*;
#(
  parameter int unsigned WINDOW    = 4,
  parameter int unsigned N_SENSORS = 2 ** SENSOR_ID_W
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sensor_id_t in_sensor_id,
  input  value_t     in_value,
  input  value_t     in_evicted,
  output logic       out_valid,
  output sensor_id_t out_sensor_id,
  output value_t     out_avg
);

  localparam int unsigned SH    = $clog2(WINDOW);
  localparam int unsigned SUM_W = VALUE_W + SH + 1;
  typedef logic signed [SUM_W-1:0] sum_t;

  sum_t                 sum [N_SENSORS];
  logic [N_SENSORS-1:0] vld;

  sum_t nxt;
  always_comb
    nxt = (vld[in_sensor_id] ? sum[in_sensor_id] : '0) + sum_t'(in_value) - sum_t'(in_evicted);

  always_ff @(posedge clk) begin
    if (in_valid) sum[in_sensor_id] <= nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld           <= '0;
      out_valid     <= 1'b0;
      out_sensor_id <= '0;
      out_avg       <= '0;
    end else begin
      if (in_valid) vld[in_sensor_id] <= 1'b1;
      out_valid     <= in_valid;
      out_sensor_id <= in_sensor_id;
      out_avg       <= value_t'(nxt >>> SH);
    end
  end

endmodule
