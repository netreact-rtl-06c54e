// tb_nr_moving_avg: drives nr_moving_avg as nr_history would (new value and
// the value leaving a 4-deep window) for 6 sensors and checks the average one
// cycle later against floor(sum of window / 4) computed from model windows.
module tb_nr_moving_avg;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, out_valid;
  sensor_id_t in_sensor_id = 0, out_sensor_id;
  value_t in_value = 0, in_evicted = 0, out_avg;
  nr_moving_avg dut (.*);

  longint w [256][4];
  longint sum; value_t ea; logic ev;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int s = 0; s < 256; s++) for (int k = 0; k < 4; k++) w[s][k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_sensor_id = sensor_id_t'($urandom_range(0, 5));
      in_value = ($urandom_range(0, 3) == 0) ? value_t'($urandom) : value_t'($urandom_range(0, 2000)) - 1000;
      in_evicted = value_t'(w[in_sensor_id][3]);
      sum = longint'(in_value) + w[in_sensor_id][0] + w[in_sensor_id][1] + w[in_sensor_id][2];
      // floor division by 4
      ea = value_t'((sum - ((sum % 4 + 4) % 4)) / 4);
      ev = in_valid;
      @(posedge clk); #1;
      if (ev) begin
        for (int k = 3; k > 0; k--) w[in_sensor_id][k] = w[in_sensor_id][k-1];
        w[in_sensor_id][0] = longint'(in_value);
      end
      checks++;
      if (out_valid !== ev || (ev && out_avg !== ea)) begin
        failures++;
        if (failures < 10) $display("mismatch %0d: avg %0d exp %0d", i, out_avg, ea);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
