// tb_nr_history: random sensor packets on 6 sensors; checks the window, the
// evicted value and the new value one cycle later against per-sensor model
// queues of depth 4 (slots not yet filled read as zero).
module tb_nr_history;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, out_valid;
  sensor_id_t in_sensor_id = 0, out_sensor_id;
  value_t in_value = 0, out_value, out_evicted;
  value_t out_window [4];
  nr_history dut (.*);

  value_t q [256][4];
  value_t ew [4]; value_t ee; logic ev; sensor_id_t es;
  int n_evict = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int s = 0; s < 256; s++) for (int k = 0; k < 4; k++) q[s][k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_sensor_id = sensor_id_t'($urandom_range(0, 5));
      in_value = value_t'($urandom);
      ev = in_valid; es = in_sensor_id;
      ee = q[es][3];
      ew[0] = in_value;
      for (int k = 1; k < 4; k++) ew[k] = q[es][k-1];
      @(posedge clk); #1;
      if (in_valid) for (int k = 0; k < 4; k++) q[es][k] = ew[k];
      checks++;
      if (out_valid !== ev) failures++;
      else if (ev) begin
        if (out_sensor_id !== es || out_evicted !== ee || out_value !== ew[0] ||
            out_window[0] !== ew[0] || out_window[1] !== ew[1] ||
            out_window[2] !== ew[2] || out_window[3] !== ew[3]) begin
          failures++;
          if (failures < 10) $display("mismatch %0d sensor %0d", i, es);
        end
        if (ee != 0) n_evict++;
      end
    end
    checks++; if (n_evict < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
