// tb_nr_conj_table: writes random clause entries for random sensor IDs,
// including invalidating writes, and checks every lookup one cycle later
// against a model array; sensors never written must read as invalid.
module tb_nr_conj_table;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        wr_en = 0;
  sensor_id_t  wr_sensor_id = '0, lk_sensor_id = '0;
  conj_entry_t wr_entry = '0, lk_entry;
  nr_conj_table dut (.*);

  conj_entry_t model [256];
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  conj_entry_t e;
  sensor_id_t  q;
  initial begin
    for (int i = 0; i < 256; i++) model[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 2) == 0);
      wr_sensor_id = sensor_id_t'($urandom_range(0, 127));
      wr_entry = {1'b1, 8'($urandom), 3'($urandom_range(0, 5)), $urandom, $urandom};
      wr_entry.valid = ($urandom_range(0, 7) != 0);
      lk_sensor_id = sensor_id_t'($urandom);
      q = lk_sensor_id;
      e = model[q];
      @(posedge clk); #1;
      if (wr_en) model[wr_sensor_id] = wr_entry;
      checks++;
      if (lk_entry.valid !== e.valid || (e.valid && lk_entry !== e)) begin
        failures++;
        if (failures < 10) $display("mismatch sensor %0d: got %h exp %h", q, lk_entry, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
