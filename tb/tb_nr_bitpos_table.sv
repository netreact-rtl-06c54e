// tb_nr_bitpos_table: fills a 16-entry table with random {sensor, clause}
// keys (few distinct values so hits are common), invalidates some, and checks
// each lookup one cycle later against a model that scans the entries in index
// order.
module tb_nr_bitpos_table;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0, wr_valid = 0, lk_hit;
  logic [7:0] wr_index = 0;
  sensor_id_t wr_sensor_id = 0, lk_sensor_id = 0;
  clause_id_t wr_clause_id = 0, lk_clause_id = 0;
  bitpos_t wr_bitpos = 0, lk_bitpos;
  nr_bitpos_table #(.DEPTH(16)) dut (.*);

  logic m_v [16]; sensor_id_t m_s [16]; clause_id_t m_c [16]; bitpos_t m_p [16];
  logic eh; bitpos_t ep;
  int n_hit = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 16; i++) m_v[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 3) == 0);
      wr_index = 8'($urandom_range(0, 15));
      wr_valid = ($urandom_range(0, 5) != 0);
      wr_sensor_id = sensor_id_t'($urandom_range(0, 5));
      wr_clause_id = clause_id_t'($urandom_range(0, 3));
      wr_bitpos = bitpos_t'($urandom);
      lk_sensor_id = sensor_id_t'($urandom_range(0, 5));
      lk_clause_id = clause_id_t'($urandom_range(0, 3));
      eh = 0; ep = 0;
      for (int k = 15; k >= 0; k--)
        if (m_v[k] && m_s[k] == lk_sensor_id && m_c[k] == lk_clause_id) begin eh = 1; ep = m_p[k]; end
      @(posedge clk); #1;
      if (wr_en) begin
        m_v[wr_index] = wr_valid; m_s[wr_index] = wr_sensor_id;
        m_c[wr_index] = wr_clause_id; m_p[wr_index] = wr_bitpos;
      end
      checks++;
      if (lk_hit !== eh || (eh && lk_bitpos !== ep)) begin
        failures++;
        if (failures < 10) $display("mismatch %0d: hit %b/%b pos %0d/%0d", i, lk_hit, eh, lk_bitpos, ep);
      end
      if (eh) n_hit++;
    end
    checks++; if (n_hit < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
