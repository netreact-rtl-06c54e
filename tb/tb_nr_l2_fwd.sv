// tb_nr_l2_fwd: fills a 64-entry MAC table from a small MAC pool, then checks
// random lookups (hits and misses) one cycle later against a model.
module tb_nr_l2_fwd;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0, wr_valid = 0, out_hit;
  logic [7:0] wr_index = 0;
  logic [47:0] wr_mac = 0, lk_mac = 0;
  port_t wr_port = 0, out_port;
  nr_l2_fwd dut (.*);

  logic m_v [64]; logic [47:0] m_mac [64]; port_t m_p [64];
  logic eh; port_t ep;
  int n_hit = 0, n_miss = 0;
  function automatic logic [47:0] mac_of(int k); return 48'h02_00_00_00_00_00 + 48'(k * 7919); endfunction
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) m_v[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 3) == 0);
      wr_index = 8'($urandom_range(0, 63));
      wr_valid = ($urandom_range(0, 6) != 0);
      wr_mac = mac_of($urandom_range(0, 99));
      wr_port = port_t'($urandom_range(0, 63));
      lk_mac = mac_of($urandom_range(0, 99));
      eh = 0; ep = 9'd511;
      for (int k = 63; k >= 0; k--) if (m_v[k] && m_mac[k] == lk_mac) begin eh = 1; ep = m_p[k]; end
      @(posedge clk); #1;
      if (wr_en) begin m_v[wr_index] = wr_valid; m_mac[wr_index] = wr_mac; m_p[wr_index] = wr_port; end
      checks++;
      if (out_hit !== eh || out_port !== ep) begin
        failures++;
        if (failures < 10) $display("mismatch %0d: hit %b/%b port %0d/%0d", i, out_hit, eh, out_port, ep);
      end
      if (eh) n_hit++; else n_miss++;
    end
    checks++; if (n_hit < 100 || n_miss < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
