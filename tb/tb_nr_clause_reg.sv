// tb_nr_clause_reg: random read-modify-write traffic on 8 clause registers,
// back to back, with set, clear, read-only and clear-entry operations; checks
// bitmap and clause value one cycle later against a model.
module tb_nr_clause_reg;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_update = 0, in_result = 0, clr_en = 0;
  clause_id_t in_clause_id = 0, clr_clause_id = 0;
  bitpos_t in_bitpos = 0;
  logic out_valid, out_clause_true;
  bitmap_t out_bitmap;
  nr_clause_reg dut (.*);

  bitmap_t m [256];
  bitmap_t eb; logic ev;
  int n_true = 0, n_false = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) m[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_clause_id = clause_id_t'($urandom_range(0, 7));
      in_update = ($urandom_range(0, 3) != 0);
      in_result = ($urandom_range(0, 2) == 0);
      in_bitpos = bitpos_t'($urandom_range(0, 3));
      clr_en = ($urandom_range(0, 30) == 0);
      clr_clause_id = clause_id_t'($urandom_range(0, 7));
      eb = m[in_clause_id];
      if (in_update) eb = in_result ? (eb | (32'd1 << in_bitpos)) : (eb & ~(32'd1 << in_bitpos));
      ev = in_valid;
      @(posedge clk); #1;
      if (clr_en) m[clr_clause_id] = '0;
      if (in_valid && in_update) m[in_clause_id] = eb;
      checks++;
      if (out_valid !== ev || (ev && (out_bitmap !== eb || out_clause_true !== (eb != 0)))) begin
        failures++;
        if (failures < 10) $display("mismatch %0d clause %0d: %h exp %h", i, in_clause_id, out_bitmap, eb);
      end
      if (ev && eb != 0) n_true++;
      if (ev && eb == 0) n_false++;
    end
    checks++; if (n_true < 100 || n_false < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
