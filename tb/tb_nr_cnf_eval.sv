// tb_nr_cnf_eval: random lane results; checks rule value, has-rule flag and
// forward decision (a sensor without any clause is forwarded) one cycle later.
module tb_nr_cnf_eval;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, out_valid, out_has_rule, out_rule_true, out_pass;
  logic [8:0] in_used = '0, in_clause_true = '0;
  nr_cnf_eval dut (.*);

  logic ev, eh, er, ep, ok;
  int n_drop = 0, n_norule = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_used = 9'($urandom) & 9'($urandom);
      in_clause_true = 9'($urandom) | 9'($urandom) | 9'($urandom);
      ok = 1;
      for (int k = 0; k < 9; k++) if (in_used[k] && !in_clause_true[k]) ok = 0;
      ev = in_valid; eh = in_valid && (in_used != 0); er = eh && ok; ep = in_valid && ok;
      @(posedge clk); #1;
      checks++;
      if ({out_valid, out_has_rule, out_rule_true, out_pass} !== {ev, eh, er, ep}) begin
        failures++;
        if (failures < 10) $display("mismatch used=%b true=%b", in_used, in_clause_true);
      end
      if (ev && !ep) n_drop++;
      if (ev && !eh) n_norule++;
    end
    checks++; if (n_drop == 0 || n_norule == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
