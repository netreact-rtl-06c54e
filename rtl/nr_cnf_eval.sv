// nr_cnf_eval: final step of the NETREACT rule evaluation. A sensor's rule is
// the AND of the clauses its conjunction lanes hold; a lane without a clause
// for the sensor does not take part. The packet is kept (forwarded) when the
// rule is true and dropped otherwise, so that only interesting sensor
// packets travel on.
//
// A sensor with no clause in any lane has no rule on this switch and its
// packets are forwarded (own choice: with rules split over several switches,
// such packets must reach the switch that holds their rule).
//
// Timing: in_* at cycle t, out_* at t+1.
module nr_cnf_eval
  import nr_pkg::*;
#(
  parameter int unsigned N_CONJ = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [N_CONJ-1:0] in_used,
  input  logic [N_CONJ-1:0] in_clause_true,
  output logic              out_valid,
  output logic              out_has_rule,
  output logic              out_rule_true,
  output logic              out_pass
);

  logic all_true;
  always_comb all_true = &(in_clause_true | ~in_used);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_has_rule <= 1'b0; out_rule_true <= 1'b0; out_pass <= 1'b0;
    end else begin
      out_valid     <= in_valid;
      out_has_rule  <= in_valid && (|in_used);
      out_rule_true <= in_valid && (|in_used) && all_true;
      out_pass      <= in_valid && all_true;
    end
  end

  a_rule_pass:  assert property (@(posedge clk) disable iff (!rst_n) out_rule_true |-> out_pass);
  a_pass_valid: assert property (@(posedge clk) disable iff (!rst_n) out_pass |-> out_valid);

endmodule
