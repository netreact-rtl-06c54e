// nr_pred_eval: turns the differences of the preparation step into the
// Boolean value of an atomic predicate, looking only at sign and zero:
//   GT    value >  a  <=>  a - value <  0
//   LT    value <  a  <=>  a - value >  0
//   EQ    value == a  <=>  a - value == 0
//   NE    value != a  <=>  a - value != 0
//   RANGE a <= value <= b  <=>  a - value <= 0 and b - value >= 0
// The operators are the document's; the inclusive range bounds are this
// design's choice. OP_NOP yields do_update = 0: nothing is evaluated and the
// stored clause state is only read. Purely combinational.
module nr_pred_eval
  import nr_pkg::*;
(
  input  op_e   op,
  input  diff_t diff_a,
  input  diff_t diff_b,
  output logic  result,
  output logic  do_update
);

  logic a_neg, a_zero, b_neg;
  always_comb begin
    a_neg  = diff_a[DIFF_W-1];
    a_zero = (diff_a == '0);
    b_neg  = diff_b[DIFF_W-1];
    result    = 1'b0;
    do_update = 1'b1;
    unique case (op)
      OP_GT:    result = a_neg;
      OP_LT:    result = !a_neg && !a_zero;
      OP_EQ:    result = a_zero;
      OP_NE:    result = !a_zero;
      OP_RANGE: result = (a_neg || a_zero) && !b_neg;
      default:  do_update = 1'b0;   // OP_NOP and unused codes
    endcase
  end

endmodule
