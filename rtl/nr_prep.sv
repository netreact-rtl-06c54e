// nr_prep: preparation step of a NETREACT conjunction lane. The sensor value
// is subtracted from each operand it is compared with, so that the predicate
// can later be decided by the sign (and zero-ness) of the result alone.
// In-range conditions need two subtractions (lower and upper bound).
//
// Both differences are one bit wider than the value so they never overflow
// (own choice). Purely combinational.
module nr_prep
  import nr_pkg::*;
(
  input  value_t value,
  input  value_t opnd_a,
  input  value_t opnd_b,
  output diff_t  diff_a,   // opnd_a - value
  output diff_t  diff_b    // opnd_b - value
);

  always_comb begin
    diff_a = diff_t'(opnd_a) - diff_t'(value);
    diff_b = diff_t'(opnd_b) - diff_t'(value);
  end

endmodule
