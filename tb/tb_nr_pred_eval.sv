// tb_nr_pred_eval: feeds nr_pred_eval the differences of nr_prep and checks
// every operator against a direct comparison of value and operands, with
// values chosen so that equal and boundary cases occur often.
module tb_nr_pred_eval;
  import nr_pkg::*;
  int checks = 0, failures = 0;
  value_t value, opnd_a, opnd_b;
  diff_t  diff_a, diff_b;
  op_e    op;
  logic   result, do_update;
  nr_prep u_prep (.*);
  nr_pred_eval dut (.*);

  function automatic value_t pick();
    case ($urandom_range(0, 3))
      0: return 32'sh7fffffff;
      1: return 32'sh80000000;
      default: return value_t'($urandom_range(0, 8)) - 4;
    endcase
  endfunction

  logic exp_r, exp_u;
  int hits [6];
  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 6000; i++) begin
      value = pick(); opnd_a = pick(); opnd_b = pick();
      op = op_e'($urandom_range(0, 5));
      #1;
      exp_u = 1;
      case (op)
        OP_GT:    exp_r = value > opnd_a;
        OP_LT:    exp_r = value < opnd_a;
        OP_EQ:    exp_r = value == opnd_a;
        OP_NE:    exp_r = value != opnd_a;
        OP_RANGE: exp_r = (value >= opnd_a) && (value <= opnd_b);
        default:  begin exp_r = 0; exp_u = 0; end
      endcase
      checks++;
      if (do_update !== exp_u || (exp_u && result !== exp_r)) begin
        failures++;
        if (failures < 10) $display("mismatch op=%s v=%0d a=%0d b=%0d: got %b exp %b", op.name(), value, opnd_a, opnd_b, result, exp_r);
      end
      if (exp_r) hits[op]++;
    end
    for (int k = 1; k < 6; k++) begin
      checks++;
      if (hits[k] == 0) begin failures++; $display("operator %0d never true", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
