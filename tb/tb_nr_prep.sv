// tb_nr_prep: checks both differences of the preparation step against 64-bit
// arithmetic for random values, including the extremes of the value range.
module tb_nr_prep;
  import nr_pkg::*;
  int checks = 0, failures = 0;
  value_t value, opnd_a, opnd_b;
  diff_t  diff_a, diff_b;
  nr_prep dut (.*);

  function automatic value_t pick();
    case ($urandom_range(0, 4))
      0: return 32'sh7fffffff;
      1: return 32'sh80000000;
      2: return value_t'($urandom_range(0, 20)) - 10;
      default: return value_t'($urandom);
    endcase
  endfunction

  longint ea, eb;
  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 5000; i++) begin
      value = pick(); opnd_a = pick(); opnd_b = pick();
      #1;
      ea = longint'(opnd_a) - longint'(value);
      eb = longint'(opnd_b) - longint'(value);
      checks++;
      if (longint'(diff_a) != ea || longint'(diff_b) != eb) begin
        failures++;
        if (failures < 10) $display("mismatch v=%0d a=%0d b=%0d: %0d %0d", value, opnd_a, opnd_b, diff_a, diff_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
