// tb_qsd_step1: exhaustive self-checking test of the QSD step-1 unit.
//
// Drives all 49 pairs of operand digits (-3..+3 each). For each pair it checks
// that carry*4 + sum equals a+b, that |sum| <= 2 and |carry| <= 1, and that
// the pair matches the expected selection, worked out here from the rule
// "carry = 0 for |t| <= 2, otherwise carry = sign(t)".
module tb_qsd_step1;
  import qsd_pkg::*;

  qsd_digit_t a, b, sum;
  qsd_carry_t carry;
  int checks = 0;
  int failures = 0;

  qsd_step1 dut (.a(a), .b(b), .carry(carry), .sum(sum));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, exp_c, exp_s;
    for (int ia = -3; ia <= 3; ia++) begin
      for (int ib = -3; ib <= 3; ib++) begin
        a = 3'(ia);
        b = 3'(ib);
        #1;
        t = ia + ib;
        if (t > 2)       exp_c = 1;
        else if (t < -2) exp_c = -1;
        else             exp_c = 0;
        exp_s = t - 4 * exp_c;
        checks++;
        if (int'(carry) != exp_c || int'(sum) != exp_s) begin
          failures++;
          $display("FAIL a=%0d b=%0d: carry=%0d sum=%0d, expected %0d %0d",
                   ia, ib, carry, sum, exp_c, exp_s);
        end
        checks++;
        if (int'(carry) * 4 + int'(sum) != t || sum > 3'sd2 || sum < -3'sd2) begin
          failures++;
          $display("FAIL a=%0d b=%0d: value or range rule broken", ia, ib);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
