// qsd_step1: first step of carry-free QSD addition for one digit position.
//
// The two operand digits (each -3..+3) are added, giving t in -6..+6. t is
// then split into an intermediate carry c (-1..+1) and an intermediate sum
// s (-2..+2) with t = 4*c + s. Keeping |s| <= 2 and |c| <= 1 is what makes the
// second step carry-free: s plus the carry arriving from the position below
// stays inside -3..+3. The (c, s) pair for each t is the fixed selection table
// of the adder: t = +3 becomes (1, -1), t = -3 becomes (-1, +1), |t| <= 2 gives
// c = 0, and |t| >= 4 gives c = sign(t), s = t - 4*c.
//
// Purely combinational, no clock. Inputs: a, b (QSD digits). Outputs:
// carry (2-bit two's complement), sum (3-bit two's complement).
module qsd_step1
  import qsd_pkg::*;
(
  input  qsd_digit_t a,
  input  qsd_digit_t b,
  output qsd_carry_t carry,
  output qsd_digit_t sum
);

  logic signed [3:0] t;

  always_comb begin
    t = 4'(a) + 4'(b);
    unique case (t)
      4'sd6:   begin carry = 2'sd1;  sum = 3'sd2;  end
      4'sd5:   begin carry = 2'sd1;  sum = 3'sd1;  end
      4'sd4:   begin carry = 2'sd1;  sum = 3'sd0;  end
      4'sd3:   begin carry = 2'sd1;  sum = -3'sd1; end
      4'sd2:   begin carry = 2'sd0;  sum = 3'sd2;  end
      4'sd1:   begin carry = 2'sd0;  sum = 3'sd1;  end
      4'sd0:   begin carry = 2'sd0;  sum = 3'sd0;  end
      -4'sd1:  begin carry = 2'sd0;  sum = -3'sd1; end
      -4'sd2:  begin carry = 2'sd0;  sum = -3'sd2; end
      -4'sd3:  begin carry = -2'sd1; sum = 3'sd1;  end
      -4'sd4:  begin carry = -2'sd1; sum = 3'sd0;  end
      -4'sd5:  begin carry = -2'sd1; sum = -3'sd1; end
      -4'sd6:  begin carry = -2'sd1; sum = -3'sd2; end
      // Only reachable with the unused digit code 3'b100 (-4) on an input.
      default: begin carry = 2'sd0;  sum = 3'sd0;  end
    endcase
  end

endmodule
