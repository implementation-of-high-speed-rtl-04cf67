// qsd_negate: conditional negation of a quaternary signed-digit number.
//
// Because the QSD digit set -3..+3 is symmetric, the negative of a QSD number
// is obtained by negating every digit on its own, with no borrow between
// positions. Feeding the negated subtrahend to the carry-free adder therefore
// gives borrow-free subtraction. When neg is 0 the digits pass unchanged.
//
// Purely combinational. DIGITS defaults to 16 (32-bit operands).
// Inputs: d (DIGITS digits), neg. Output: q (DIGITS digits).
module qsd_negate
  import qsd_pkg::*;
#(
  parameter int unsigned DIGITS = QSD_BIN_WIDTH / QSD_BITS_PER_DIGIT
) (
  input  qsd_digit_t [DIGITS-1:0] d,
  input  logic                    neg,
  output qsd_digit_t [DIGITS-1:0] q
);

  always_comb begin
    for (int i = 0; i < DIGITS; i++) begin
      q[i] = neg ? -d[i] : d[i];
    end
  end

endmodule
