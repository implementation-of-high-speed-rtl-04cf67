// qsd2bin: quaternary signed-digit to two's-complement binary conversion.
//
// The QSD number is split into its positive and its negative digits. The
// positive digits, each 0..3, are laid side by side as a plain binary number
// P (two bits per position); the magnitudes of the negative digits form a
// second binary number N in the same way. The value is P - N, so the whole
// conversion costs one WIDTH-bit subtraction. This is the only place where a
// carry chain appears; the QSD addition itself has none.
//
// Purely combinational. DIGITS defaults to 17: the 16 digits of a 32-bit
// operand plus the adder's carry digit. Input: q (DIGITS digits, digit 0
// least significant). Output: bin (2*DIGITS+1 bits, signed), wide enough for
// any QSD value of DIGITS digits.
module qsd2bin
  import qsd_pkg::*;
#(
  parameter int unsigned DIGITS = QSD_BIN_WIDTH / QSD_BITS_PER_DIGIT + 1
) (
  input  qsd_digit_t  [DIGITS-1:0]   q,
  output logic signed [2*DIGITS:0]   bin
);

  logic [2*DIGITS-1:0] pos_part;
  logic [2*DIGITS-1:0] neg_part;
  logic [1:0]          mag;

  always_comb begin
    pos_part = '0;
    neg_part = '0;
    mag      = '0;
    for (int i = 0; i < DIGITS; i++) begin
      mag = 2'(-q[i]);
      if (q[i] < 0) begin
        neg_part[2*i +: 2] = mag[1:0];
      end else begin
        pos_part[2*i +: 2] = q[i][1:0];
      end
    end
    bin = $signed({1'b0, pos_part}) - $signed({1'b0, neg_part});
  end

endmodule
