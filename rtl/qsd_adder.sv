// qsd_adder: N-digit carry-free adder for quaternary signed-digit numbers.
//
// Each digit position i has one step-1 unit, which splits a[i] + b[i] into an
// intermediate carry c[i] (-1..+1) and intermediate sum s[i] (-2..+2), and one
// step-2 unit, which forms sum[i] = s[i] + c[i-1] (c[-1] = 0). The carry only
// travels one position, so the depth of the adder does not grow with DIGITS.
// The carry out of the top position is the result's extra most significant
// digit, carry_out, worth carry_out * 4**DIGITS.
//
// Purely combinational, no clock. DIGITS defaults to 16, the 32-bit operand
// width of the design's main configuration (two bits per radix-4 digit).
// Inputs a, b: DIGITS QSD digits each, digit 0 least significant.
// Outputs: sum (DIGITS digits, each -3..+3) and carry_out (-1..+1).
module qsd_adder
  import qsd_pkg::*;
#(
  parameter int unsigned DIGITS = QSD_BIN_WIDTH / QSD_BITS_PER_DIGIT
) (
  input  qsd_digit_t [DIGITS-1:0] a,
  input  qsd_digit_t [DIGITS-1:0] b,
  output qsd_digit_t [DIGITS-1:0] sum,
  output qsd_carry_t              carry_out
);

  qsd_carry_t [DIGITS-1:0] c_int;
  qsd_digit_t [DIGITS-1:0] s_int;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    qsd_step1 u_step1 (
      .a     (a[i]),
      .b     (b[i]),
      .carry (c_int[i]),
      .sum   (s_int[i])
    );

    if (i == 0) begin : g_lsd
      qsd_step2 u_step2 (
        .sum_in   (s_int[i]),
        .carry_in (2'sd0),
        .digit    (sum[i])
      );
    end else begin : g_upper
      qsd_step2 u_step2 (
        .sum_in   (s_int[i]),
        .carry_in (c_int[i-1]),
        .digit    (sum[i])
      );
    end
  end

  assign carry_out = c_int[DIGITS-1];

endmodule
