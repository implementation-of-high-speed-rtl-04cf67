// qsd_adder_top: binary-in, binary-out adder/subtractor built on the
// carry-free quaternary signed-digit (QSD) adder.
//
// Data flow (all combinational, no clock):
//   a_bin, b_bin --bin2qsd--> WIDTH/2 QSD digits each
//   b digits --qsd_negate (when sub=1)--> -b digits
//   qsd_adder: step 1 (intermediate carry and sum per digit), step 2
//   (intermediate sum plus carry from below) --> WIDTH/2 result digits plus
//   one carry digit
//   qsd2bin --> signed binary result, one bit wider than the operands
// The redundant QSD result is also brought out (sum_qsd), for use by a
// following QSD stage without conversion.
//
// WIDTH defaults to 32, the adder size of the design's main configuration.
// Ports: a_bin, b_bin (WIDTH bits, signed), sub (0: a+b, 1: a-b);
// result (WIDTH+1 bits, signed, exact for every operand pair);
// sum_qsd (WIDTH/2+1 digits, digit WIDTH/2 being the adder's carry digit).
// The subtract mode and the positive/negative-digit output converter are
// choices of this design; the conversion into QSD, the two addition steps and
// the conversion back follow the adder's block diagram.
module qsd_adder_top
  import qsd_pkg::*;
#(
  parameter int unsigned WIDTH = QSD_BIN_WIDTH
) (
  input  logic signed [WIDTH-1:0]   a_bin,
  input  logic signed [WIDTH-1:0]   b_bin,
  input  logic                      sub,
  output logic signed [WIDTH:0]     result,
  output qsd_digit_t  [WIDTH/2:0]   sum_qsd
);

  localparam int unsigned DIGITS = WIDTH / 2;

  qsd_digit_t [DIGITS-1:0] a_qsd;
  qsd_digit_t [DIGITS-1:0] b_qsd;
  qsd_digit_t [DIGITS-1:0] b_sel;
  qsd_digit_t [DIGITS-1:0] s_qsd;
  qsd_carry_t              c_top;
  logic signed [2*DIGITS+2:0] wide_result;

  bin2qsd #(.WIDTH(WIDTH)) u_conv_a (.bin(a_bin), .q(a_qsd));
  bin2qsd #(.WIDTH(WIDTH)) u_conv_b (.bin(b_bin), .q(b_qsd));

  qsd_negate #(.DIGITS(DIGITS)) u_neg_b (
    .d   (b_qsd),
    .neg (sub),
    .q   (b_sel)
  );

  qsd_adder #(.DIGITS(DIGITS)) u_adder (
    .a         (a_qsd),
    .b         (b_sel),
    .sum       (s_qsd),
    .carry_out (c_top)
  );

  assign sum_qsd = {qsd_digit_t'(c_top), s_qsd};

  qsd2bin #(.DIGITS(DIGITS + 1)) u_conv_out (
    .q   (sum_qsd),
    .bin (wide_result)
  );

  // The sum or difference of two WIDTH-bit operands always fits in WIDTH+1
  // bits, so the top bits of the converter's output are sign copies.
  assign result = wide_result[WIDTH:0];

endmodule
