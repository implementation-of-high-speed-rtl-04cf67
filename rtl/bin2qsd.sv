// bin2qsd: two's-complement binary to quaternary signed-digit conversion.
//
// The WIDTH-bit input is cut into WIDTH/2 pairs of bits, least significant
// pair first. Every pair except the top one is an unsigned radix-4 digit
// 0..3; the top pair holds the sign bit and is read as a signed digit -2..+1.
// The digits are then widened to the 3-bit QSD code. The QSD value
// sum(q[i] * 4**i) equals the signed binary input exactly, and no arithmetic
// is needed: the converter is wiring plus one sign extension per digit.
//
// Purely combinational. WIDTH defaults to 32 and must be even.
// Input: bin (WIDTH bits, signed). Output: q (WIDTH/2 QSD digits, digit 0
// least significant).
module bin2qsd
  import qsd_pkg::*;
#(
  parameter int unsigned WIDTH = QSD_BIN_WIDTH
) (
  input  logic signed [WIDTH-1:0]             bin,
  output qsd_digit_t  [WIDTH/2-1:0]           q
);

  localparam int unsigned DIGITS = WIDTH / 2;

  if (WIDTH % 2 != 0 || WIDTH < 2) begin : g_bad_width
    $error("bin2qsd: WIDTH must be even and at least 2");
  end

  always_comb begin
    for (int i = 0; i < DIGITS - 1; i++) begin
      q[i] = {1'b0, bin[2*i +: 2]};
    end
    // Top pair carries the sign: read it as a signed 2-bit digit.
    q[DIGITS-1] = {bin[WIDTH-1], bin[WIDTH-1 -: 2]};
  end

endmodule
