// qsd_pkg: types shared by the quaternary signed-digit (QSD) arithmetic blocks.
//
// A QSD number is a vector of radix-4 digits, each in -3..+3, worth
// sum(d[i] * 4**i). Each digit is carried as a 3-bit two's-complement value
// (-3 = 3'b101, -2 = 3'b110, -1 = 3'b111, 0..3 = 3'b000..3'b011), which is the
// digit encoding of the adder this package belongs to. The intermediate carry
// produced between the two addition steps lies in -1..+1 and is carried in
// 2 bits, two's complement. The code 3'b100 (-4) is never produced.
package qsd_pkg;

  // One QSD digit, -3..+3, two's complement.
  typedef logic signed [2:0] qsd_digit_t;

  // Intermediate carry between digit positions, -1..+1, two's complement.
  typedef logic signed [1:0] qsd_carry_t;

  // Binary operand width of the adder in its main configuration.
  localparam int unsigned QSD_BIN_WIDTH = 32;

  // Radix-4: two binary bits per QSD digit position.
  localparam int unsigned QSD_BITS_PER_DIGIT = 2;

endpackage
