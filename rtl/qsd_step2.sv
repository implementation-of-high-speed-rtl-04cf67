// qsd_step2: second step of carry-free QSD addition for one digit position.
//
// Adds the intermediate sum of this position (-2..+2) to the intermediate
// carry coming from the position below (-1..+1). The result is always inside
// the QSD digit range -3..+3, so no new carry is formed and nothing ripples
// further: the delay of an addition is that of one step-1 and one step-2
// unit, whatever the number of digits.
//
// Purely combinational. Inputs: sum_in (3-bit two's complement), carry_in
// (2-bit two's complement). Output: digit (3-bit two's complement).
module qsd_step2
  import qsd_pkg::*;
(
  input  qsd_digit_t sum_in,
  input  qsd_carry_t carry_in,
  output qsd_digit_t digit
);

  always_comb begin
    digit = sum_in + 3'(carry_in);
  end

endmodule
