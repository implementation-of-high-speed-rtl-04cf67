// tb_qsd_step2: exhaustive self-checking test of the QSD step-2 unit.
//
// Drives every intermediate sum (-2..+2) with every intermediate carry
// (-1..+1) and checks that the digit equals their integer sum and stays in
// the QSD range -3..+3.
module tb_qsd_step2;
  import qsd_pkg::*;

  qsd_digit_t sum_in, digit;
  qsd_carry_t carry_in;
  int checks = 0;
  int failures = 0;

  qsd_step2 dut (.sum_in(sum_in), .carry_in(carry_in), .digit(digit));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = -2; s <= 2; s++) begin
      for (int c = -1; c <= 1; c++) begin
        sum_in   = 3'(s);
        carry_in = 2'(c);
        #1;
        checks++;
        if (int'(digit) != s + c || digit == 3'b100) begin
          failures++;
          $display("FAIL s=%0d c=%0d: digit=%0d", s, c, digit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
