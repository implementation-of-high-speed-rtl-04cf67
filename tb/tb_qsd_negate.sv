// tb_qsd_negate: self-checking test of digit-wise QSD negation (16 digits).
//
// For random digit vectors it checks that with neg=1 the QSD value becomes
// its negative and every digit stays in range, and that with neg=0 the
// digits are unchanged.
module tb_qsd_negate;
  import qsd_pkg::*;

  localparam int unsigned DIGITS = 16;

  qsd_digit_t [DIGITS-1:0] d, q;
  logic neg;
  int checks = 0;
  int failures = 0;

  qsd_negate #(.DIGITS(DIGITS)) dut (.d(d), .neg(neg), .q(q));

  function automatic longint qsd_value(input qsd_digit_t [DIGITS-1:0] x);
    longint v = 0;
    for (int i = DIGITS - 1; i >= 0; i--) v = v * 4 + longint'(x[i]);
    return v;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < DIGITS; i++) d[i] = 3'(int'($urandom_range(6)) - 3);
      neg = 1'b1;
      #1;
      checks++;
      if (qsd_value(q) != -qsd_value(d)) begin
        failures++;
        $display("FAIL negate: %0d -> %0d", qsd_value(d), qsd_value(q));
      end
      for (int i = 0; i < DIGITS; i++) begin
        checks++;
        if (q[i] == 3'b100 || int'(q[i]) != -int'(d[i])) begin
          failures++;
          $display("FAIL negate digit %0d", i);
        end
      end
      neg = 1'b0;
      #1;
      checks++;
      if (q != d) begin
        failures++;
        $display("FAIL pass-through with neg=0");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
