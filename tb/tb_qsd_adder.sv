// tb_qsd_adder: self-checking test of the N-digit carry-free QSD adder at its
// default size (16 digits).
//
// Operands are random digit vectors over the full digit set -3..+3, plus the
// extremes (all +3, all -3, all 0). The expected value of the sum is worked
// out with integer arithmetic, sum(d[i] * 4**i), and compared with the
// adder's digits plus carry_out * 4**DIGITS. Every result digit must lie in
// -3..+3. The carry-free property is checked directly: after changing one
// operand digit j, no result digit other than j and j+1 may change.
module tb_qsd_adder;
  import qsd_pkg::*;

  localparam int unsigned DIGITS = 16;

  qsd_digit_t [DIGITS-1:0] a, b, sum;
  qsd_carry_t              carry_out;
  int checks = 0;
  int failures = 0;
  int carry_out_seen = 0;

  qsd_adder #(.DIGITS(DIGITS)) dut (.a(a), .b(b), .sum(sum), .carry_out(carry_out));

  function automatic longint qsd_value(input qsd_digit_t [DIGITS-1:0] d);
    longint v = 0;
    for (int i = DIGITS - 1; i >= 0; i--) v = v * 4 + longint'(d[i]);
    return v;
  endfunction

  function automatic qsd_digit_t rand_digit();
    return 3'(int'($urandom_range(6)) - 3);
  endfunction

  task automatic check_value();
    longint got, want;
    got  = qsd_value(sum) + longint'(carry_out) * (64'sd1 <<< (2 * DIGITS));
    want = qsd_value(a) + qsd_value(b);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL value: got %0d want %0d", got, want);
    end
    for (int i = 0; i < DIGITS; i++) begin
      checks++;
      if (sum[i] == 3'b100) begin
        failures++;
        $display("FAIL digit %0d out of range", i);
      end
    end
    if (carry_out != 2'sd0) carry_out_seen++;
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    qsd_digit_t [DIGITS-1:0] prev_sum;
    int j;
    // Extremes.
    a = {DIGITS{3'sd3}};  b = {DIGITS{3'sd3}};  #1; check_value();
    a = {DIGITS{-3'sd3}}; b = {DIGITS{-3'sd3}}; #1; check_value();
    a = '0;               b = '0;               #1; check_value();
    a = {DIGITS{3'sd3}};  b = {DIGITS{-3'sd3}}; #1; check_value();
    // Random operands and locality of every change.
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < DIGITS; i++) begin
        a[i] = rand_digit();
        b[i] = rand_digit();
      end
      #1;
      check_value();
      prev_sum = sum;
      j = int'($urandom_range(DIGITS - 1));
      a[j] = rand_digit();
      #1;
      check_value();
      for (int i = 0; i < DIGITS; i++) begin
        if (i != j && i != j + 1) begin
          checks++;
          if (sum[i] != prev_sum[i]) begin
            failures++;
            $display("FAIL: digit %0d changed after operand digit %0d changed", i, j);
          end
        end
      end
    end
    checks++;
    if (carry_out_seen == 0) begin
      failures++;
      $display("FAIL: no carry out of the top digit was ever produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
