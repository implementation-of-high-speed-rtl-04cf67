// tb_qsd_adder_top: end-to-end self-checking test of the 32-bit QSD
// adder/subtractor at its default parameters.
//
// Random and extreme signed operands are applied in both modes. The expected
// result, a+b or a-b, is worked out with 64-bit integer arithmetic and
// compared with the binary output; the redundant QSD output is also summed,
// sum(d[i] * 4**i), and must equal the same value with every digit in -3..+3.
// The test counts how often each mechanism of the design was exercised and
// fails if any never was: addition, subtraction, a +1 and a -1 carry out of
// the top digit, negative digits in the QSD result, and results that need
// the extra (33rd) bit.
module tb_qsd_adder_top;
  import qsd_pkg::*;

  localparam int unsigned WIDTH = QSD_BIN_WIDTH;
  localparam int unsigned DIGITS = WIDTH / 2;

  logic signed [WIDTH-1:0] a_bin, b_bin;
  logic                    sub;
  logic signed [WIDTH:0]   result;
  qsd_digit_t [DIGITS:0]   sum_qsd;

  int checks = 0;
  int failures = 0;
  int n_add = 0, n_sub = 0, n_carry_pos = 0, n_carry_neg = 0;
  int n_neg_digit = 0, n_wide = 0;

  qsd_adder_top dut (
    .a_bin   (a_bin),
    .b_bin   (b_bin),
    .sub     (sub),
    .result  (result),
    .sum_qsd (sum_qsd)
  );

  task automatic apply(input logic signed [WIDTH-1:0] a, input logic signed [WIDTH-1:0] b,
                       input logic s);
    longint want, qv;
    bit neg_digit;
    a_bin = a;
    b_bin = b;
    sub   = s;
    #1;
    want = s ? longint'(a) - longint'(b) : longint'(a) + longint'(b);
    checks++;
    if (longint'(result) != want) begin
      failures++;
      $display("FAIL %0d %s %0d: result %0d, expected %0d", a, s ? "-" : "+", b, result, want);
    end
    qv = 0;
    neg_digit = 1'b0;
    for (int i = DIGITS; i >= 0; i--) begin
      qv = qv * 4 + longint'(sum_qsd[i]);
      if (sum_qsd[i] < 0) neg_digit = 1'b1;
    end
    checks++;
    if (qv != want) begin
      failures++;
      $display("FAIL %0d %s %0d: QSD result worth %0d", a, s ? "-" : "+", b, qv);
    end
    for (int i = 0; i <= DIGITS; i++) begin
      checks++;
      if (sum_qsd[i] == 3'b100) begin
        failures++;
        $display("FAIL: QSD result digit %0d out of range", i);
      end
    end
    if (s) n_sub++; else n_add++;
    if (sum_qsd[DIGITS] > 0) n_carry_pos++;
    if (sum_qsd[DIGITS] < 0) n_carry_neg++;
    if (neg_digit) n_neg_digit++;
    if (want > longint'(32'sh7fff_ffff) || want < -longint'(64'sh8000_0000)) n_wide++;
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [WIDTH-1:0] corners[7];
    corners = '{32'sh0, 32'sh1, -32'sh1, 32'sh7fff_ffff, 32'sh8000_0000,
                32'sh5555_5555, -32'sh5555_5555};
    foreach (corners[i]) begin
      foreach (corners[k]) begin
        apply(corners[i], corners[k], 1'b0);
        apply(corners[i], corners[k], 1'b1);
      end
    end
    for (int n = 0; n < 5000; n++) begin
      apply($urandom(), $urandom(), 1'($urandom_range(1)));
    end
    // Every mechanism must have happened at least once.
    checks += 6;
    if (n_add == 0)       begin failures++; $display("FAIL: no addition"); end
    if (n_sub == 0)       begin failures++; $display("FAIL: no subtraction"); end
    if (n_carry_pos == 0) begin failures++; $display("FAIL: no +1 carry digit"); end
    if (n_carry_neg == 0) begin failures++; $display("FAIL: no -1 carry digit"); end
    if (n_neg_digit == 0) begin failures++; $display("FAIL: no negative result digit"); end
    if (n_wide == 0)      begin failures++; $display("FAIL: no result beyond 32 bits"); end
    $display("mechanisms: add=%0d sub=%0d carry+1=%0d carry-1=%0d neg_digit=%0d wide=%0d",
             n_add, n_sub, n_carry_pos, n_carry_neg, n_neg_digit, n_wide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
