// tb_qsd2bin: self-checking test of the QSD to binary converter at its
// default size (17 digits, 35-bit signed output).
//
// Random digit vectors over -3..+3, plus all +3, all -3 and zero. The
// expected binary value is sum(q[i] * 4**i), worked out with integer
// arithmetic in the testbench.
module tb_qsd2bin;
  import qsd_pkg::*;

  localparam int unsigned DIGITS = 17;

  qsd_digit_t [DIGITS-1:0] q;
  logic signed [2*DIGITS:0] bin;
  int checks = 0;
  int failures = 0;

  qsd2bin #(.DIGITS(DIGITS)) dut (.q(q), .bin(bin));

  task automatic check();
    longint v = 0;
    for (int i = DIGITS - 1; i >= 0; i--) v = v * 4 + longint'(q[i]);
    checks++;
    if (longint'(bin) != v) begin
      failures++;
      $display("FAIL: QSD value %0d, binary output %0d", v, bin);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q = {DIGITS{3'sd3}};  #1; check();
    q = {DIGITS{-3'sd3}}; #1; check();
    q = '0;               #1; check();
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < DIGITS; i++) q[i] = 3'(int'($urandom_range(6)) - 3);
      #1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
