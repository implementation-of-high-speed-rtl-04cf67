// tb_bin2qsd: self-checking test of the binary to QSD converter at 32 bits.
//
// For random and extreme signed inputs, the QSD value sum(q[i] * 4**i) is
// worked out with integer arithmetic and compared with the input, and every
// digit is checked to lie in -3..+3.
module tb_bin2qsd;
  import qsd_pkg::*;

  localparam int unsigned WIDTH = 32;
  localparam int unsigned DIGITS = WIDTH / 2;

  logic signed [WIDTH-1:0] bin;
  qsd_digit_t [DIGITS-1:0] q;
  int checks = 0;
  int failures = 0;

  bin2qsd #(.WIDTH(WIDTH)) dut (.bin(bin), .q(q));

  task automatic check();
    longint v = 0;
    for (int i = DIGITS - 1; i >= 0; i--) v = v * 4 + longint'(q[i]);
    checks++;
    if (v != longint'(bin)) begin
      failures++;
      $display("FAIL bin=%0d: QSD value %0d", bin, v);
    end
    for (int i = 0; i < DIGITS; i++) begin
      checks++;
      if (q[i] == 3'b100) begin
        failures++;
        $display("FAIL bin=%0d: digit %0d out of range", bin, i);
      end
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [WIDTH-1:0] corners[6];
    corners = '{32'sh0, -32'sh1, 32'sh7fff_ffff, 32'sh8000_0000, 32'sh1, 32'sh5555_5555};
    foreach (corners[k]) begin
      bin = corners[k];
      #1;
      check();
    end
    for (int n = 0; n < 2000; n++) begin
      bin = $urandom();
      #1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
