// gdi_xor_tb: exhaustive self-checking test of the T1 XOR cell.
// Applies all four operand pairs and compares y with the parity of a + b,
// computed here by integer arithmetic. The cell is combinational, so each
// result is sampled 1 ns after the inputs change.
module gdi_xor_tb;
  logic a, b, y;
  int checks = 0, failures = 0;

  gdi_xor dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int unsigned expect_y;
      {a, b} = 2'(v);
      expect_y = ((v & 1) + (v >> 1)) % 2;
      #1;
      checks++;
      if (y !== expect_y[0]) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%0b expected %0d", a, b, y, expect_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
