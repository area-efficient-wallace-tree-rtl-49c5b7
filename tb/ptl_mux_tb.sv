// ptl_mux_tb: exhaustive self-checking test of the T3 (carry) multiplexer.
// Applies all eight combinations of sel, d0, d1 and compares y with a
// lookup of the selected data bit. Combinational: sampled 1 ns after each
// input change.
module ptl_mux_tb;
  logic sel, d0, d1, y;
  int checks = 0, failures = 0;

  ptl_mux dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [2:0] bits;
      logic expect_y;
      bits = 3'(v);
      {sel, d1, d0} = bits;
      expect_y = bits[sel ? 1 : 0];
      #1;
      checks++;
      if (y !== expect_y) begin
        failures++;
        $display("FAIL sel=%0b d0=%0b d1=%0b y=%0b expected %0b", sel, d0, d1, y, expect_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
