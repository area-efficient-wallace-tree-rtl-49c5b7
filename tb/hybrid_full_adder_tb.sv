// hybrid_full_adder_tb: exhaustive self-checking test of the one-bit full
// adder. For all eight input combinations, {carry, sum} must equal the
// integer sum a + b + cin. Combinational: sampled 1 ns after each change.
module hybrid_full_adder_tb;
  logic a, b, cin, sum, carry;
  int checks = 0, failures = 0;

  hybrid_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int unsigned total;
      {a, b, cin} = 3'(v);
      total = int'(a) + int'(b) + int'(cin);
      #1;
      checks++;
      if ({carry, sum} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> carry=%0b sum=%0b, expected %0d",
                 a, b, cin, carry, sum, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
