// wallace_encoder_sizes_tb: self-checking test of the Wallace-tree encoder at
// resolutions other than the default 4 bits: 3:2 (N = 2, one full adder), 7:3
// (N = 3, four adders), 31:5 (N = 5, 26 adders) and 63:6 (N = 6, 57 adders).
// Each size is checked by a wallace_size_check helper (exhaustive where the
// input space is small, clean, single-bubble and random codes otherwise); the
// results are summed here.
module wallace_encoder_sizes_tb;
  logic done2, done3, done5, done6;
  int   c2, c3, c5, c6, f2, f3, f5, f6;
  int   checks, failures;

  wallace_size_check #(.N(2)) u_n2 (.done(done2), .checks(c2), .failures(f2));
  wallace_size_check #(.N(3)) u_n3 (.done(done3), .checks(c3), .failures(f3));
  wallace_size_check #(.N(5)) u_n5 (.done(done5), .checks(c5), .failures(f5));
  wallace_size_check #(.N(6)) u_n6 (.done(done6), .checks(c6), .failures(f6));

  initial begin : watchdog
    #10ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c5 + c6, f2 + f3 + f5 + f6 + 1);
    $finish;
  end

  initial begin
    wait (done2 && done3 && done5 && done6);
    checks = c2 + c3 + c5 + c6;
    failures = f2 + f3 + f5 + f6;
    $display("N=2: %0d checks, N=3: %0d, N=5: %0d, N=6: %0d", c2, c3, c5, c6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
