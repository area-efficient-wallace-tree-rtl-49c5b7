// ptl_xor: two-input exclusive OR, the second cell (T2) of the hybrid full adder.
//
// In silicon this is a pass-transistor XOR that combines the T1 output
// (a xor b of the adder) with the carry input to form the adder's sum. At
// register-transfer level it is the logic function y = a ^ b.
//
// Interface: a = T1 output, b = carry in; y = sum.
// Timing: purely combinational, no clock.
module ptl_xor (
  input  logic a,
  input  logic b,
  output logic y
);
  always_comb y = a ^ b;
endmodule
