// gdi_xor: two-input exclusive OR, the first cell (T1) of the hybrid full adder.
//
// In silicon this cell is a gate-diffusion-input XOR: two small inverter-like
// stages whose diffusion terminals are driven by the operands instead of the
// supply rails. Only its logic function matters at register-transfer level,
// so the module computes y = a ^ b. Its output feeds both the sum XOR (T2) and
// the carry multiplexer (T3) of the full adder.
//
// Interface: a, b operand bits; y = a xor b.
// Timing: purely combinational, no clock.
module gdi_xor (
  input  logic a,
  input  logic b,
  output logic y
);
  always_comb y = a ^ b;
endmodule
