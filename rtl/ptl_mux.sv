// ptl_mux: 2:1 multiplexer, the third cell (T3) of the hybrid full adder.
//
// In silicon this is a pair of pass transistors that forwards one of two
// inputs to the carry output. In the adder the select is the T1 output
// (a xor b): when the operands differ the carry equals the carry input (d1),
// when they are equal it equals either operand (d0 = a). Which signal drives
// the select is this design's reading of the cell, chosen because it is the
// one that yields a full-adder carry.
//
// Interface: sel select; d0 passed when sel = 0; d1 passed when sel = 1; y out.
// Timing: purely combinational, no clock.
module ptl_mux (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic y
);
  always_comb y = sel ? d1 : d0;
endmodule
