// hybrid_full_adder: the 10-transistor one-bit full adder that is the only
// building block of the Wallace-tree encoder.
//
// The adder is three cells. T1 (gdi_xor) forms p = a ^ b. T2 (ptl_xor) forms
// sum = p ^ cin. T3 (ptl_mux) forms the carry by selecting cin when p = 1 and
// a when p = 0: if the operands differ, the carry is decided by cin; if they
// are equal, both equal the carry. Splitting the adder into these three cells
// follows the circuit the design is based on; the choice of p as the select of
// T3 is this design's reading of that circuit. Electrical properties of the
// transistor cells (voltage swing, area) are not modelled.
//
// Interface: a, b, cin inputs; sum = a ^ b ^ cin; carry = majority(a, b, cin).
// Timing: purely combinational, no clock.
module hybrid_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry
);
  logic p;  // a xor b, shared by the sum and carry cells

  gdi_xor u_t1 (.a(a),   .b(b),   .y(p));
  ptl_xor u_t2 (.a(p),   .b(cin), .y(sum));
  ptl_mux u_t3 (.sel(p), .d0(a),  .d1(cin), .y(carry));
endmodule
