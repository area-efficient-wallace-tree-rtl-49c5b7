// wallace_encoder: thermometer-to-binary encoder for a flash ADC, built as a
// Wallace tree of one-bit full adders. Top of the design.
//
// A flash ADC's 2^N-1 comparators produce a thermometer code. This encoder
// does not look for the 1-to-0 transition in that code; it counts the ones.
// For a clean code the count is the conversion result, and an isolated
// out-of-place bit (a "bubble") changes the count by at most one code instead
// of producing a wild value, so bubble errors are suppressed across the whole
// word without any local correction gates.
//
// Structure. A (2^N-1)-input ones counter is two (2^(N-1)-1)-input counters,
// one on the lower and one on the upper part of the code, whose (N-1)-bit
// results are added by an (N-1)-bit ripple adder; the one input left over
// (the top bit of the code) enters that adder as its carry-in. Unrolled, this
// is a tree of levels L = 2..N: level 2 is 2^(N-2) single full adders (3:2
// counters), and each node of level L > 2 is an (L-1)-bit ripple adder that
// merges two level L-1 nodes and one leftover input into an L-bit count. The adder count is
// F(N) = 2 F(N-1) + (N-1), F(2) = 1, i.e. 2^N - N - 1: 11 adders for the
// 15:4 encoder (N = 4, the default). For N = 4 the netlist is that of the
// reference 15:4 block diagram:
//   first column   FA(i13,i12,i11) FA(i10,i9,i8) FA(i6,i5,i4) FA(i3,i2,i1)
//   second column  FA(i14, sums of the two upper first-column adders) and
//                  FA(carries of those adders + carry of the one before),
//                  likewise with i7 for the lower half
//   third column   a 3-bit ripple adder of both halves with i15 as carry-in.
// Which input pin of each adder a signal uses follows the top-to-bottom order
// of the drawing; the full adder is symmetric, so it does not change the
// function. The delay-balancing cells that a schematic may put on the i15
// path are wires at this level and are left out.
//
// Every adder is a hybrid_full_adder (GDI XOR, PTL XOR and PTL MUX cells).
//
// Interface:
//   therm_i[2^N-2:0]  thermometer code, therm_i[k-1] is comparator input ik
//   bin_o[N-1:0]      number of ones in therm_i, bin_o[0] least significant
// The output is a plain binary vector; the printed labels b3..b0 of the
// reference drawing carry no weights, so this bit order is this design's.
// Implementation: the L-bit count of node j of level L lives in one flat
// vector cnt at offset cnt_off(L) + j*L; node_start(L, j) is the index of the
// node's lowest input bit, so its leftover input is node_start + 2^L - 2.
// Timing: purely combinational (no clock, no reset, no pipeline registers).
// The critical path is N-1 adder levels into the last ripple adder plus its
// N-1 carry stages.
module wallace_encoder #(
  parameter int unsigned N = 4  // output bits; the encoder is (2^N-1):N
) (
  input  logic [2**N-2:0] therm_i,
  output logic [N-1:0]    bin_o
);
  // Offset in cnt of the first node of level lvl: levels 2..lvl-1 hold
  // 2^(N-l) nodes of l bits each.
  function automatic int unsigned cnt_off(int unsigned lvl);
    int unsigned off = 0;
    for (int unsigned l = 2; l < lvl; l++) off += (2**(N-l)) * l;
    return off;
  endfunction

  // Index of the lowest input bit of node j of level lvl. Bit i of j set
  // means the node lies in the upper half of its ancestor at level lvl+i+1,
  // which starts 2^(lvl+i)-1 inputs above that ancestor's lower half.
  function automatic int unsigned node_start(int unsigned lvl, int unsigned j);
    int unsigned s = 0;
    for (int unsigned i = 0; i + lvl < N; i++)
      if (((j >> i) & 1) != 0) s += 2**(lvl+i) - 1;
    return s;
  endfunction

  localparam int unsigned CNT_W = cnt_off(N + 1);  // all node counts

  logic [CNT_W-1:0] cnt;

  if (N < 2) begin : g_bad_n
    $error("wallace_encoder: N must be at least 2");
  end

  for (genvar lvl = 2; lvl <= N; lvl++) begin : g_lvl
    for (genvar j = 0; j < 2**(N-lvl); j++) begin : g_node
      localparam int unsigned BASE = node_start(lvl, j);
      localparam int unsigned OUT  = cnt_off(lvl) + j * lvl;

      if (lvl == 2) begin : g_leaf
        // 3:2 counter: one full adder
        hybrid_full_adder u_fa (
          .a(therm_i[BASE+2]), .b(therm_i[BASE+1]), .cin(therm_i[BASE]),
          .sum(cnt[OUT]), .carry(cnt[OUT+1])
        );
      end else begin : g_merge
        localparam int unsigned LO = cnt_off(lvl-1) + (2*j)   * (lvl-1);
        localparam int unsigned HI = cnt_off(lvl-1) + (2*j+1) * (lvl-1);

        logic [lvl-1:0] c;  // ripple carries; c[0] is the leftover input

        always_comb c[0] = therm_i[BASE + 2**lvl - 2];

        for (genvar k = 0; k < lvl - 1; k++) begin : g_rca
          if (k == 0) begin : g_first
            hybrid_full_adder u_fa (
              .a(c[0]), .b(cnt[HI]), .cin(cnt[LO]),
              .sum(cnt[OUT]), .carry(c[1])
            );
          end else begin : g_next
            hybrid_full_adder u_fa (
              .a(cnt[HI+k]), .b(c[k]), .cin(cnt[LO+k]),
              .sum(cnt[OUT+k]), .carry(c[k+1])
            );
          end
        end

        always_comb cnt[OUT+lvl-1] = c[lvl-1];
      end
    end
  end

  always_comb bin_o = cnt[cnt_off(N) +: N];
endmodule
