// cfa: configurable full adder cell (CFA_j) of the one-level CCSA.
//
// With alpha = 1 the cell is a full adder over a_j, b_j and the multiplexer
// operand x_j (supplied inverted, ~x_j, as the simplified multiplexer SM3
// produces it): one three-input carry-save addition (1F_CSA).
// With alpha = 0 the cell is the second of two serial half adders (2H_CSA):
// the first half adder of bit j is formed by this cell's XOR of a_j, b_j and
// the AND of a_{j-1}, b_{j-1} that each cell computes for its lower
// neighbour's bits (gate G2 sits in CFA_{j+1} for HA1_j). The second half
// adder adds the first XOR to that neighbour carry.
//   sum_j   = a_j ^ b_j ^ t
//   carry_j = alpha ? maj(a_j, b_j, t) : (a_j ^ b_j) & t      (weight j+1)
//   t       = alpha ? x_j : a_{j-1} & b_{j-1}
// Purely combinational. The gate arrangement follows the published CFA cell
// (XOR G1, G2 AND of the neighbour, 2-to-1 multiplexer controlled by alpha,
// alpha gating the a_j & b_j term of the carry); the exact gate types are
// this design's reading.
module cfa (
  input  logic a_j,      // M2 output bit j (SS side)
  input  logic b_j,      // M1 output bit j (SC side)
  input  logic a_jm1,    // M2 output bit j-1 (0 for j = 0)
  input  logic b_jm1,    // M1 output bit j-1 (0 for j = 0)
  input  logic x_n,      // ~x_j from SM3
  input  logic alpha,    // 1: 1F_CSA, 0: 2H_CSA
  output logic sum_j,    // sum bit, weight j
  output logic carry_j   // carry bit, weight j+1
);
  logic g1, g2, t;

  always_comb begin
    g1      = a_j ^ b_j;                 // HA1_j sum (G1)
    g2      = a_jm1 & b_jm1;             // HA1_{j-1} carry (G2 of this cell)
    t       = alpha ? ~x_n : g2;         // third operand
    sum_j   = g1 ^ t;                    // G3
    carry_j = (alpha & a_j & b_j) | (g1 & t);  // G4/G5 with alpha gating
  end
endmodule
