// ccsa: one-level configurable carry-save adder of W CFA cells.
//
// alpha = 1: (sum, carry) = 1F_CSA(a, b, x), a three-input carry-save
// addition. alpha = 0: (sum, carry) = 2H_CSA(a, b), two serial two-input
// carry-save additions, which moves carries two positions per pass and so
// halves the passes a repeated SS + SC conversion needs. In both modes
// a + b (+ x) = sum + carry.
// The carry output is aligned to its weight: carry[j+1] is the carry out of
// cell j and carry[0] is 0. The carry out of cell W-1 is dropped: the
// multiplier sizes W so that every value it adds fits in W bits, in which
// case that carry is always 0; it is brought out as ovf for an assertion.
// Purely combinational; x is taken inverted (~x) as SM3 delivers it.
module ccsa #(
  parameter int unsigned W = 13
) (
  input  logic [W-1:0] a,      // SS-side operand (M2)
  input  logic [W-1:0] b,      // SC-side operand (M1)
  input  logic [W-1:0] x_n,    // ~x from SM3
  input  logic         alpha,  // 1: 1F_CSA, 0: 2H_CSA
  output logic [W-1:0] sum,
  output logic [W-1:0] carry,
  output logic         ovf     // carry out of cell W-1 (lost)
);
  logic [W-1:0] cout;

  for (genvar j = 0; j < W; j++) begin : g_cell
    if (j == 0) begin : g_lsb
      cfa u_cfa (.a_j(a[0]), .b_j(b[0]), .a_jm1(1'b0), .b_jm1(1'b0),
                 .x_n(x_n[0]), .alpha(alpha), .sum_j(sum[0]), .carry_j(cout[0]));
    end else begin : g_bit
      cfa u_cfa (.a_j(a[j]), .b_j(b[j]), .a_jm1(a[j-1]), .b_jm1(b[j-1]),
                 .x_n(x_n[j]), .alpha(alpha), .sum_j(sum[j]), .carry_j(cout[j]));
    end
  end

  assign carry = {cout[W-2:0], 1'b0};
  assign ovf   = cout[W-1];

endmodule
