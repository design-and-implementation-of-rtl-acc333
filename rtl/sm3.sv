// sm3: simplified 4-to-1 multiplexer SM3 feeding the third CCSA operand.
//
// Selects x from {0, N_hat, B_hat, D_hat} by (A_hat, q_hat):
//   A_hat=0,q_hat=0 -> 0     A_hat=0,q_hat=1 -> N_hat
//   A_hat=1,q_hat=0 -> B_hat A_hat=1,q_hat=1 -> D_hat = B_hat + N_hat
// Because one input is the constant 0, the multiplexer reduces to an
// AND-OR per bit; like the original SM3 it delivers the inverted value
// ~x, which the CFA cells take. Purely combinational.
module sm3 #(
  parameter int unsigned W = 13
) (
  input  logic         a_hat,  // A_i of the current iteration
  input  logic         q_hat,  // q_i of the current iteration
  input  logic [W-1:0] n_hat,
  input  logic [W-1:0] b_hat,
  input  logic [W-1:0] d_hat,
  output logic [W-1:0] x_n     // ~x
);
  always_comb begin
    x_n = ~(({W{ q_hat & ~a_hat}} & n_hat) |
            ({W{~q_hat &  a_hat}} & b_hat) |
            ({W{ q_hat &  a_hat}} & d_hat));
  end
endmodule
