// skip_d: skip detector Skip_D with quotient precomputation.
//
// In iteration i the CCSA computes SS[i] + SC[i] + x, x chosen by
// (A_hat, q_hat) = (A_i, q_i). Because B_hat = B << 3 has three zero low bits
// and D_hat = B_hat + N_hat, the low three bits of x are q_hat & N_hat[2:0].
// From bits 2:0 of SS[i], SC[i] and x this block forms, in the same cycle,
// the low bits of the next operands (after the division by two):
//   SS[i+1]_0 = s1 = SS_1 ^ SC_1 ^ x_1     SC[i+1]_0 = maj(SS_0, SC_0, x_0)
//   SS[i+1]_1 = SS_2 ^ SC_2 ^ x_2           SC[i+1]_1 = maj(SS_1, SC_1, x_1)
// and from them the next two quotients (B_hat_0 = 0, so q = SS_0 ^ SC_0):
//   q_{i+1} = SS[i+1]_0 ^ SC[i+1]_0,   q_{i+2} = SS[i+1]_1 ^ SC[i+1]_1
//   skip_{i+1} = ~(A_{i+1} | q_{i+1} | SS[i+1]_0)
// q_{i+2} is only used when skip_{i+1} = 1. When iteration i+1 is skipped
// the next q_hat, A_hat are q_{i+2}, A_{i+2}, else q_{i+1}, A_{i+1} (the two
// 2-to-1 multiplexers of the original skip detector). The caller registers the
// three outputs. 'allow' clears skip (used in the last loop iteration so the
// loop ends exactly at SS[k+5]); that gating is this design's addition.
// The original detector takes only N_hat_2, presuming fixed low N_hat bits;
// this block takes N_hat[2:0] and works for any odd N_hat.
// Purely combinational.
module skip_d (
  input  logic [2:0] n_hat,   // N_hat[2:0]
  input  logic       q_hat,   // q_i
  input  logic [2:0] ss,      // SS[i]_2:0
  input  logic [2:0] sc,      // SC[i]_2:0
  input  logic       a1,      // A_{i+1}
  input  logic       a2,      // A_{i+2}
  input  logic       allow,   // 0 forces skip_{i+1} = 0
  output logic       skip,    // skip_{i+1}
  output logic       q_next,  // next q_hat
  output logic       a_next   // next A_hat
);
  logic [2:0] x;
  logic s1, c0, s2, c1, q1, q2;

  always_comb begin
    x      = {3{q_hat}} & n_hat;
    s1     = ss[1] ^ sc[1] ^ x[1];
    c0     = (ss[0] & sc[0]) | (ss[0] & x[0]) | (sc[0] & x[0]);
    s2     = ss[2] ^ sc[2] ^ x[2];
    c1     = (ss[1] & sc[1]) | (ss[1] & x[1]) | (sc[1] & x[1]);
    q1     = s1 ^ c0;
    q2     = s2 ^ c1;
    skip   = allow & ~(a1 | q1 | s1);
    q_next = skip ? q2 : q1;
    a_next = skip ? a2 : a1;
  end
endmodule
