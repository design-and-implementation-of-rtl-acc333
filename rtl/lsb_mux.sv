// lsb_mux: 3-bit 2-to-1 multiplexer (M4 on the SC side, M5 on the SS side).
//
// Gives the skip detector bits 2:0 of the current iteration's operand,
// i.e. of the register shifted right by one (skip = 0) or by two (skip = 1),
// taken straight from register bits 4:1 (bit 0 is never needed) so the skip detector does not wait
// for the wide M1/M2. Purely combinational.
module lsb_mux (
  input  logic       skip,   // stored skip_{i} of the previous iteration
  input  logic [4:1] r,      // register bits 4:1 (raw CCSA output)
  output logic [2:0] y       // SS[i]_2:0 or SC[i]_2:0
);
  always_comb y = skip ? r[4:2] : r[3:1];
endmodule
