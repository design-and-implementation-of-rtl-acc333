// zero_d: zero detector Zero_D. One W-input NOR over the SC register; its
// output ends the carry-save to binary conversions (SC == 0 means SS holds
// the binary value). Purely combinational.
module zero_d #(
  parameter int unsigned W = 13
) (
  input  logic [W-1:0] sc,
  output logic         zero
);
  always_comb zero = ~(|sc);
endmodule
