// opnd_mux: W-bit 4-to-1 operand multiplexer (M1 on the SC side, M2 on the
// SS side of the CCSA).
//
// Inputs: the precomputation operand ld (N_hat for M1, B_hat for M2) and the
// register r (SC or SS). The select code picks ld, r, r >> 1 or r >> 2. The
// register holds the raw CCSA output of the previous cycle, so the division
// by two of a main-loop iteration (>> 1), or by four when the next iteration
// is skipped (>> 2), is done here, one cycle late, off the CCSA's path.
// Purely combinational; the select comes from the controller.
module opnd_mux
  import mm_pkg::*;
#(
  parameter int unsigned W = 13
) (
  input  opnd_sel_e    sel,
  input  logic [W-1:0] ld,
  input  logic [W-1:0] r,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (sel)
      SEL_LOAD: y = ld;
      SEL_REG:  y = r;
      SEL_SH1:  y = r >> 1;
      SEL_SH2:  y = r >> 2;
      default:  y = r;
    endcase
  end
endmodule
