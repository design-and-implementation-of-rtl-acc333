// mm_pkg: types shared by the SCS-MM-New Montgomery multiplier.
//
// opnd_sel_e is the select code of the operand multiplexers M1 and M2: the
// load operand (N_hat for M1, B_hat for M2), the register as it is (format
// conversion), or the register shifted right by one or two bit positions
// (the division by two of the main loop, delayed by one cycle, and the skip
// of one iteration). mm_state_e names the phases of one multiplication.
package mm_pkg;

  typedef enum logic [1:0] {
    SEL_LOAD = 2'd0,   // precomputation operand (N_hat on M1, B_hat on M2)
    SEL_REG  = 2'd1,   // register unshifted (2H_CSA format conversion)
    SEL_SH1  = 2'd2,   // register >> 1 (one iteration)
    SEL_SH2  = 2'd3    // register >> 2 (one iteration skipped)
  } opnd_sel_e;

  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,   // waiting for start
    ST_PRE   = 3'd1,   // (SS,SC) = 1F_CSA(B_hat, N_hat, 0)
    ST_PCONV = 3'd2,   // 2H_CSA until SC == 0, then D_hat = SS
    ST_LOOP  = 3'd3,   // main loop, i = -1 .. k+4 with skipping
    ST_FCONV = 3'd4,   // final 2H_CSA format conversion
    ST_DONE  = 3'd5    // result held on the output
  } mm_state_e;

endpackage
