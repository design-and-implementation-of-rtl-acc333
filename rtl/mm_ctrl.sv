// mm_ctrl: control part of the SCS-MM-New multiplier.
//
// Sequences one multiplication through the phases of the algorithm:
//   ST_PRE   one 1F_CSA pass: (SS, SC) = B_hat + N_hat + 0           (step 2)
//   ST_PCONV 2H_CSA passes on (SS, SC) until SC == 0; in the cycle Zero_D
//            reports SC == 0, D_hat takes SS and SS, SC are cleared   (3-6)
//   ST_LOOP  one iteration per cycle, i = -1 .. k+4; an iteration flagged
//            by skip_{i+1} is not executed and i advances by two      (7-21)
//   ST_FCONV 2H_CSA passes until SC == 0; the first pass also applies
//            the pending division of the last iteration               (22-24)
//   ST_DONE  one cycle with done = 1; the result stays in SS.
// The loop index is kept as cnt = i + 1 (0 .. K+5). In the last iteration
// (i = k+4) skipping is disallowed, otherwise the loop would divide once
// too often. The original description leaves the control part open; the state
// encoding, the start/done handshake and the per-phase select codes are
// this design's. Timing: start is sampled in ST_IDLE; done is high for one
// cycle; the operands are loaded in the start cycle.
module mm_ctrl
  import mm_pkg::*;
#(
  parameter int unsigned K = 8   // operand width k
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,     // begin a multiplication (ST_IDLE only)
  input  logic      zero,      // Zero_D: SC register == 0
  input  logic      skip_q,    // stored skip flag (shift of the registers)
  input  logic      skip_nx,   // skip_{i+1} from Skip_D this cycle
  output opnd_sel_e sel,       // M1 and M2 select
  output logic      alpha,     // CCSA mode: 1 = 1F_CSA, 0 = 2H_CSA
  output logic      ld_ops,    // load A, B_hat, N_hat; clear FFs
  output logic      reg_en,    // SS, SC take the CCSA output
  output logic      ld_d,      // D_hat takes SS; SS, SC cleared
  output logic      loop_en,   // loop iteration: FFs and A register update
  output logic      allow,     // skip allowed this iteration
  output logic      loop_end,  // last loop cycle: q_hat, A_hat cleared
  output logic      fconv_1st, // first final-conversion pass: skip FF cleared
  output logic      busy,
  output logic      done
);
  localparam int unsigned CW   = $clog2(K + 8);
  localparam logic [CW-1:0] LAST = CW'(K + 5);   // cnt of iteration i = k+4

  mm_state_e   st_q, st_d;
  logic [CW-1:0] cnt_q, cnt_d, cnt_inc;
  logic        first_q, first_d;

  always_comb begin
    st_d      = st_q;
    cnt_d     = cnt_q;
    first_d   = first_q;
    sel       = SEL_REG;
    alpha     = 1'b0;
    ld_ops    = 1'b0;
    reg_en    = 1'b0;
    ld_d      = 1'b0;
    loop_en   = 1'b0;
    allow     = 1'b0;
    loop_end  = 1'b0;
    fconv_1st = 1'b0;
    done      = 1'b0;
    cnt_inc   = cnt_q + (skip_nx ? CW'(2) : CW'(1));
    unique case (st_q)
      ST_IDLE: if (start) begin
        ld_ops = 1'b1;
        st_d   = ST_PRE;
      end
      ST_PRE: begin
        sel    = SEL_LOAD;
        alpha  = 1'b1;
        reg_en = 1'b1;
        st_d   = ST_PCONV;
      end
      ST_PCONV: begin
        if (zero) begin
          ld_d  = 1'b1;
          cnt_d = '0;
          st_d  = ST_LOOP;
        end else begin
          sel    = SEL_REG;
          reg_en = 1'b1;
        end
      end
      ST_LOOP: begin
        sel     = skip_q ? SEL_SH2 : SEL_SH1;
        alpha   = 1'b1;
        reg_en  = 1'b1;
        loop_en = 1'b1;
        allow   = (cnt_q != LAST);
        cnt_d   = cnt_inc;
        if (cnt_inc > LAST) begin
          loop_end = 1'b1;
          first_d  = 1'b1;
          st_d     = ST_FCONV;
        end
      end
      ST_FCONV: begin
        if (first_q) begin
          sel       = skip_q ? SEL_SH2 : SEL_SH1;
          reg_en    = 1'b1;
          fconv_1st = 1'b1;
          first_d   = 1'b0;
        end else if (zero) begin
          st_d = ST_DONE;
        end else begin
          sel    = SEL_REG;
          reg_en = 1'b1;
        end
      end
      ST_DONE: begin
        done = 1'b1;
        st_d = ST_IDLE;
      end
      default: st_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= ST_IDLE;
      cnt_q   <= '0;
      first_q <= 1'b0;
    end else begin
      st_q    <= st_d;
      cnt_q   <= cnt_d;
      first_q <= first_d;
    end
  end

  assign busy  = (st_q != ST_IDLE);
endmodule
