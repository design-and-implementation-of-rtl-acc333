// scs_mm_new: radix-2 Montgomery modular multiplier with a one-level
// configurable carry-save adder (SCS-MM-New).
//
// Computes S = A * B * 2^-(K+2) mod N_hat for an odd modulus N_hat, with
// A, B, N_hat and S in plain binary. The only wide adder is one row of K+5
// configurable full adders (ccsa). It does all the work in turn:
//   1. D_hat = B_hat + N_hat, B_hat = B << 3: one three-input pass, then
//      two-half-adder passes until the carry word SC is zero.
//   2. The Montgomery loop, i = -1 .. K+4, one iteration per clock:
//      (SS, SC) = (SS + SC + x) / 2, x in {0, N_hat, B_hat, D_hat} chosen by
//      (A_i, q_i). The quotient and A bit of the next iteration are
//      precomputed by skip_d, and an iteration with A = q = 0 and an even
//      SS + SC is skipped by shifting two positions instead of one.
//      The shift itself is applied one cycle late by the operand
//      multiplexers, so the critical path is mux + full adder.
//   3. Format conversion: two-half-adder passes until SC == 0; SS is S.
// Six registers: N_hat, B_hat, D_hat, A (shifted as i advances), SS, SC,
// plus the q_hat, A_hat and skip flip-flops.
//
// Interface: pulse start with a, b, n_hat valid (sampled in that cycle
// while idle); busy is high until done pulses for one cycle, and s holds the
// result until the next start. Preconditions: n_hat odd, a and b below
// 2^K, n_hat below 2^(K+2). Then S < n_hat + b/4 and S is congruent to
// A*B*2^-(K+2) modulo n_hat (it is not fully reduced).
// Latency: done rises 5 + P + L + F clock edges after the edge that samples
// start, where P is the number of 2H_CSA passes that convert D_hat, L the
// number of loop cycles (K+6 minus the skipped iterations) and F the number
// of final 2H_CSA passes after the first one. P and F depend on the longest
// carry chain, at most about (K+5)/2 each.
// The algorithm, datapath and Skip_D equations follow the SCS-MM-New
// description; K = 8 is the operand width of its 8-bit demonstration. The
// controller, the handshake, the asynchronous active-low reset and the
// suppression of a skip in the last iteration are this design's choices.
module scs_mm_new
  import mm_pkg::*;
#(
  parameter int unsigned K = 8   // operand width k
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K+1:0] n_hat,
  output logic         busy,
  output logic         done,
  output logic [K+2:0] s,
  output logic         skip_evt,  // a loop iteration is skipped this cycle
  output logic         alpha      // CCSA mode this cycle (1 = 1F_CSA)
);
  localparam int unsigned W = K + 5;   // carry-save word width

  // registers
  logic [W-1:0] nh_q, bh_q, dh_q, ss_q, sc_q;
  logic [K+1:0] a_q;                   // A >> (i+1), two zero guard bits
  logic         skip_q, qh_q, ah_q;

  // datapath wires
  logic [W-1:0] m1_y, m2_y, x_n, sum, carry;
  logic         ovf, zero;
  logic [2:0]   ss_lsb, sc_lsb;
  logic         skip_nx, q_nx, a_nx;

  // control
  opnd_sel_e sel;
  logic ld_ops, reg_en, ld_d, loop_en, allow, loop_end, fconv_1st;

  mm_ctrl #(.K(K)) u_ctrl (
    .clk, .rst_n, .start, .zero, .skip_q, .skip_nx,
    .sel, .alpha, .ld_ops, .reg_en, .ld_d, .loop_en, .allow,
    .loop_end, .fconv_1st, .busy, .done
  );

  opnd_mux #(.W(W)) u_m1 (.sel, .ld(nh_q), .r(sc_q), .y(m1_y));
  opnd_mux #(.W(W)) u_m2 (.sel, .ld(bh_q), .r(ss_q), .y(m2_y));

  sm3 #(.W(W)) u_sm3 (
    .a_hat(ah_q), .q_hat(qh_q), .n_hat(nh_q), .b_hat(bh_q), .d_hat(dh_q),
    .x_n
  );

  ccsa #(.W(W)) u_ccsa (
    .a(m2_y), .b(m1_y), .x_n, .alpha, .sum, .carry, .ovf
  );

  lsb_mux u_m4 (.skip(skip_q), .r(sc_q[4:1]), .y(sc_lsb));
  lsb_mux u_m5 (.skip(skip_q), .r(ss_q[4:1]), .y(ss_lsb));

  skip_d u_skip (
    .n_hat(nh_q[2:0]), .q_hat(qh_q), .ss(ss_lsb), .sc(sc_lsb),
    .a1(a_q[0]), .a2(a_q[1]), .allow, .skip(skip_nx), .q_next(q_nx),
    .a_next(a_nx)
  );

  zero_d #(.W(W)) u_zd (.sc(sc_q), .zero);

  // operand registers N_hat, B_hat, D_hat and the A shift register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nh_q <= '0;
      bh_q <= '0;
      dh_q <= '0;
      a_q  <= '0;
    end else begin
      if (ld_ops) begin
        nh_q <= W'(n_hat);
        bh_q <= W'(b) << 3;
        a_q  <= (K+2)'(a);
      end else if (loop_en) begin
        a_q  <= skip_nx ? (a_q >> 2) : (a_q >> 1);
      end
      if (ld_d) dh_q <= ss_q;
    end
  end

  // carry-save registers SS, SC
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ss_q <= '0;
      sc_q <= '0;
    end else if (ld_d) begin
      ss_q <= '0;
      sc_q <= '0;
    end else if (reg_en) begin
      ss_q <= sum;
      sc_q <= carry;
    end
  end

  // q_hat, A_hat and skip flip-flops
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      skip_q <= 1'b0;
      qh_q   <= 1'b0;
      ah_q   <= 1'b0;
    end else if (ld_ops || fconv_1st) begin
      skip_q <= 1'b0;
      qh_q   <= 1'b0;
      ah_q   <= 1'b0;
    end else if (loop_en) begin
      skip_q <= skip_nx;
      qh_q   <= loop_end ? 1'b0 : q_nx;
      ah_q   <= loop_end ? 1'b0 : a_nx;
    end
  end

  assign s        = ss_q[K+2:0];
  assign skip_evt = loop_en & skip_nx;

  // the carry word must never overflow the W-bit adder row
  property p_no_ovf;
    @(posedge clk) disable iff (!rst_n) reg_en |-> !ovf;
  endproperty
  a_no_ovf: assert property (p_no_ovf) else $error("CCSA overflow");

  // every main-loop iteration must leave an even SS + SC + x (bit 0 of the
  // sum word is 0), otherwise the division by two would be inexact
  property p_even;
    @(posedge clk) disable iff (!rst_n) loop_en |-> !sum[0];
  endproperty
  a_even: assert property (p_even) else $error("odd loop sum");

  // result fits the output
  property p_fit;
    @(posedge clk) disable iff (!rst_n) done |-> (ss_q[W-1:K+3] == '0);
  endproperty
  a_fit: assert property (p_fit) else $error("result too wide");
endmodule
