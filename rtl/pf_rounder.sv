// pf_rounder: two-stage rounder of a packet forwarding floating point pipeline
// (stages R1 and R2, shared by the adder and the multiplier pipes).
//
// The operation stages hand over an unrounded result: sign, exponent and a
// (2P+1)-digit borrow-save significand with digit positions -1..2P-1, whose
// leading digit (position -1, weight 2) is +1 and whose digit 0 is 0 or 1, so
// the value lies in (1,4). The rounder delivers the result twice:
//   * in packet forwarding format, for a dependent operation: the principal
//     part (the P leading digits, positions -1..P-2, unrounded) together with
//     sign and exponent one cycle after the input is registered, and the
//     two-digit carry-round packet c one cycle later. The value
//     principal + c*2^-(P-1) is the correctly rounded significand.
//   * in standard format, one more cycle later: sign, exponent and a
//     normalized P-bit binary significand with the same value.
// R1 computes the upper signed sticky digit (positions 0..P-1) and the lower
// one (positions P+1..2P-1) with mux trees and feeds them, with the digits L,
// G, R and the rounding mode and sign, to the round logic that chooses c. R2
// adds c to the principal part with a reduced borrow-save adder, compresses
// the sum with a 2-1 subtracting adder and normalizes it with a right shift
// that also corrects the exponent. This datapath, the stage cuts and the
// forwarding points follow the document.
//
// Timing: three register stages, one result per clock, no stalls. Input
// sampled at edge k appears on pf_* after edge k (the forwarded principal
// part, leaving at the end of the operation stage A2), on cr_* after edge k+1
// (end of R1) and on std_* after edge k+2 (end of R2). The register at the
// input stands for the A2/R1 pipeline register. Exponent handling beyond the
// normalization increment (overflow, underflow, denormals, special values) is
// not part of the document's rounder and is not done here: the exponent wraps.
// Valid bits are reset asynchronously (active-low rst_n); data registers are
// not reset. These timing and reset details are this design's choices.
module pf_rounder
  import pf_pkg::*;
#(
  parameter int unsigned P      = PREC,   // precision of the standard result
  parameter int unsigned EXP_W_P = EXP_W  // exponent field width
) (
  input  logic               clk,
  input  logic               rst_n,
  // unrounded result from the operation stages (A2 or M2)
  input  logic               in_valid,
  input  logic               in_sign,
  input  logic [EXP_W_P-1:0] in_exp,
  input  logic [-1:2*P-1]    in_xp,
  input  logic [-1:2*P-1]    in_xn,
  input  ieee_rmode_t        in_rmode,
  // forwarded sign, exponent and principal part packet
  output logic               pf_valid,
  output logic               pf_sign,
  output logic [EXP_W_P-1:0] pf_exp,
  output logic [-1:P-2]      pf_pp,
  output logic [-1:P-2]      pf_pn,
  // forwarded carry-round packet (index 0 at position P-2)
  output logic               cr_valid,
  output logic [0:1]         cr_p,
  output logic [0:1]         cr_n,
  output logic               cr_round_at_l,  // rounding happened at L ([2,4) range)
  // rounded result in standard format
  output logic               std_valid,
  output logic               std_sign,
  output logic [EXP_W_P-1:0] std_exp,
  output logic [0:P-1]       std_sig
);

  // ---------------------------------------------------------------- R1 stage
  logic               r1_valid;
  logic               r1_sign;
  logic [EXP_W_P-1:0] r1_exp;
  logic [-1:2*P-1]    r1_xp, r1_xn;
  ieee_rmode_t        r1_rmode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r1_valid <= 1'b0;
    else        r1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    r1_sign  <= in_sign;
    r1_exp   <= in_exp;
    r1_xp    <= in_xp;
    r1_xn    <= in_xn;
    r1_rmode <= in_rmode;
  end

  assign pf_valid = r1_valid;
  assign pf_sign  = r1_sign;
  assign pf_exp   = r1_exp;
  assign pf_pp    = r1_xp[-1:P-2];
  assign pf_pn    = r1_xn[-1:P-2];

  sticky_t su, sl;

  signed_sticky #(.N(P)) u_upper_sticky (
    .xp (r1_xp[0:P-1]),
    .xn (r1_xn[0:P-1]),
    .st (su)
  );

  signed_sticky #(.N(P-1)) u_lower_sticky (
    .xp (r1_xp[P+1:2*P-1]),
    .xn (r1_xn[P+1:2*P-1]),
    .st (sl)
  );

  logic [0:1] c_p, c_n;
  logic       round_at_l;

  round_logic u_round_logic (
    .su         (su),
    .sl         (sl),
    .dl         (bs_digit_t'({r1_xp[P-2], r1_xn[P-2]})),
    .dg         (bs_digit_t'({r1_xp[P-1], r1_xn[P-1]})),
    .dr         (bs_digit_t'({r1_xp[P],   r1_xn[P]})),
    .sign       (r1_sign),
    .rmode      (r1_rmode),
    .c_p        (c_p),
    .c_n        (c_n),
    .round_at_l (round_at_l)
  );

  // ---------------------------------------------------------------- R2 stage
  logic               r2_valid;
  logic               r2_sign;
  logic [EXP_W_P-1:0] r2_exp;
  logic [-1:P-2]      r2_pp, r2_pn;
  logic [0:1]         r2_cp, r2_cn;
  logic               r2_at_l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r2_valid <= 1'b0;
    else        r2_valid <= r1_valid;
  end

  always_ff @(posedge clk) begin
    r2_sign <= r1_sign;
    r2_exp  <= r1_exp;
    r2_pp   <= r1_xp[-1:P-2];
    r2_pn   <= r1_xn[-1:P-2];
    r2_cp   <= c_p;
    r2_cn   <= c_n;
    r2_at_l <= round_at_l;
  end

  assign cr_valid      = r2_valid;
  assign cr_p          = r2_cp;
  assign cr_n          = r2_cn;
  assign cr_round_at_l = r2_at_l;

  logic [-2:P-1] sum_a, sum_b, sum;
  logic [0:P-1]  sig;
  logic [1:0]    eshift;

  bs_reduced_42add #(.P(P)) u_red42 (
    .pp  (r2_pp),
    .pn  (r2_pn),
    .c_p (r2_cp),
    .c_n (r2_cn),
    .a   (sum_a),
    .b   (sum_b)
  );

  sub_adder_2to1 #(.W(P + 2)) u_adder (
    .a (sum_a),
    .b (sum_b),
    .s (sum)
  );

  norm_shifter #(.P(P)) u_shifter (
    .s      (sum),
    .sig    (sig),
    .eshift (eshift)
  );

  // ------------------------------------------------------------ output reg
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) std_valid <= 1'b0;
    else        std_valid <= r2_valid;
  end

  always_ff @(posedge clk) begin
    std_sign <= r2_sign;
    std_exp  <= r2_exp + EXP_W_P'(eshift);
    std_sig  <= sig;
  end

  // ------------------------------------------------------------ assertions
  // The input must be prenormalized: leading digit +1, digit 0 in {0,1}.
  a_prenormalized : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (in_xp[-1] && !in_xn[-1] && !in_xn[0]));

  // The compressed significand lies in [1,4]: never below 1, and exactly 4
  // only with all lower bits clear.
  a_sum_range : assert property (@(posedge clk) disable iff (!rst_n)
    r2_valid |-> ((sum[-2:0] != 3'b000) && (!sum[-2] || sum[-1:P-1] == '0)));

  // Normalizing by one place drops only a zero bit.
  a_no_lost_bit : assert property (@(posedge clk) disable iff (!rst_n)
    (r2_valid && sum[-1]) |-> !sum[P-1]);

endmodule
