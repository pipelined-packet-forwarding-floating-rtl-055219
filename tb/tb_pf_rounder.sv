// tb_pf_rounder: end-to-end self-checking test of the two-stage rounder at its
// default size (P = 64: 129-digit input, 64-digit principal part, 64-bit
// standard significand, 15-bit exponent).
//
// Every input is an unrounded borrow-save significand in (1,4). The reference
// converts it to an exact integer (units of 2^-127), rounds it to the
// precision of its binade (2^-63 below 2, 2^-62 from 2 on) in the atomic mode
// derived from the IEEE mode and the sign, and from that predicts
//   * the forwarded principal part (the leading 64 digits, unchanged),
//   * the value of the carry-round packet (rounded value minus principal part),
//   * the rounding position (guard digit or L digit),
//   * the standard significand and the exponent increment.
// Latencies are checked: principal part 1 cycle, carry-round packet 2 cycles,
// standard result 3 cycles after the input is presented, one result per cycle.
// Inputs mix random, sparse and saturated digit patterns (and redundant
// encodings of zero) per region so that exact binade boundaries, ties, results
// of exactly 2 and 4, and every region of the rounding table occur. Each of
// those events is counted and a failure is recorded for one that never occurs.
`timescale 1ns/1ps
module tb_pf_rounder;
  import pf_pkg::*;

  localparam int P  = 64;
  localparam int EW = 15;
  localparam int NV = 40000;      // vectors
  localparam int XW = 2 * P + 6;  // width of exact reference integers

  typedef logic signed [XW-1:0] wide_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  logic               in_valid;
  logic               in_sign;
  logic [EW-1:0]      in_exp;
  logic [-1:2*P-1]    in_xp, in_xn;
  ieee_rmode_t        in_rmode;
  logic               pf_valid, pf_sign;
  logic [EW-1:0]      pf_exp;
  logic [-1:P-2]      pf_pp, pf_pn;
  logic               cr_valid;
  logic [0:1]         cr_p, cr_n;
  logic               cr_round_at_l;
  logic               std_valid, std_sign;
  logic [EW-1:0]      std_exp;
  logic [0:P-1]       std_sig;

  pf_rounder dut (
    .clk, .rst_n,
    .in_valid, .in_sign, .in_exp, .in_xp, .in_xn, .in_rmode,
    .pf_valid, .pf_sign, .pf_exp, .pf_pp, .pf_pn,
    .cr_valid, .cr_p, .cr_n, .cr_round_at_l,
    .std_valid, .std_sign, .std_exp, .std_sig
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // ---------------------------------------------------------- reference
  typedef struct {
    int            t_in;       // cycle at which the input was presented
    logic          sign;
    logic [EW-1:0] exp;
    logic [-1:P-2] pp, pn;
    wide_t         rounded;    // exact rounded value, units of 2^-(2P-1)
    wide_t         principal;  // value of the principal part, same units
    logic          at_l;
    logic [0:P-1]  sig;
    logic [1:0]    eshift;
  } exp_t;

  exp_t q_pf[$], q_cr[$], q_std[$];

  // coverage
  int cov_at_g, cov_at_l, cov_tie, cov_exact2, cov_four;
  int cov_p2, cov_sh0, cov_sh1, cov_am[3], cov_c[5], cov_su[3], cov_redundant, cov_backtoback;

  function automatic wide_t digits_value(input logic [-1:2*P-1] xp, input logic [-1:2*P-1] xn,
                                         input int last);
    wide_t v = '0;
    for (int i = -1; i <= last; i++) begin
      wide_t w = wide_t'(1) <<< (2 * P - 1 - i);
      if (xp[i]) v += w;
      if (xn[i]) v -= w;
    end
    return v;
  endfunction

  function automatic atomic_mode_t ref_mode(input ieee_rmode_t rm, input logic sign);
    // Table of the IEEE modes against the sign, written out independently.
    if (rm == RM_RNE) return AM_RNE;
    if (rm == RM_RTZ) return AM_RZ;
    if (rm == RM_RUP) return sign ? AM_RZ : AM_RI;
    return sign ? AM_RI : AM_RZ;
  endfunction

  function automatic exp_t make_expect(input logic sign, input logic [EW-1:0] ex,
                                       input logic [-1:2*P-1] xp, input logic [-1:2*P-1] xn,
                                       input ieee_rmode_t rm, input int t);
    exp_t  e;
    wide_t x, two, ulp, q, rem, r;
    atomic_mode_t am;
    x   = digits_value(xp, xn, 2 * P - 1);
    two = wide_t'(1) <<< (2 * P);
    e.at_l = (x >= two);
    ulp = e.at_l ? (wide_t'(1) <<< (P + 1)) : (wide_t'(1) <<< P);
    q   = x / ulp;           // x > 0, so this is the floor
    rem = x - q * ulp;
    am  = ref_mode(rm, sign);
    cov_am[int'(am)]++;
    case (am)
      AM_RZ: ;
      AM_RI: if (rem != 0) q += 1;
      default: begin
        if (2 * rem > ulp) q += 1;
        else if (2 * rem == ulp) begin
          cov_tie++;
          if (q[0]) q += 1;
        end
      end
    endcase
    r = q * ulp;
    e.t_in      = t;
    e.sign      = sign;
    e.exp       = ex;
    e.pp        = xp[-1:P-2];
    e.pn        = xn[-1:P-2];
    e.rounded   = r;
    e.principal = digits_value(xp & {{(P + 1){1'b1}}, {P{1'b0}}},
                               xn & {{(P + 1){1'b1}}, {P{1'b0}}}, P - 2);
    if (r >= (two <<< 1)) begin
      e.sig = P'(r >>> (P + 2)); e.eshift = 2'd2; cov_four++;
    end else if (r >= two) begin
      e.sig = P'(r >>> (P + 1)); e.eshift = 2'd1; cov_sh1++;
    end else begin
      e.sig = P'(r >>> P);       e.eshift = 2'd0; cov_sh0++;
    end
    if (x == two) cov_exact2++;
    if (e.at_l) cov_at_l++; else cov_at_g++;
    begin
      wide_t u = digits_value(xp & {1'b0, {P{1'b1}}, {P{1'b0}}},
                              xn & {1'b0, {P{1'b1}}, {P{1'b0}}}, P - 1);
      cov_su[(u < 0) ? 0 : (u == 0) ? 1 : 2]++;
    end
    return e;
  endfunction

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endfunction

  // ---------------------------------------------------------- stimulus
  // One digit according to a region style.
  function automatic void gen_digit(input int style, output logic p, output logic n);
    int r = int'($urandom_range(0, 99));
    case (style)
      0: begin p = 1'b0; n = 1'b0; end                                     // zero
      1: begin p = r[0]; n = r[1]; end                                     // uniform
      2: begin p = 1'b1; n = (r < 3); end                                  // mostly +1
      3: begin p = (r < 3); n = 1'b1; end                                  // mostly -1
      default: begin                                                        // sparse
        p = (r < 4); n = (r >= 4 && r < 8);
        if (r >= 97) begin p = 1'b1; n = 1'b1; end
      end
    endcase
  endfunction

  task automatic gen_vector(output logic [-1:2*P-1] xp, output logic [-1:2*P-1] xn);
    int su = int'($urandom_range(0, 4));
    int sg = int'($urandom_range(0, 4));
    int sr = int'($urandom_range(0, 4));
    int sl = int'($urandom_range(0, 4));
    xp = '0; xn = '0;
    xp[-1] = 1'b1;
    xp[0]  = (su == 2) ? 1'b1 : (su == 3 || su == 0) ? 1'b0 : 1'($urandom_range(0, 1));
    for (int i = 1; i <= P - 2; i++) gen_digit(su, xp[i], xn[i]);
    gen_digit(sg, xp[P-1], xn[P-1]);
    gen_digit(sr, xp[P], xn[P]);
    for (int i = P + 1; i <= 2 * P - 1; i++) gen_digit(sl, xp[i], xn[i]);
  endtask

  // ---------------------------------------------------------- run
  int cycle = 0;
  int sent = 0;
  int got_std = 0;
  bit last_valid = 1'b0;

  initial begin : watchdog
    repeat (NV * 3 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    in_valid = 1'b0; in_sign = 1'b0; in_exp = '0; in_xp = '0; in_xn = '0; in_rmode = RM_RNE;
    cov_at_g = 0; cov_at_l = 0; cov_tie = 0; cov_exact2 = 0; cov_four = 0;
    cov_p2 = 0; cov_sh0 = 0; cov_sh1 = 0; cov_redundant = 0; cov_backtoback = 0;
    foreach (cov_am[i]) cov_am[i] = 0;
    foreach (cov_c[i]) cov_c[i] = 0;
    foreach (cov_su[i]) cov_su[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!pf_valid && !cr_valid && !std_valid, "valid outputs low after reset");

    while (got_std < NV) begin
      @(negedge clk);
      cycle++;
      // ---- check outputs produced by the previous rising edge
      if (pf_valid) begin
        exp_t e;
        if (q_pf.size() == 0) check(1'b0, "unexpected pf_valid");
        else begin
          e = q_pf.pop_front();
          check(cycle - e.t_in == 1, $sformatf("pf latency %0d", cycle - e.t_in));
          check(pf_sign == e.sign && pf_exp == e.exp && pf_pp == e.pp && pf_pn == e.pn,
                "principal part packet");
          q_cr.push_back(e);
        end
      end
      if (cr_valid) begin
        exp_t e;
        if (q_cr.size() == 0) check(1'b0, "unexpected cr_valid");
        else begin
          wide_t cval, pfv;
          e = q_cr.pop_front();
          check(cycle - e.t_in == 2, $sformatf("cr latency %0d", cycle - e.t_in));
          cval = 2 * (wide_t'(cr_p[0]) - wide_t'(cr_n[0])) + (wide_t'(cr_p[1]) - wide_t'(cr_n[1]));
          pfv  = e.principal + (cval <<< P);
          check(pfv == e.rounded, $sformatf("packet value: c=%0d", cval));
          check(cr_round_at_l == e.at_l, "rounding position");
          if (e.at_l) check(cval[0] == 1'b0, "packet even when rounding at L");
          // final-digit rule of a prenormalized significand: +1 is not
          // allowed when the principal part is exactly 2
          if (e.principal == (wide_t'(1) <<< (2 * P))) begin
            check(cval != 1, "packet +1 on a principal part of exactly 2");
            cov_p2++;
          end
          cov_c[int'(cval) + 2]++;
          q_std.push_back(e);
        end
      end
      if (std_valid) begin
        exp_t e;
        if (q_std.size() == 0) check(1'b0, "unexpected std_valid");
        else begin
          e = q_std.pop_front();
          check(cycle - e.t_in == 3, $sformatf("std latency %0d", cycle - e.t_in));
          check(std_sig == e.sig, $sformatf("standard significand %h expected %h", std_sig, e.sig));
          check(std_sig[0] == 1'b1, "standard significand normalized");
          check(std_exp == e.exp + EW'(e.eshift), "standard exponent");
          check(std_sign == e.sign, "standard sign");
          got_std++;
        end
      end
      // ---- present the next input (about 10% bubbles)
      if (sent < NV && $urandom_range(0, 9) != 0) begin
        logic [-1:2*P-1] xp, xn;
        gen_vector(xp, xn);
        in_valid = 1'b1;
        in_sign  = 1'($urandom_range(0, 1));
        in_exp   = EW'($urandom_range(1, (1 << EW) - 4));
        in_rmode = ieee_rmode_t'($urandom_range(0, 3));
        in_xp    = xp;
        in_xn    = xn;
        if ((xp & xn) != '0) cov_redundant++;
        if (last_valid) cov_backtoback++;
        q_pf.push_back(make_expect(in_sign, in_exp, xp, xn, in_rmode, cycle));
        sent++;
        last_valid = 1'b1;
      end else begin
        in_valid = 1'b0;
        in_xp    = '0;
        in_xn    = '0;
        last_valid = 1'b0;
      end
    end

    $display("rounding at G %0d, at L %0d, ties %0d, input exactly 2: %0d, principal 2: %0d, result 4: %0d",
             cov_at_g, cov_at_l, cov_tie, cov_exact2, cov_p2, cov_four);
    $display("shift 0/1/2: %0d/%0d/%0d  modes RZ/RI/RNe: %0d/%0d/%0d", cov_sh0, cov_sh1, cov_four,
             cov_am[0], cov_am[1], cov_am[2]);
    $display("c=-2..2: %0d %0d %0d %0d %0d  S_u=-1/0/1: %0d %0d %0d  redundant zeros %0d, back-to-back %0d",
             cov_c[0], cov_c[1], cov_c[2], cov_c[3], cov_c[4], cov_su[0], cov_su[1], cov_su[2],
             cov_redundant, cov_backtoback);
    check(cov_at_g > 0 && cov_at_l > 0, "both rounding positions exercised");
    check(cov_tie > 0, "ties exercised");
    check(cov_exact2 > 0, "input exactly 2 exercised");
    check(cov_p2 > 0, "principal part exactly 2 exercised");
    check(cov_four > 0, "result exactly 4 exercised");
    check(cov_sh0 > 0 && cov_sh1 > 0, "normalization shift exercised");
    check(cov_am[0] > 0 && cov_am[1] > 0 && cov_am[2] > 0, "all atomic modes exercised");
    check(cov_c[0] > 0 && cov_c[1] > 0 && cov_c[2] > 0 && cov_c[3] > 0 && cov_c[4] > 0,
          "all packet values exercised");
    check(cov_su[0] > 0 && cov_su[1] > 0 && cov_su[2] > 0, "all upper sticky values exercised");
    check(cov_redundant > 0 && cov_backtoback > 0, "redundant digits and back-to-back inputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
