// tb_round_logic: exhaustive check of the carry-round packet.
//
// For every combination of upper sticky S_u, lower sticky S_l (every
// encoding, including both encodings of zero), digits L, G, R (every
// borrow-save encoding), sign and IEEE rounding mode, the testbench builds a
// concrete 129-digit significand that has exactly these sticky digits and
// digits (for P = 64: b0/b1 set the sign of the upper part, L and G sit at
// positions 62 and 63, R at 64 and a single lower digit at 127). It then
// rounds that significand exactly, to 2^-63 below 2 and to 2^-62 from 2 on, in
// the direction given by the mode and the sign, and expects
//   packet = (rounded value - principal part) / 2^-63,
// and the rounding position (L when the value is at least 2). Combinations
// that no significand can have (S_u = 0 with L or G nonzero) are skipped.
`timescale 1ns/1ps
module tb_round_logic;
  import pf_pkg::*;

  sticky_t     su, sl;
  bs_digit_t   dl, dg, dr;
  logic        sign;
  ieee_rmode_t rmode;
  logic [0:1]  c_p, c_n;
  logic        round_at_l;

  round_logic dut (.su, .sl, .dl, .dg, .dr, .sign, .rmode, .c_p, .c_n, .round_at_l);

  int checks = 0, failures = 0;
  int skipped = 0;
  int seen_c[5];

  // exact values in units of 2^-127
  typedef logic signed [135:0] w_t;

  function automatic w_t pw(input int k);  // weight of digit position k
    return w_t'(1) <<< (127 - k);
  endfunction

  function automatic int dv(input bs_digit_t d);
    return (d.p ? 1 : 0) - (d.n ? 1 : 0);
  endfunction

  function automatic int sv(input sticky_t s);
    return !s.m ? 0 : (s.s ? -1 : 1);
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen_c[i]) seen_c[i] = 0;
    for (int isu = 0; isu < 4; isu++)
    for (int isl = 0; isl < 4; isl++)
    for (int il = 0; il < 4; il++)
    for (int ig = 0; ig < 4; ig++)
    for (int ir = 0; ir < 4; ir++)
    for (int isg = 0; isg < 2; isg++)
    for (int im = 0; im < 4; im++) begin
      int u, w, l, g, r, mdir;  // mdir: 0 toward zero, 1 away from zero, 2 nearest even
      w_t x, principal, ulp, q, rem, rounded, c_exp, c_got;
      bit at_l;
      su = sticky_t'(2'(isu)); sl = sticky_t'(2'(isl));
      dl = bs_digit_t'(2'(il)); dg = bs_digit_t'(2'(ig)); dr = bs_digit_t'(2'(ir));
      sign = 1'(isg); rmode = ieee_rmode_t'(2'(im));
      u = sv(su); w = sv(sl); l = dv(dl); g = dv(dg); r = dv(dr);
      if (u == 0 && (l != 0 || g != 0)) begin
        skipped++;
        continue;
      end
      // upper part: 2 + (b0, b1 chosen for the sign of S_u) + L, G
      principal = pw(-1) + l * pw(62);
      if (u > 0) principal += pw(0);
      if (u < 0) principal -= pw(1);
      x = principal + g * pw(63) + r * pw(64) + w * pw(127);
      at_l = (x >= pw(-1));
      ulp = at_l ? pw(62) : pw(63);
      q = x / ulp;
      rem = x - q * ulp;
      case (im)
        0: mdir = 2;
        1: mdir = 0;
        2: mdir = isg ? 0 : 1;
        default: mdir = isg ? 1 : 0;
      endcase
      if (mdir == 1 && rem != 0) q += 1;
      if (mdir == 2 && (2 * rem > ulp || (2 * rem == ulp && q[0]))) q += 1;
      rounded = q * ulp;
      c_exp = (rounded - principal) / pw(63);
      #1;
      c_got = 2 * (w_t'(c_p[0]) - w_t'(c_n[0])) + (w_t'(c_p[1]) - w_t'(c_n[1]));
      checks += 2;
      if (c_got != c_exp) begin
        failures++;
        if (failures < 20)
          $display("FAIL: Su=%0d Sl=%0d L=%0d G=%0d R=%0d sign=%0d mode=%0d: c=%0d expected %0d",
                   u, w, l, g, r, isg, im, c_got, c_exp);
      end
      if (round_at_l != at_l) begin
        failures++;
        if (failures < 20) $display("FAIL: rounding position Su=%0d R=%0d Sl=%0d", u, r, w);
      end
      if (c_exp >= -2 && c_exp <= 2) seen_c[int'(c_exp) + 2]++;
    end
    checks++;
    if (seen_c[0] == 0 || seen_c[1] == 0 || seen_c[2] == 0 || seen_c[3] == 0 || seen_c[4] == 0) begin
      failures++;
      $display("FAIL: not every packet value occurred");
    end
    $display("checked %0d combinations, skipped %0d impossible ones", checks / 2, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
