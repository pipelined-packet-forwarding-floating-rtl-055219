// round_logic: first rounding stage decision. Produces the two-digit
// carry-round packet c in {-2..2} that makes principal part + c*2^-(P-1)
// equal to the correctly rounded result.
//
// How it works. The upper sticky digit S_u (sign of digits 0..P-1), the round
// digit R (position P) and the lower sticky digit S_l (positions P+1 and
// below) tell whether the unrounded significand lies in (1,2) or in [2,4):
//   S_u = -1, or S_u = 0 with R = -1, or S_u = R = 0 with S_l = -1 -> (1,2),
//   otherwise -> [2,4).
// In (1,2) the rounding position is the guard digit G (position P-1) and
//   c = G + incr(G odd, R, S_l, mode).
// In [2,4) it is the digit L (position P-2), G becomes the round digit, R and
// S_l merge into one sticky, and
//   c = 2 * incr(L odd, G, R:S_l, mode).
// incr() is the simple rounding table for a positive fraction (pf_pkg::
// round_incr), applied in one of three atomic modes obtained from the IEEE mode
// and the sign. Following the document's speed-up, the packet is computed for
// all nine (S_u, S_l) combinations in parallel from L, G, R and the mode, and
// the sticky digits, which arrive last from the sticky trees, only drive the
// final 9:1 selection. The range rule, both packet equations and the tables
// follow the document; the entries are derived from those equations rather
// than copied from the printed composite table.
//
// Interface: c_p/c_n are the plus/minus bits of the packet digits, index 0 at
// weight 2 (position P-2) and index 1 at weight 1 (position P-1); round_at_l
// reports that the [2,4) range (rounding at L) was chosen. Combinational.
module round_logic
  import pf_pkg::*;
(
  input  sticky_t     su,     // upper signed sticky digit
  input  sticky_t     sl,     // lower signed sticky digit
  input  bs_digit_t   dl,     // digit L (position P-2)
  input  bs_digit_t   dg,     // guard digit G (position P-1)
  input  bs_digit_t   dr,     // round digit R (position P)
  input  logic        sign,   // sign of the result
  input  ieee_rmode_t rmode,  // IEEE rounding mode
  output logic [0:1]  c_p,
  output logic [0:1]  c_n,
  output logic        round_at_l
);

  atomic_mode_t am;
  sdig_t        vl, vg, vr;

  assign am = atomic_mode(rmode, sign);
  assign vl = bs_val(dl);
  assign vg = bs_val(dg);
  assign vr = bs_val(dr);

  // Packet and range for each (S_u, S_l) region, index = 3*(S_u+1) + (S_l+1).
  sdig_t c_reg [9];
  logic  l_reg [9];

  always_comb begin
    for (int i = 0; i < 9; i++) begin
      automatic sdig_t u = sdig_t'(i / 3 - 1);
      automatic sdig_t w = sdig_t'(i % 3 - 1);
      automatic logic  at_l;
      at_l = !((u < 0) || (u == 0 && vr < 0) || (u == 0 && vr == 0 && w < 0));
      l_reg[i] = at_l;
      if (at_l)
        c_reg[i] = sdig_t'(2) * round_incr(vl != 0, vg, sticky_join(vr, w), am);
      else
        c_reg[i] = vg + round_incr(vg != 0, vr, w, am);
    end
  end

  // Late selection by the sticky digits.
  sdig_t c;
  always_comb begin
    automatic logic [3:0] idx = 4'(3 * (int'(sticky_val(su)) + 1) + (int'(sticky_val(sl)) + 1));
    c          = c_reg[idx];
    round_at_l = l_reg[idx];
  end

  // Encode c as two borrow-save digits: weight-2 digit first.
  always_comb begin
    c_p = 2'b00;
    c_n = 2'b00;
    unique case (c)
      sdig_t'(2):  c_p = 2'b10;
      sdig_t'(1):  c_p = 2'b01;
      sdig_t'(-1): c_n = 2'b01;
      sdig_t'(-2): c_n = 2'b10;
      default: ;
    endcase
  end

endmodule
