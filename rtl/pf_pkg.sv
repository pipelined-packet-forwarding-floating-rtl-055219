// pf_pkg: types and small functions shared by the packet forwarding rounder.
//
// Number format. A packet forwarding significand is f + c*2^-(P-1). The
// principal part f = 1 b0 . b1 ... b(P-2) is a borrow-save string whose digit
// positions run from -1 (weight 2, always +1) to P-2. Each borrow-save digit
// is a pair of bits (plus, minus) with value plus - minus. The carry-round
// packet c is two borrow-save digits at positions P-2 and P-1, so
// c = 2*c(P-2) + c(P-1) lies in {-2..2}. Vectors are declared with the
// document's digit positions as indices (most significant = smallest index).
//
// The rounding-mode encoding and the exponent width default are choices of
// this design (the exponent default follows the 15-bit field of double
// extended precision); the atomic-mode reduction and the simple rounding
// table follow the document's Tables 3 and 4.
package pf_pkg;

  // Precision of the double extended format (bits of the standard significand).
  localparam int unsigned PREC  = 64;
  // Exponent field width of the double extended format.
  localparam int unsigned EXP_W = 15;

  // IEEE 754 rounding mode, as presented to the rounder.
  typedef enum logic [1:0] {
    RM_RNE = 2'd0,  // round to nearest, ties to even
    RM_RTZ = 2'd1,  // round toward zero
    RM_RUP = 2'd2,  // round up (toward +infinity)
    RM_RDN = 2'd3   // round down (toward -infinity)
  } ieee_rmode_t;

  // Atomic rounding modes acting on the magnitude only.
  typedef enum logic [1:0] {
    AM_RZ  = 2'd0,  // toward zero (truncate magnitude)
    AM_RI  = 2'd1,  // toward infinity (away from zero)
    AM_RNE = 2'd2   // to nearest, ties to even
  } atomic_mode_t;

  // Signed sticky digit in sign-magnitude form: -1 = (1,1), 0 = (x,0), +1 = (0,1).
  typedef struct packed {
    logic s;
    logic m;
  } sticky_t;

  // One borrow-save digit.
  typedef struct packed {
    logic p;
    logic n;
  } bs_digit_t;

  // Signed small integer used for digit values in {-2..2}.
  typedef logic signed [2:0] sdig_t;

  // IEEE mode and sign to atomic mode.
  function automatic atomic_mode_t atomic_mode(input ieee_rmode_t rm, input logic sign);
    unique case (rm)
      RM_RNE:  return AM_RNE;
      RM_RTZ:  return AM_RZ;
      RM_RUP:  return sign ? AM_RZ : AM_RI;
      default: return sign ? AM_RI : AM_RZ;  // RM_RDN
    endcase
  endfunction

  function automatic sdig_t bs_val(input bs_digit_t d);
    return sdig_t'({2'b00, d.p}) - sdig_t'({2'b00, d.n});
  endfunction

  function automatic sdig_t sticky_val(input sticky_t st);
    if (!st.m) return sdig_t'(0);
    return st.s ? sdig_t'(-1) : sdig_t'(1);
  endfunction

  // Sticky combination of a round digit r with a lower sticky s: the sign of
  // the string "r s...", i.e. r when r is nonzero, else s.
  function automatic sdig_t sticky_join(input sdig_t r, input sdig_t s);
    return (r != 0) ? r : s;
  endfunction

  // Simple rounding table: amount (-1, 0, +1) to add at the rounding position
  // of a positive fraction, from the round digit r, the sticky digit s (both
  // in {-1,0,1}), whether the rounding-position digit is odd, and the mode.
  function automatic sdig_t round_incr(input logic odd, input sdig_t r, input sdig_t s,
                                       input atomic_mode_t am);
    unique case (am)
      AM_RZ:  return (r < 0 || (r == 0 && s < 0)) ? sdig_t'(-1) : sdig_t'(0);
      AM_RI:  return (r > 0 || (r == 0 && s > 0)) ? sdig_t'(1) : sdig_t'(0);
      default: begin
        if (r < 0 && s < 0)  return sdig_t'(-1);
        if (r < 0 && s == 0) return odd ? sdig_t'(-1) : sdig_t'(0);
        if (r > 0 && s == 0) return odd ? sdig_t'(1) : sdig_t'(0);
        if (r > 0 && s > 0)  return sdig_t'(1);
        return sdig_t'(0);
      end
    endcase
  endfunction

endpackage
