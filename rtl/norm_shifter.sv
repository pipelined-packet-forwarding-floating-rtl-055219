// norm_shifter: final normalization of the rounded significand. The compressed
// and rounded significand s lies in [1,4]. When its bit of weight 2 is set
// (s >= 2) it is shifted one place right and the exponent is raised by one,
// as the document describes. The rounded value can also be exactly 4 (a
// prenormalized significand reaches 4 when rounding carries out of the
// [2,4) binade); the bit of weight 4 then selects a shift by two. That second
// case is this design's addition; the bits shifted out are always zero.
//
// Interface: s holds positions -2..P-1 (position -2 has weight 4, position 0
// weight 1); sig is the normalized P-bit significand 1.xxx (index 0 = the
// leading one); eshift is the exponent increment 0, 1 or 2. Combinational.
module norm_shifter #(
  parameter int unsigned P = 64
) (
  input  logic [-2:P-1] s,
  output logic [0:P-1]  sig,
  output logic [1:0]    eshift
);

  always_comb begin
    if (s[-2]) begin
      sig    = s[-2:P-3];
      eshift = 2'd2;
    end else if (s[-1]) begin
      sig    = s[-1:P-2];
      eshift = 2'd1;
    end else begin
      sig    = s[0:P-1];
      eshift = 2'd0;
    end
  end

endmodule
