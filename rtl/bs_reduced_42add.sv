// bs_reduced_42add: borrow-save adder that adds the two-digit carry-round
// packet to the principal part, first step of the second rounding stage.
//
// A general borrow-save (4-2) adder takes two borrow-save operands, i.e. two
// positive and two negative bit vectors, and returns one borrow-save result in
// two levels of full-adder cells, without carry propagation. Level 1 combines
// the positive bits P and c+ with the negative bit N at each position
// (x + y - z = 2h - l); level 2 combines the transfer h from the right with
// the negative bits l and c- (h - l - c = l' - 2h'). Because c+ and c- are
// only two digits wide (positions P-2 and P-1), every cell to the left of
// position P-2 has a constant-zero input and shrinks to an AND and an XOR;
// only the two lowest positions hold full cells. The document states that the
// packet is added by a reduced borrow-save adder; the cell equations are this
// design's own.
//
// Interface: pp/pn principal part, positions -1..P-2 (position -1 is the
// leading digit); c_p/c_n packet, index 0 at position P-2. Outputs a (to be
// added) and b (to be subtracted), positions -2..P-1, satisfy
// a - b = principal + c*2^-(P-1) in units of 2^-(P-1). The lowest bit of b is
// always zero, since no transfer enters from below position P-1; the port
// keeps it so that a and b have the same width. Combinational.
module bs_reduced_42add #(
  parameter int unsigned P = 64
) (
  input  logic [-1:P-2] pp,
  input  logic [-1:P-2] pn,
  input  logic [0:1]    c_p,
  input  logic [0:1]    c_n,
  output logic [-2:P-1] a,
  output logic [-2:P-1] b
);

  // Operands extended to positions -2..P-1.
  logic [-2:P-1] x, z, cy, cz;
  assign x  = {1'b0, pp, 1'b0};
  assign z  = {1'b0, pn, 1'b0};
  assign cy = {{P{1'b0}}, c_p};
  assign cz = {{P{1'b0}}, c_n};

  // Level 1 outputs: h1 (positive, already moved one place left), l1 (negative).
  // Level 2 outputs: a (positive), h2 (negative, moved one place left into b).
  logic [-2:P-1] h1, l1, h2;

  always_comb begin
    h1 = '0;
    l1 = '0;
    h2 = '0;
    a  = '0;
    b  = '0;
    for (int i = -1; i <= int'(P) - 1; i++) begin
      if (i >= int'(P) - 2) begin
        // full cell with one negative input
        l1[i]   = x[i] ^ cy[i] ^ z[i];
        h1[i-1] = (x[i] & cy[i]) | (x[i] & ~z[i]) | (cy[i] & ~z[i]);
      end else begin
        l1[i]   = x[i] ^ z[i];
        h1[i-1] = x[i] & ~z[i];
      end
    end
    for (int i = -2; i <= int'(P) - 1; i++) begin
      if (i >= int'(P) - 2) begin
        // full cell with two negative inputs
        a[i] = h1[i] ^ l1[i] ^ cz[i];
        if (i > -2) h2[i-1] = (l1[i] & cz[i]) | (l1[i] & ~h1[i]) | (cz[i] & ~h1[i]);
      end else begin
        a[i] = h1[i] ^ l1[i];
        if (i > -2) h2[i-1] = l1[i] & ~h1[i];
      end
    end
    b = h2;
  end

endmodule
