// sub_adder_2to1: the 2-1 adder of the second rounding stage. It compresses a
// borrow-save number given as a positive vector a and a negative vector b into
// an ordinary binary number s = a - b, by adding the one's complement of b
// with a carry-in of one (two's complement subtraction), as the document
// describes. The document leaves the adder architecture open; this design
// writes a plain W-bit addition and leaves its structure (ripple, prefix, ...)
// to synthesis. The result is taken modulo 2^W; the caller guarantees that the
// true difference lies in [0, 2^W).
//
// Interface: W-bit a, b, s, bit W-1 most significant. Combinational.
module sub_adder_2to1 #(
  parameter int unsigned W = 66
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  always_comb s = a + ~b + W'(1);

endmodule
