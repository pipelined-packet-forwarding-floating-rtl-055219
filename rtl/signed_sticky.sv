// signed_sticky: sign (-1, 0, +1) of an N-digit borrow-save string, without
// first compressing it to two's complement.
//
// The sign of a borrow-save string equals the sign of its most significant
// nonzero digit, because the digits below it can never outweigh it. Each
// digit x = x+ - x- gives a leaf (s, m) = (x-, x+ ^ x-): m says the digit is
// nonzero and s gives its sign. Two neighbouring results combine as
// m = m_hi | m_lo and s = m_hi ? s_hi : s_lo, which is a 2:1 multiplexer
// steered by the OR of the upper half's magnitude bits. A balanced binary tree
// of these cells yields the sticky digit of the whole string in log2(N) mux
// levels. The leaf equations, the combining rule, the mux tree and the
// sign-magnitude encoding of the result (s=1,m=1 for -1; m=0 for 0; s=0,m=1
// for +1) all follow the document. When N is not a power of two the tree is
// padded with zero digits at the least significant end, which does not change
// the result.
//
// Interface: xp/xn are the plus and minus bits, index 0 most significant.
// Purely combinational.
module signed_sticky
  import pf_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [0:N-1] xp,
  input  logic [0:N-1] xn,
  output sticky_t      st
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP     = 1 << LEVELS;

  // Heap-ordered tree: node k has children 2k (more significant) and 2k+1.
  // Leaves occupy NP .. 2*NP-1, leaf NP+i holding digit i.
  logic [1:2*NP-1] s_t, m_t;

  always_comb begin
    s_t = '0;
    m_t = '0;
    for (int unsigned i = 0; i < NP; i++) begin
      if (i < N) begin
        s_t[NP+i] = xn[i];
        m_t[NP+i] = xp[i] ^ xn[i];
      end
    end
    for (int k = int'(NP) - 1; k >= 1; k--) begin
      m_t[k] = m_t[2*k] | m_t[2*k+1];
      s_t[k] = m_t[2*k] ? s_t[2*k] : s_t[2*k+1];
    end
  end

  assign st.s = s_t[1];
  assign st.m = m_t[1];

endmodule
