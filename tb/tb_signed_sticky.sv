// tb_signed_sticky: checks the signed sticky mux tree against the sign of the
// exact value of the borrow-save string, for the two sizes the rounder uses:
// 64 digits (upper sticky, a power of two) and 63 digits (lower sticky, padded
// inside the tree). Patterns: all zero, redundant zeros (both bits set), a
// single nonzero digit at every position, and random dense and sparse strings.
`timescale 1ns/1ps
module tb_signed_sticky;
  import pf_pkg::*;

  localparam int NA = 64;
  localparam int NB = 63;

  logic [0:NA-1] ap, an;
  logic [0:NB-1] bp, bn;
  sticky_t       sa, sb;

  signed_sticky dut_a (.xp(ap), .xn(an), .st(sa));
  signed_sticky #(.N(NB)) dut_b (.xp(bp), .xn(bn), .st(sb));

  int checks = 0, failures = 0;
  int seen[3];

  function automatic int ref_sign_a(input logic [0:NA-1] p, input logic [0:NA-1] n);
    logic signed [NA+2:0] v = '0;
    for (int i = 0; i < NA; i++) v = 2 * v + ((p[i] ? 1 : 0) - (n[i] ? 1 : 0));
    return (v < 0) ? -1 : (v == 0) ? 0 : 1;
  endfunction

  function automatic int ref_sign_b(input logic [0:NB-1] p, input logic [0:NB-1] n);
    logic signed [NB+2:0] v = '0;
    for (int i = 0; i < NB; i++) v = 2 * v + ((p[i] ? 1 : 0) - (n[i] ? 1 : 0));
    return (v < 0) ? -1 : (v == 0) ? 0 : 1;
  endfunction

  function automatic int dec(input sticky_t st);
    if (!st.m) return 0;
    return st.s ? -1 : 1;
  endfunction

  task automatic apply_and_check;
    int ea, eb;
    #1;
    ea = ref_sign_a(ap, an);
    eb = ref_sign_b(bp, bn);
    checks += 2;
    seen[ea + 1]++;
    if (dec(sa) != ea) begin
      failures++;
      if (failures < 10) $display("FAIL 64: got %0d expected %0d p=%h n=%h", dec(sa), ea, ap, an);
    end
    if (dec(sb) != eb) begin
      failures++;
      if (failures < 10) $display("FAIL 63: got %0d expected %0d", dec(sb), eb);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen[0] = 0; seen[1] = 0; seen[2] = 0;
    ap = '0; an = '0; bp = '0; bn = '0;
    apply_and_check();
    ap = '1; an = '1; bp = '1; bn = '1;
    apply_and_check();
    // single digit, +1 and -1, over a background of redundant zeros
    for (int pos = 0; pos < NA; pos++) begin
      for (int sgn = 0; sgn < 2; sgn++) begin
        ap = '0; an = '0; bp = '0; bn = '0;
        for (int i = pos + 1; i < NA; i++) begin
          int r;
          r = int'($urandom_range(0, 3));
          ap[i] = r[0]; an[i] = r[1];
          if (i < NB) begin bp[i] = r[1]; bn[i] = r[0]; end
        end
        if (sgn == 0) ap[pos] = 1'b1; else an[pos] = 1'b1;
        if (pos < NB) begin
          if (sgn == 0) bp[pos] = 1'b1; else bn[pos] = 1'b1;
        end
        apply_and_check();
      end
    end
    // random strings with varying density of nonzero digits
    for (int t = 0; t < 20000; t++) begin
      int dens;
      dens = int'($urandom_range(0, 100));
      for (int i = 0; i < NA; i++) begin
        int r;
        logic p, n;
        r = int'($urandom_range(0, 99));
        if (r < dens) begin p = r[0]; n = ~r[0]; end
        else begin p = r[1]; n = r[1]; end
        ap[i] = p; an[i] = n;
        if (i < NB) begin bp[i] = n; bn[i] = p; end
      end
      apply_and_check();
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) begin
      failures++;
      $display("FAIL: not every sticky value occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
