// tb_norm_shifter: drives every significand class the second rounding stage
// can produce, in [1,2), [2,4) (with a zero lowest bit) and exactly 4, and
// checks the normalized significand and the exponent increment against values
// computed by integer division.
`timescale 1ns/1ps
module tb_norm_shifter;
  localparam int P = 64;

  logic [-2:P-1] s;
  logic [0:P-1]  sig;
  logic [1:0]    eshift;

  norm_shifter dut (.s(s), .sig(sig), .eshift(eshift));

  int checks = 0, failures = 0;
  int cls[3];

  task automatic check_one(input logic [P+1:0] v);
    logic [P+1:0] ev;
    logic [1:0]   es;
    s = v;
    #1;
    if (v >= (66'd1 << (P + 1)))      begin ev = v / 4; es = 2'd2; end
    else if (v >= (66'd1 << P))       begin ev = v / 2; es = 2'd1; end
    else                              begin ev = v;     es = 2'd0; end
    cls[es]++;
    checks++;
    if (sig != ev[P-1:0] || eshift != es) begin
      failures++;
      if (failures < 10) $display("FAIL: s=%h sig=%h exp %h eshift=%0d exp %0d", v, sig, ev, eshift, es);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cls[0] = 0; cls[1] = 0; cls[2] = 0;
    check_one(66'd1 << (P - 1));            // 1.0
    check_one(66'd1 << P);                  // 2.0
    check_one(66'd1 << (P + 1));            // 4.0
    check_one((66'd1 << P) - 1);            // largest below 2
    check_one((66'd1 << (P + 1)) - 2);      // largest even below 4
    for (int t = 0; t < 5000; t++) begin
      logic [P+1:0] v;
      v = {$urandom, $urandom, $urandom};
      case ($urandom_range(0, 1))
        0: v = {3'b001, v[P-2:0]};
        default: v = {2'b01, v[P-1:1], 1'b0};
      endcase
      check_one(v);
    end
    checks++;
    if (cls[0] == 0 || cls[1] == 0 || cls[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
