// tb_sub_adder_2to1: checks s = a - b (modulo 2^W) of the 2-1 subtracting
// adder for random and corner operands (equal, zero, all ones, borrow across
// the whole width), with the reference formed by wide integer subtraction.
`timescale 1ns/1ps
module tb_sub_adder_2to1;
  localparam int W = 66;

  logic [W-1:0] a, b, s;

  sub_adder_2to1 dut (.a(a), .b(b), .s(s));

  int checks = 0, failures = 0;

  task automatic check_one(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0] d;
    a = x; b = y;
    #1;
    d = {1'b0, x} - {1'b0, y};
    checks++;
    if (s != d[W-1:0]) begin
      failures++;
      if (failures < 10) $display("FAIL: a=%h b=%h s=%h expected %h", x, y, s, d[W-1:0]);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0, '0);
    check_one('1, '1);
    check_one('1, '0);
    check_one('0, W'(1));
    check_one(W'(1) << (W - 1), W'(1));
    for (int t = 0; t < 20000; t++) begin
      logic [W-1:0] x, y;
      x = {$urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom};
      if (t % 3 == 0) y = x - W'($urandom_range(0, 7));
      check_one(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
