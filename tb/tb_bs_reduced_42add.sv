// tb_bs_reduced_42add: checks that the reduced borrow-save adder preserves the
// value: a - b must equal 2*(pp - pn) + c exactly (as integers, units of the
// packet's lowest position), for every two-digit packet encoding and random,
// saturated and redundant principal parts. Run at the rounder's size (P = 64)
// and at P = 8.
`timescale 1ns/1ps
module tb_bs_reduced_42add;
  localparam int P  = 64;
  localparam int PS = 8;

  logic [-1:P-2]  pp, pn;
  logic [0:1]     cp, cn;
  logic [-2:P-1]  a, b;
  logic [-1:PS-2] spp, spn;
  logic [-2:PS-1] sa, sb;

  bs_reduced_42add dut (.pp(pp), .pn(pn), .c_p(cp), .c_n(cn), .a(a), .b(b));
  bs_reduced_42add #(.P(PS)) dut_s (.pp(spp), .pn(spn), .c_p(cp), .c_n(cn), .a(sa), .b(sb));

  int checks = 0, failures = 0;

  typedef logic signed [P+4:0] w_t;

  task automatic check_one;
    w_t ev, gv, es, gs;
    #1;
    ev = 2 * (w_t'({1'b0, pp}) - w_t'({1'b0, pn})) + 2 * (w_t'(cp[0]) - w_t'(cn[0]))
         + (w_t'(cp[1]) - w_t'(cn[1]));
    gv = w_t'({1'b0, a}) - w_t'({1'b0, b});
    es = 2 * (w_t'({1'b0, spp}) - w_t'({1'b0, spn})) + 2 * (w_t'(cp[0]) - w_t'(cn[0]))
         + (w_t'(cp[1]) - w_t'(cn[1]));
    gs = w_t'({1'b0, sa}) - w_t'({1'b0, sb});
    checks += 2;
    if (gv != ev) begin
      failures++;
      if (failures < 10) $display("FAIL P=64: got %0d expected %0d", gv, ev);
    end
    if (gs != es) begin
      failures++;
      if (failures < 10) $display("FAIL P=8: got %0d expected %0d", gs, es);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive over the small size and all packet encodings
    for (int x = 0; x < (1 << PS); x++)
      for (int y = 0; y < (1 << PS); y += 7)
        for (int c = 0; c < 16; c++) begin
          spp = PS'(x); spn = PS'(y);
          {cp, cn} = 4'(c);
          pp = {$urandom, $urandom}; pn = {$urandom, $urandom};
          check_one();
        end
    // saturated principal parts at full size
    for (int c = 0; c < 16; c++) begin
      {cp, cn} = 4'(c);
      pp = '1; pn = '0; spp = '1; spn = '0; check_one();
      pp = '0; pn = '1; spp = '0; spn = '1; check_one();
      pp = '1; pn = '1; spp = '1; spn = '1; check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
