// Test of the generator of products. The reference multiplies the factors
// (1 + d_8 (2^-8 + 2^-17)), (1 + d_j 2^-j) exactly in 200-bit fixed point;
// the outputs may fall short of the exact P1 and P2 only by the dropped
// terms lighter than 2^-63 (a few units of 2^-63), never exceed them.
// All 2048 digit combinations are applied.
module tb_product_generator;
  import exp_pkg::*;
  localparam int unsigned F = 200;
  typedef logic [2*F+3:0] big_t;
  logic [10:0]  d;
  logic [W-1:0] p1, p2;
  int checks = 0, failures = 0;

  product_generator dut (.d, .p1, .p2);

  function automatic big_t mulf(input big_t a, input big_t b);
    return (a * b) >> F;
  endfunction

  function automatic big_t factor(input int unsigned j, input logic dj);
    big_t f;
    f = big_t'(1) << F;
    if (dj) f = f + (big_t'(1) << (F - j));
    return f;
  endfunction

  initial begin
    for (int v = 0; v < 2048; v++) begin
      big_t e1, e2, g1, g2;
      d = 11'(v);
      #1;
      e1 = (big_t'(1) << F) + (d[0] ? (big_t'(1) << (F-8)) + (big_t'(1) << (F-17)) : big_t'(0));
      e1 = mulf(e1, factor(10, d[2]));
      e1 = mulf(e1, factor(11, d[3]));
      e1 = mulf(e1, factor(12, d[4]));
      e1 = mulf(e1, factor(16, d[8]));
      e2 = factor(9, d[1]);
      e2 = mulf(e2, factor(13, d[5]));
      e2 = mulf(e2, factor(14, d[6]));
      e2 = mulf(e2, factor(15, d[7]));
      e2 = mulf(e2, factor(17, d[9]));
      e2 = mulf(e2, factor(18, d[10]));
      g1 = big_t'(p1) << (F - 63);
      g2 = big_t'(p2) << (F - 63);
      checks++;
      if (g1 > e1 || (e1 - g1) > (big_t'(8) << (F - 63)) ||
          g2 > e2 || (e2 - g2) > (big_t'(8) << (F - 63))) begin
        failures++;
        if (failures < 10) $display("FAIL d=%b p1=%h p2=%h", d, p1, p2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
