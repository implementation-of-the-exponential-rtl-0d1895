// Test of the rounding and exception stage. Products of two random doubles'
// significands are presented as the 128-bit product with the summed
// exponent; the round-to-nearest result must equal the simulator's IEEE
// product bit for bit. The directed modes must order correctly (toward zero
// never above nearest, upward never below), overflow must give infinity or
// the largest finite number by mode, tiny results must flush to zero, and a
// special context must pass its value and flags through.
module tb_fp_round;
  import exp_pkg::*;
  ctx_t         ctx;
  logic [127:0] prod;
  logic [63:0]  result;
  fflags_t      flags;
  int checks = 0, failures = 0;

  fp_round dut (.ctx, .prod, .result, .flags);

  logic [63:0] r_ne, r_tz, r_up, r_dn;

  task automatic present(input logic [63:0] a, input logic [63:0] b, input rm_e rm);
    ctx         = '0;
    ctx.valid   = 1'b1;
    ctx.last    = 1'b1;
    ctx.sign    = a[63] ^ b[63];
    ctx.exp     = EXPW'(int'(a[62:52]) + int'(b[62:52]) - 2046);
    ctx.rm      = rm;
    prod        = ({75'h0, 1'b1, a[51:0]} * {75'h0, 1'b1, b[51:0]}) << 22;
    #1;
  endtask

  task automatic fail(input string what, input logic [63:0] a, input logic [63:0] b);
    failures++;
    if (failures < 10) $display("FAIL %s: %h * %h", what, a, b);
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] a, b, w;
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      a[62:52] = 11'(1023 + int'($urandom_range(0, 200)) - 100);
      b[62:52] = 11'(1023 + int'($urandom_range(0, 200)) - 100);
      w = $realtobits($bitstoreal(a) * $bitstoreal(b));
      present(a, b, RM_RNE); r_ne = result;
      checks++;
      if (r_ne !== w) fail("nearest", a, b);
      present(a, b, RM_RTZ); r_tz = result;
      present(a, b, RM_RUP); r_up = result;
      present(a, b, RM_RDN); r_dn = result;
      checks++;
      if (r_tz[62:0] > r_ne[62:0] || r_ne[62:0] - r_tz[62:0] > 1) fail("toward zero", a, b);
      checks++;
      if (!ctx.sign && (r_up[62:0] < r_ne[62:0] || r_dn !== r_tz)) fail("directed +", a, b);
      if (ctx.sign && (r_dn[62:0] < r_ne[62:0] || r_up !== r_tz)) fail("directed -", a, b);
    end
    // overflow and underflow
    present(64'h7FE0_0000_0000_0000, 64'h4000_0000_0000_0000, RM_RNE);
    checks++; if (result !== 64'h7FF0_0000_0000_0000 || flags !== 4'b0101) fail("overflow", 0, 0);
    present(64'h7FE0_0000_0000_0000, 64'h4000_0000_0000_0000, RM_RTZ);
    checks++; if (result !== 64'h7FEF_FFFF_FFFF_FFFF || flags !== 4'b0101) fail("overflow rtz", 0, 0);
    present(64'h0010_0000_0000_0000, 64'h3FE0_0000_0000_0000, RM_RNE);
    checks++; if (result !== 64'h0 || flags !== 4'b0011) fail("underflow", 0, 0);
    present(64'h3FF8_0000_0000_0000, 64'h4000_0000_0000_0000, RM_RNE);   // 3.0 exactly
    checks++; if (result !== 64'h4008_0000_0000_0000 || flags !== 4'b0000) fail("exact", 0, 0);
    // special bypass
    ctx.special = 1'b1; ctx.spec_val = 64'h7FF8_0000_0000_0000; ctx.spec_flags = 4'b1000;
    #1;
    checks++; if (result !== 64'h7FF8_0000_0000_0000 || flags !== 4'b1000) fail("special", 0, 0);
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
