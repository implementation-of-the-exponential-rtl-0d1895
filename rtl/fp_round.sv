// Fourth stage: normalisation, rounding and exception handling.
//
// Takes the binary product of two 1.63 words (2.126, value in [1,4)) with its
// sign and unbiased exponent, and produces the IEEE double result and its
// flags. A product in [2,4) is shifted right once; the 53-bit significand is
// rounded in one of the four IEEE modes using a guard bit and a sticky bit.
// Results above the double range give infinity or the largest finite number
// (by rounding mode) with overflow and inexact raised. Results below the
// normal range are flushed to a signed zero with underflow and inexact; no
// subnormal results are produced. The stage's tasks are those of the
// multiplier the unit is built on; flush-to-zero is this design's choice.
//
// An operation marked special (NaN, infinity, zero operand, or an argument
// whose exponential is known to overflow) bypasses the rounding and delivers
// its precomputed value and flags.
//
// Interface: ctx carries sign, exponent, rounding mode and special value;
// prod is the 128-bit product. Combinational.
module fp_round
  import exp_pkg::*;
(
  input  ctx_t           ctx,
  input  logic [127:0]   prod,
  output logic [63:0]    result,
  output fflags_t        flags
);

  always_comb begin
    logic [52:0] mant;
    logic        guard, sticky, inc, lsb;
    logic [53:0] mr;
    logic signed [EXPW+1:0] be;

    if (prod[127]) begin
      mant   = prod[127:75];
      guard  = prod[74];
      sticky = |prod[73:0];
      be     = (EXPW+2)'(ctx.exp) + 1;
    end else begin
      mant   = prod[126:74];
      guard  = prod[73];
      sticky = |prod[72:0];
      be     = (EXPW+2)'(ctx.exp);
    end
    lsb = mant[0];
    unique case (ctx.rm)
      RM_RNE:  inc = guard & (sticky | lsb);
      RM_RTZ:  inc = 1'b0;
      RM_RUP:  inc = ~ctx.sign & (guard | sticky);
      default: inc = ctx.sign & (guard | sticky);   // RM_RDN
    endcase
    mr = {1'b0, mant} + 54'(inc);
    if (mr[53]) begin
      mr = mr >> 1;
      be = be + 1;
    end
    be = be + 1023;

    flags    = '0;
    flags.nx = guard | sticky;
    if (ctx.special) begin
      result = ctx.spec_val;
      flags  = ctx.spec_flags;
    end else if (be >= 2047) begin
      flags.of = 1'b1;
      flags.nx = 1'b1;
      if (ctx.rm == RM_RTZ || (ctx.rm == RM_RUP && ctx.sign) || (ctx.rm == RM_RDN && !ctx.sign))
        result = {ctx.sign, 11'h7FE, {52{1'b1}}};
      else
        result = {ctx.sign, 11'h7FF, 52'h0};
    end else if (be <= 0) begin
      flags.uf = 1'b1;
      flags.nx = 1'b1;
      result   = {ctx.sign, 63'h0};
    end else begin
      result = {ctx.sign, be[10:0], mr[51:0]};
    end
  end

endmodule
