// Test of the argument denormalization. For each argument the reference
// scales the significand by 2^(e+11) with multiplication or division (not
// shifts), complements it for a negative argument, and compares z, x and the
// deferred +1. It also checks that z + x (+2^-63) equals X to within double-precision
// rounding,
// and the special cases: NaN, infinities, zeros, exponents above E_M (the
// overflow value depends on the rounding mode) and arguments so small that
// they vanish (the neighbour of 1 chosen by the rounding mode, inexact).
module tb_exp_denormalizer;
  import exp_pkg::*;
  logic [63:0]          x_in;
  logic signed [ZW-1:0] z;
  logic [FRAC-1:0]      x_frac;
  logic                 plus_one, special;
  logic [63:0]          spec_val;
  fflags_t              spec_flags;
  int checks = 0, failures = 0;

  rm_e                  rm;
  exp_denormalizer dut (.x_in, .rm, .z, .x_frac, .plus_one, .special, .spec_val, .spec_flags);

  task automatic check_finite();
    logic [127:0] sig, mag, fx;
    int           sh;
    logic         neg;
    real          xr, back;
    #1;
    sig = 128'({1'b1, x_in[51:0]});
    sh  = int'(x_in[62:52]) - 1023 + 11;
    if (x_in[62:52] == 0)  mag = '0;
    else if (sh >= 0)      mag = sig * (128'(1) << sh);
    else if (sh > -64)     mag = sig / (128'(1) << (-sh));
    else                   mag = '0;
    neg = x_in[63] && mag != 0;
    fx  = neg ? ~mag : mag;
    if (x_in[62:52] != 0 && mag == 0) begin
      if (!x_in[63] && rm == RM_RUP)                     check_special(64'h3FF0_0000_0000_0001, 4'b0001);
      else if (x_in[63] && (rm == RM_RDN || rm == RM_RTZ)) check_special(64'h3FEF_FFFF_FFFF_FFFF, 4'b0001);
      else                                               check_special(64'h3FF0_0000_0000_0000, 4'b0001);
      return;
    end
    checks++;
    if (z !== $signed(fx[75:63]) || x_frac !== fx[62:0] || plus_one !== neg || special) begin
      failures++;
      if (failures < 10) $display("FAIL X=%h z=%0d x=%h +1=%b", x_in, z, x_frac, plus_one);
    end
    xr   = $bitstoreal(x_in);
    back = real'(z) + real'(x_frac) * (2.0 ** -63) + (plus_one ? 2.0 ** -63 : 0.0);
    checks++;
    if ((back - xr) > 2.0 ** -50 * (1.0 + (xr < 0 ? -xr : xr)) || (xr - back) > 2.0 ** -50 * (1.0 + (xr < 0 ? -xr : xr))) begin
      failures++;
      if (failures < 10) $display("FAIL X=%h reconstructs to %f", x_in, back);
    end
  endtask

  task automatic check_special(input logic [63:0] want, input fflags_t wf);
    #1;
    checks++;
    if (!special || spec_val !== want || spec_flags !== wf) begin
      failures++;
      $display("FAIL special X=%h got %b %h %b", x_in, special, spec_val, spec_flags);
    end
  endtask

  initial begin
    rm = RM_RNE;
    x_in = 64'h0; check_finite();
    x_in = 64'h8000_0000_0000_0000; check_finite();
    x_in = 64'h8000_0000_0000_0001; check_finite();       // negative subnormal
    x_in = 64'h3FF0_0000_0000_0000; check_finite();       // 1
    x_in = 64'hBFF0_0000_0000_0000; check_finite();       // -1
    x_in = 64'h40AF_FFFF_FFFF_FFFF; check_finite();       // just below 4096
    x_in = 64'hC0AF_FFFF_FFFF_FFFF; check_finite();
    x_in = 64'h3C70_0000_0000_0000; check_finite();       // 2^-56
    x_in = 64'h3C00_0000_0000_0000; check_finite();       // 2^-63
    x_in = 64'hBBF0_0000_0000_0000; check_finite();       // -2^-64: vanishes
    for (int i = 0; i < 4000; i++) begin
      x_in = {$urandom(), $urandom()};
      x_in[62:52] = 11'(1023 - 70 + int'($urandom_range(0, 81)));   // e in [-70, 11]
      rm = rm_e'($urandom_range(0, 3));
      check_finite();
    end
    rm = RM_RNE;
    x_in = 64'h7FF0_0000_0000_0000; check_special(64'h7FF0_0000_0000_0000, '0);
    x_in = 64'hFFF0_0000_0000_0000; check_special(64'h0, '0);
    x_in = 64'h7FF4_0000_0000_0001; check_special(64'h7FFC_0000_0000_0001, 4'b1000);
    x_in = 64'hFFF8_0000_0000_0000; check_special(64'h7FF8_0000_0000_0000, 4'b0000);
    x_in = 64'h40B0_0000_0000_0000; check_special(64'h7FF0_0000_0000_0000, 4'b0101);  // 4096
    x_in = 64'hC0B0_0000_0000_0000; check_special(64'h0, 4'b0011);                   // -4096
    rm = RM_RTZ;
    x_in = 64'h40B0_0000_0000_0000; check_special(64'h7FEF_FFFF_FFFF_FFFF, 4'b0101);
    rm = RM_RDN;
    x_in = 64'h3B00_0000_0000_0000; check_special(64'h3FF0_0000_0000_0000, 4'b0001);  // 2^-79
    x_in = 64'hBB00_0000_0000_0000; check_special(64'h3FEF_FFFF_FFFF_FFFF, 4'b0001);
    rm = RM_RUP;
    x_in = 64'h3B00_0000_0000_0000; check_special(64'h3FF0_0000_0000_0001, 4'b0001);
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
