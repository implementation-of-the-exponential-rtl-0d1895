// Denormalization of the exponential's argument (the "D" step of cycle 1).
//
// Converts the IEEE double X = (-1)^s * M * 2^e into a two's-complement
// fixed-point number X = z + x, where z is a ZW-bit signed integer and x a
// fraction in [0,1) with 63 bits. The significand is shifted by e (bits below
// 2^-63 are truncated) and, for a negative argument, every bit is
// complemented. The +1 that completes the two's complement is NOT added here:
// it is returned as plus_one and folded into the predictor's sum, so no
// carry-propagate adder sits in this step. That arrangement is the method's;
// the width of z and the exact truncation point are this design's choices.
//
// It also classifies the argument: NaN, infinity, and an exponent above E_M
// (the result is then certain to overflow or underflow) are reported as a
// special result with its flags; an overflowing result is infinity, or the
// largest finite number when rounding toward zero or down, as the rounder
// does. A non-zero normal argument below 2^-63 vanishes in the truncation;
// it too is reported as special, with the correctly rounded neighbour of 1
// (1 + 2^-52 rounding up, 1 - 2^-53 for a negative argument rounding down or
// toward zero, else 1) and inexact. Zeros and subnormals give x = 0, z = 0
// and no special case, so they go through the datapath and return
// exp(0) = 1 exactly.
//
// Purely combinational.
module exp_denormalizer
  import exp_pkg::*;
#(
  parameter int E_M = 11  // largest exponent of X that is computed
) (
  input  logic [63:0]          x_in,      // IEEE double argument
  input  rm_e                  rm,        // rounding mode, for the special results
  output logic signed [ZW-1:0] z,         // integer part (two's complement, before +1)
  output logic [FRAC-1:0]      x_frac,    // x_1 .. x_63, x_1 is the MSB
  output logic                 plus_one,  // add 2^-63 to complete the two's complement
  output logic                 special,   // result is fixed without computation
  output logic [63:0]          spec_val,
  output fflags_t              spec_flags
);

  localparam int unsigned MAGW = ZW - 1 + FRAC;  // magnitude bits: 12 integer + 63 fraction

  logic        s;
  logic [10:0] be;
  logic [51:0] f;
  logic signed [12:0] e;
  logic [MAGW-1:0] mag;
  logic [MAGW:0]   fx;

  assign s  = x_in[63];
  assign be = x_in[62:52];
  assign f  = x_in[51:0];
  assign e  = $signed({2'b00, be}) - 13'sd1023;

  // |X| * 2^63 truncated: significand 1.f placed at 2^(e+11) in integer units
  always_comb begin
    logic [MAGW-1:0] sig;
    int sh;
    sig = MAGW'({1'b1, f});
    sh  = int'(e) + (FRAC - 52);
    mag = '0;
    if (be != 11'd0 && int'(e) <= E_M) begin
      if (sh >= 0) mag = sig << sh;
      else if (sh > -53) mag = sig >> (-sh);
    end
  end

  // Ones' complement for a negative non-zero magnitude.
  assign plus_one = s && (mag != '0);
  assign fx       = plus_one ? ~{1'b0, mag} : {1'b0, mag};
  assign z        = $signed(fx[MAGW -: ZW]);
  assign x_frac   = fx[FRAC-1:0];

  always_comb begin
    special    = 1'b0;
    spec_val   = 64'h0;
    spec_flags = '0;
    if (be == 11'h7FF) begin
      special = 1'b1;
      if (f != 52'd0) begin                 // NaN: quiet it
        spec_val      = {1'b0, 11'h7FF, 1'b1, f[50:0]};
        spec_flags.nv = ~f[51];
      end else begin                        // exp(+inf) = +inf, exp(-inf) = +0
        spec_val = s ? 64'h0 : 64'h7FF0_0000_0000_0000;
      end
    end else if (int'(e) > E_M) begin
      special = 1'b1;
      if (s) begin
        spec_val      = 64'h0;
        spec_flags.uf = 1'b1;
        spec_flags.nx = 1'b1;
      end else begin
        spec_val      = (rm == RM_RTZ || rm == RM_RDN) ? 64'h7FEF_FFFF_FFFF_FFFF
                                                       : 64'h7FF0_0000_0000_0000;
        spec_flags.of = 1'b1;
        spec_flags.nx = 1'b1;
      end
    end else if (be != 11'd0 && mag == '0) begin   // 0 < |X| < 2^-63
      special       = 1'b1;
      spec_flags.nx = 1'b1;
      if (!s && rm == RM_RUP)                        spec_val = 64'h3FF0_0000_0000_0001;
      else if (s && (rm == RM_RDN || rm == RM_RTZ))  spec_val = 64'h3FEF_FFFF_FFFF_FFFF;
      else                                           spec_val = 64'h3FF0_0000_0000_0000;
    end
  end

endmodule
