// Shared definitions of the exponential-capable floating-point multiplier.
//
// The unit computes y*exp(x) for the fractional part x of the argument by
// splitting x into three fields: A (bits 1..P), B (bits P+1..Q) and C (bits
// Q+1..63). exp(A) comes from a table, exp(D) (D approximates B) is a product
// of factors (1 + d_j 2^-j) with d_j = x_j, and exp(K) with K = C + (B - D) is
// the quadratic polynomial 1 + K(1 + K/2). The split P = 7, Q = 18, the double
// shift in the first factor (A_DBL = 1) and the 64-bit datapath with 63
// fractional bits are the design point of the method; the grouping of the
// B-factors into P1 and P2 follows the same design point.
//
// Number format used everywhere in the datapath: a 64-bit word is an unsigned
// fixed-point number with 1 integer bit and 63 fractional bits ("1.63").
// Products of two such words are 128 bits with 2 integer bits ("2.126").
//
// The constant functions below compute, at elaboration time and with 160
// fractional bits of internal precision, the two sets of constants the
// hardware needs: the table entries exp(i/128) and the correction terms
// 2^-j - ln(1 + u_j) that the predictor adds. Both are rounded to nearest at
// 2^-63. Nothing here is synthesised into logic by itself.
package exp_pkg;

  localparam int unsigned W    = 64;  // datapath word, 1.63
  localparam int unsigned FRAC = 63;  // fractional bits of the datapath
  localparam int unsigned P    = 7;   // bits of A (table inputs)
  localparam int unsigned Q    = 18;  // last bit of B
  localparam int unsigned A_DBL = 1;  // first factor carries a second shift 2^-(2(P+1)+1)
  localparam int unsigned EXPW = 16;  // signed exponent width inside the unit
  localparam int unsigned TAGW = 8;   // width of the tag returned with a result
  localparam int unsigned ZW   = 13;  // signed integer part of the argument (e_m = 11)

  // IEEE rounding modes.
  typedef enum logic [1:0] {
    RM_RNE = 2'd0,  // to nearest, ties to even
    RM_RTZ = 2'd1,  // toward zero
    RM_RUP = 2'd2,  // toward +infinity
    RM_RDN = 2'd3   // toward -infinity
  } rm_e;

  // Cycle of the exponential currently using the first stage. Cycles 7 to 9
  // (the last product and its rounding) need no first-stage control, so the
  // next exponential may start in the previous one's cycle 7.
  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,
    PH_DG   = 3'd1,  // denormalise, generate P1 and P2
    PH_T    = 3'd2,  // table look-up, y arrives; array forms P1*P2
    PH_P    = 3'd3,  // predictor forms K; array forms y*exp(A)
    PH_C4   = 3'd4,  // R1 and R2 fed back; array forms K(1+K/2)
    PH_C5   = 3'd5,  // array forms R1*R2; first stage idle
    PH_C6   = 3'd6   // R3 and R4 fed back
  } phase_e;

  // Exception flags delivered with every result.
  typedef struct packed {
    logic nv;  // invalid operation
    logic of;  // overflow
    logic uf;  // underflow
    logic nx;  // inexact
  } fflags_t;

  // Context that travels with an operation through the multiplier array,
  // the adder and the rounder. Only operations with last=1 leave the unit.
  typedef struct packed {
    logic                   valid;
    logic                   last;     // this product is rounded and delivered
    logic                   is_exp;
    logic                   sign;
    logic signed [EXPW-1:0] exp;      // value = product(2.126) * 2^exp
    rm_e                    rm;
    logic [TAGW-1:0]        tag;
    logic                   special;  // deliver spec_val / spec_flags instead
    logic [63:0]            spec_val;
    fflags_t                spec_flags;
  } ctx_t;

  localparam int unsigned FP = 160;   // fractional bits of the constant arithmetic
  typedef logic [2*FP+7:0] wide_t;

  // Round a value with FP fractional bits to a 1.63 word (nearest).
  function automatic logic [W-1:0] to_1p63(input wide_t v);
    wide_t r;
    r = (v + (wide_t'(1) << (FP - FRAC - 1))) >> (FP - FRAC);
    return r[W-1:0];
  endfunction

  // Table entry: exp(i/2^P) as 1.63. Entries >= 2 are stored halved, and
  // the returned flag says the exponent of the result must grow by one.
  function automatic logic [W:0] exp_entry(input int unsigned i);
    wide_t a, term, sum;
    logic  half;
    a    = wide_t'(i) << (FP - P);
    term = wide_t'(1) << FP;
    sum  = term;
    for (int k = 1; k < 48; k++) begin
      term = ((term * a) >> FP) / wide_t'(k);
      sum  = sum + term;
    end
    half = (sum >= (wide_t'(2) << FP));
    if (half) sum = sum >> 1;
    return {half, to_1p63(sum)};
  endfunction

  // Correction term for digit j of B: 2^-j - ln(1 + u_j), with
  // u_j = 2^-j, or 2^-j + 2^-(2j+1) for the first digit (j = P+1) when the
  // double shift is used. ln(1+u) = sum (-1)^(k+1) u^k / k.
  function automatic logic [W-1:0] ln_corr(input int unsigned j);
    wide_t u, pw, lnv, pos;
    u = wide_t'(1) << (FP - j);
    if (j == P + 1 && A_DBL != 0) u = u + (wide_t'(1) << (FP - 2*j - 1));
    pw  = u;
    lnv = u;
    for (int k = 2; k < 40; k++) begin
      pw = (pw * u) >> FP;
      if (k % 2 == 0) lnv = lnv - pw / wide_t'(k);
      else            lnv = lnv + pw / wide_t'(k);
    end
    pos = (wide_t'(1) << (FP - j)) - lnv;
    return to_1p63(pos);
  endfunction

endpackage
