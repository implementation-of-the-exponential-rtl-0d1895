// Double-precision floating-point multiplier that also evaluates exp(X).
//
// A four-stage pipelined IEEE multiplier (operand selection, 64x64 Booth
// multiplier array to carry-save, 128-bit carry-lookahead adder, rounding and
// exceptions) is extended with three small units in its first stage - a
// 128-entry table of exp(A), a generator of the partial products P1 and P2 of
// exp(D), and a predictor of K - plus multiplexer inputs and two feedback
// lines. The exponential is then y * exp(A) * exp(D) * exp(K), formed with
// five passes through the multiplier array:
//
//   cycle 1  D/G  denormalise X; P1, P2 into the operand registers
//   cycle 2  T    exp(A) and y into the operand registers; array: P1*P2
//   cycle 3  P    K and 1+K/2 into the operand registers;  array: y*exp(A)
//   cycle 4       R1 = P1*P2 (product register) and R2 = y*exp(A) (adder
//                 output, shifted right if in [2,4)) fed back; array: K(1+K/2)
//   cycle 5       array: R1*R2
//   cycle 6       R3 = 1 + K(1+K/2) (product register, leading one forced)
//                 and R4 = R1*R2 (adder output, shifted if in [2,4)) fed back
//   cycle 7-9     array, adder and rounder: R5 = R3*R4, rounded to double
//
// Latency is 9 cycles for the exponential and 3 for a multiplication; a new
// exponential may start every 6 cycles and multiplications may use the free
// array slots (see exp_issue_ctrl). The schedule, the three units and the
// feedback lines follow the method. This design's own choices: the
// exponential of the integer part z of X is requested from outside (port
// expz_*) in cycle 2 and returned in the same cycle as a significand y in
// [1,2) and an exponent; the left feedback line (from the product register)
// carries R1 and R3 and holds the gate that forces R3's leading one, the right
// one (from the adder output) carries R2 and R4 with the optional one-bit
// shift; table entries >= 2 are stored halved. Subnormal inputs are read as
// zero and tiny results flushed to zero.
//
// Interface:
//   exp_valid/exp_ready, exp_x, exp_rm, exp_tag    start y*exp(x) for X
//   mul_valid/mul_ready, mul_a, mul_b, mul_rm, mul_tag  start a*b
//   expz_valid, expz_z -> expz_sig, expz_exp       exp(z) = expz_sig * 2^expz_exp,
//                                                  expz_sig is 1.52, answered
//                                                  combinationally
//   out_valid, out_is_exp, out_tag, out_result, out_flags
// A transfer on either issue port happens at a rising clock edge with valid
// and ready high; results leave 10 edges (exponential) or 4 edges
// (multiplication) later, with the tag they came in with.
module fp_exp_mul_unit
  import exp_pkg::*;
#(
  parameter int E_M = 11   // largest argument exponent computed (|X| < 2^(E_M+1))
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // exponential issue
  input  logic                   exp_valid,
  output logic                   exp_ready,
  input  logic [63:0]            exp_x,
  input  rm_e                    exp_rm,
  input  logic [TAGW-1:0]        exp_tag,
  // multiplication issue
  input  logic                   mul_valid,
  output logic                   mul_ready,
  input  logic [63:0]            mul_a,
  input  logic [63:0]            mul_b,
  input  rm_e                    mul_rm,
  input  logic [TAGW-1:0]        mul_tag,
  // exponential of the integer part, supplied from outside
  output logic                   expz_valid,
  output logic signed [ZW-1:0]   expz_z,
  input  logic [52:0]            expz_sig,
  input  logic signed [EXPW-1:0] expz_exp,
  // results
  output logic                   out_valid,
  output logic                   out_is_exp,
  output logic [TAGW-1:0]        out_tag,
  output logic [63:0]            out_result,
  output fflags_t                out_flags
);

  // ------------------------------------------------------------------
  // Issue control
  // ------------------------------------------------------------------
  logic   exp_fire, mul_fire, s1_load;
  phase_e phase;

  exp_issue_ctrl u_ctrl (
    .clk, .rst_n,
    .exp_valid, .exp_ready, .mul_valid, .mul_ready,
    .exp_fire, .mul_fire, .phase, .s1_load
  );

  // ------------------------------------------------------------------
  // Operand registers (operand X; operands A and B of a multiplication)
  // ------------------------------------------------------------------
  // opa_q/opb_q hold the whole IEEE operands; their exponent fields are
  // consumed when the context is built (in the cycle of the transfer), so
  // only the fraction bits are read from the registers.
  logic [63:0]     opx_q, opa_q, opb_q;
  rm_e             ex_rm_q;
  logic [TAGW-1:0] ex_tag_q;
  ctx_t            mul_ctx_q;
  logic            mul_pend_q;    // a multiplication uses the array this cycle

  // Context of a multiplication: sign, exponent and special operands.
  function automatic ctx_t mul_context(input logic [63:0] a, input logic [63:0] b,
                                       input rm_e rm, input logic [TAGW-1:0] tag);
    ctx_t c;
    logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    a_nan  = (a[62:52] == 11'h7FF) && (a[51:0] != 0);
    b_nan  = (b[62:52] == 11'h7FF) && (b[51:0] != 0);
    a_inf  = (a[62:52] == 11'h7FF) && (a[51:0] == 0);
    b_inf  = (b[62:52] == 11'h7FF) && (b[51:0] == 0);
    a_zero = (a[62:52] == 11'h000);
    b_zero = (b[62:52] == 11'h000);
    c            = '0;
    c.valid      = 1'b1;
    c.last       = 1'b1;
    c.sign       = a[63] ^ b[63];
    c.exp        = EXPW'($signed({5'b0, a[62:52]}) + $signed({5'b0, b[62:52]}) - 16'sd2046);
    c.rm         = rm;
    c.tag        = tag;
    if (a_nan || b_nan) begin
      c.special       = 1'b1;
      c.spec_val      = a_nan ? (a | 64'h0008_0000_0000_0000) : (b | 64'h0008_0000_0000_0000);
      c.spec_flags.nv = (a_nan && !a[51]) || (b_nan && !b[51]);
    end else if ((a_inf && b_zero) || (b_inf && a_zero)) begin
      c.special       = 1'b1;
      c.spec_val      = 64'h7FF8_0000_0000_0000;
      c.spec_flags.nv = 1'b1;
    end else if (a_inf || b_inf) begin
      c.special  = 1'b1;
      c.spec_val = {c.sign, 11'h7FF, 52'h0};
    end else if (a_zero || b_zero) begin
      c.special  = 1'b1;
      c.spec_val = {c.sign, 63'h0};
    end
    return c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opx_q      <= '0;
      ex_rm_q    <= RM_RNE;
      ex_tag_q   <= '0;
      opa_q      <= '0;
      opb_q      <= '0;
      mul_ctx_q  <= '0;
      mul_pend_q <= 1'b0;
    end else begin
      if (exp_fire) begin
        opx_q    <= exp_x;
        ex_rm_q  <= exp_rm;
        ex_tag_q <= exp_tag;
      end
      mul_pend_q <= mul_fire;
      if (mul_fire) begin
        opa_q     <= mul_a;
        opb_q     <= mul_b;
        mul_ctx_q <= mul_context(mul_a, mul_b, mul_rm, mul_tag);
      end
    end
  end

  // ------------------------------------------------------------------
  // First-stage units of the exponential
  // ------------------------------------------------------------------
  logic signed [ZW-1:0] z;
  logic [FRAC-1:0]      x_frac;
  logic                 plus_one, x_special;
  logic [63:0]          x_spec_val;
  fflags_t              x_spec_flags;
  logic [W-1:0]         p1, p2, tab_entry, k;
  logic                 tab_half;

  exp_denormalizer #(.E_M(E_M)) u_denorm (
    .x_in(opx_q), .rm(ex_rm_q), .z, .x_frac, .plus_one,
    .special(x_special), .spec_val(x_spec_val), .spec_flags(x_spec_flags)
  );

  // Digits of B: d[i] = x_(P+1+i), predicted equal to the argument's bits.
  logic [Q-P-1:0] digits;
  for (genvar i = 0; i < Q - P; i++) begin : g_digit
    assign digits[i] = x_frac[FRAC-P-1-i];
  end

  product_generator u_gen (.d(digits), .p1, .p2);

  exp_table u_table (
    .addr(x_frac[FRAC-1 -: P]), .entry(tab_entry), .half(tab_half)
  );

  predictor u_pred (
    .x_frac, .plus_one, .k
  );

  assign expz_valid = (phase == PH_T);
  assign expz_z     = z;

  // ------------------------------------------------------------------
  // Stage 1 -> 2: operand multiplexers (g:1) and registers
  // ------------------------------------------------------------------
  logic [W-1:0]           lreg_q, rreg_q;      // multiplicand / multiplier
  ctx_t                   s1_ctx_q;
  logic                   s1_pend_q;           // lreg/rreg feed the array this cycle
  logic signed [EXPW-1:0] ex_e_q;              // exponent of the exponential so far
  logic [127:0]           preg_q;              // product register (stage 3 -> 4)
  logic [127:0]           cla_sum;             // adder output (stage 3)
  logic [W-1:0]           fb_left, fb_right;   // feedback lines
  logic                   fb_right_shift;
  logic [W-1:0]           lmux, rmux;
  ctx_t                   s1_ctx_d;

  // Left line: product register, not shifted; the gate forces the leading
  // one of R3 = 1 + K(1+K/2) in cycle 6.
  assign fb_left        = {preg_q[126] | (phase == PH_C6), preg_q[125:63]};
  // Right line: adder output, shifted one place when the product is >= 2.
  assign fb_right_shift = cla_sum[127];
  assign fb_right       = fb_right_shift ? cla_sum[127:64] : cla_sum[126:63];

  always_comb begin
    lmux     = '0;
    rmux     = '0;
    s1_ctx_d = '0;
    s1_ctx_d.valid  = 1'b1;
    s1_ctx_d.is_exp = 1'b1;
    s1_ctx_d.rm     = ex_rm_q;
    s1_ctx_d.tag    = ex_tag_q;
    unique case (phase)
      PH_DG: begin lmux = p1;        rmux = p2; end
      PH_T:  begin lmux = tab_entry; rmux = {expz_sig, {(W-53){1'b0}}}; end
      PH_P:  begin lmux = k;         rmux = {1'b1, k[W-1:1]}; end
      PH_C4: begin lmux = fb_left;   rmux = fb_right; end
      PH_C6: begin
        lmux = fb_left;
        rmux = fb_right;
        s1_ctx_d.last       = 1'b1;
        s1_ctx_d.exp        = ex_e_q + EXPW'(fb_right_shift);
        s1_ctx_d.special    = x_special;
        s1_ctx_d.spec_val   = x_spec_val;
        s1_ctx_d.spec_flags = x_spec_flags;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lreg_q    <= '0;
      rreg_q    <= '0;
      s1_ctx_q  <= '0;
      s1_pend_q <= 1'b0;
      ex_e_q    <= '0;
    end else begin
      s1_pend_q <= s1_load;
      if (s1_load) begin
        lreg_q   <= lmux;
        rreg_q   <= rmux;
        s1_ctx_q <= s1_ctx_d;
      end
      if (phase == PH_T)  ex_e_q <= expz_exp + EXPW'(tab_half);
      if (phase == PH_C4) ex_e_q <= ex_e_q + EXPW'(fb_right_shift);
    end
  end

  // ------------------------------------------------------------------
  // Stage 2: MUX 2:1 and multiplier array
  // ------------------------------------------------------------------
  logic [W-1:0]   ma, mb;
  ctx_t           m_ctx;
  logic [127:0]   cs_s, cs_c, cs_s_q, cs_c_q;
  ctx_t           a_ctx_q;

  always_comb begin
    if (s1_pend_q) begin
      ma    = lreg_q;
      mb    = rreg_q;
      m_ctx = s1_ctx_q;
    end else begin
      ma    = {1'b1, opa_q[51:0], {(W-53){1'b0}}};
      mb    = {1'b1, opb_q[51:0], {(W-53){1'b0}}};
      m_ctx = mul_pend_q ? mul_ctx_q : '0;
    end
  end

  booth_multiplier #(.WIDTH(W)) u_array (.a(ma), .b(mb), .sum(cs_s), .carry(cs_c));

  // ------------------------------------------------------------------
  // Stage 3: carry-lookahead adder
  // ------------------------------------------------------------------
  ctx_t r_ctx_q;
  logic cla_cout;   // always 0: a product of two 64-bit words fits in 128 bits

  cla_adder #(.WIDTH(128)) u_cla (.a(cs_s_q), .b(cs_c_q), .cin(1'b0), .s(cla_sum), .cout(cla_cout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_s_q  <= '0;
      cs_c_q  <= '0;
      a_ctx_q <= '0;
      preg_q  <= '0;
      r_ctx_q <= '0;
    end else begin
      cs_s_q  <= cs_s;
      cs_c_q  <= cs_c;
      a_ctx_q <= m_ctx;
      preg_q  <= cla_sum;
      r_ctx_q <= a_ctx_q;
    end
  end

  // ------------------------------------------------------------------
  // Stage 4: rounding, normalisation and exceptions
  // ------------------------------------------------------------------
  logic [63:0] rnd_result;
  fflags_t     rnd_flags;

  fp_round u_round (.ctx(r_ctx_q), .prod(preg_q), .result(rnd_result), .flags(rnd_flags));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_is_exp <= 1'b0;
      out_tag    <= '0;
      out_result <= '0;
      out_flags  <= '0;
    end else begin
      out_valid <= r_ctx_q.valid && r_ctx_q.last;
      if (r_ctx_q.valid && r_ctx_q.last) begin
        out_is_exp <= r_ctx_q.is_exp;
        out_tag    <= r_ctx_q.tag;
        out_result <= rnd_result;
        out_flags  <= rnd_flags;
      end
    end
  end

  // The array is shared: never both a multiplication and an exponential step.
  a_one_user: assert property (@(posedge clk) disable iff (!rst_n) !(s1_pend_q && mul_pend_q));

endmodule
