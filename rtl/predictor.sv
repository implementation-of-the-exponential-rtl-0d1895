// Predictor: argument K of the third subexponential (the "P" step of cycle 3).
//
// The digits of D are predicted as d_j = x_j for j = 8..18, all at once. The
// remaining argument is then
//   K = C + sum_{j=8..18} x_j * (2^-j - ln(1 + u_j)),
// with C = 0.0...0 x_19 ... x_63, u_j = 2^-j, and u_8 = 2^-8 + 2^-17 for the
// double-shifted first digit. Every correction term is a small positive
// constant (about 2^-(2j+1)), gated by its digit, so K is a multi-operand sum
// of gated constants that a 3:2 counter tree reduces and a carry-propagate
// adder resolves. The adder's carry-in takes the +2^-63 that completes the
// two's complement of a negative argument (see exp_denormalizer). That
// organisation is the method's; the constants are rounded to nearest at
// 2^-63 (this design's choice).
//
// Interface: x_frac = x_1..x_63 (bit 62 is x_1), plus_one; k is a 1.63 word,
// always below 2^-16. Purely combinational.
module predictor
  import exp_pkg::*;
(
  input  logic [FRAC-1:0] x_frac,
  input  logic            plus_one,
  output logic [W-1:0]    k
);

  localparam int unsigned ND   = Q - P;   // digits of B: x_8 .. x_18
  localparam int unsigned NROW = ND + 1;  // gated constants and C

  logic [NROW-1:0][W-1:0] rows;
  logic [W-1:0]           s, c;

  for (genvar i = 0; i < ND; i++) begin : g_corr
    localparam int unsigned J = P + 1 + i;
    localparam logic [W-1:0] CORR = ln_corr(J);
    assign rows[i] = x_frac[FRAC-J] ? CORR : '0;
  end

  // C: the bits of x below 2^-Q
  assign rows[ND] = {{(W-(FRAC-Q)){1'b0}}, x_frac[FRAC-Q-1:0]};

  csa_tree #(.N(NROW), .WIDTH(W)) u_tree (.rows(rows), .sum(s), .carry(c));

  assign k = s + c + W'(plus_one);

endmodule
