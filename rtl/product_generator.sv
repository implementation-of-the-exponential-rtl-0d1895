// Generator of products: exp(D) as two partial products P1 and P2.
//
// With d_j = x_j, exp(D) is the product of the factors (1 + d_j 2^-j) for
// j = 8..18, where the first factor carries a double shift:
// (1 + d_8 (2^-8 + 2^-17)). Multiplying the factors out turns each partial
// product into a sum of terms; each term is the AND of some d_j at a fixed
// bit position. The ANDs are formed and the terms are reduced by a 3:2
// counter tree, so P1 and P2 are ready in the first cycle and the multiplier
// array forms P1 x P2 afterwards. The grouping is the method's:
//   P1 = (1 + d_8 (2^-8 + 2^-17)) (1 + d_10 2^-10)(1 + d_11 2^-11)
//        (1 + d_12 2^-12)(1 + d_16 2^-16)
//   P2 = product over j in {9, 13, 14, 15, 17, 18} of (1 + d_j 2^-j)
// Terms lighter than 2^-63 are dropped (truncation), and the counter-tree
// output is turned into binary with a plain adder; both are this design's
// choices.
//
// Interface: d = x_8..x_18 (d[0] is x_8); p1, p2 are 1.63 words.
// Purely combinational.
module product_generator
  import exp_pkg::*;
(
  input  logic [10:0]  d,   // d[k] = x_(8+k)
  output logic [W-1:0] p1,
  output logic [W-1:0] p2
);

  // Atoms of P1: {digit index into d, weight}. Atoms 0 and 1 belong to the
  // same factor and are never selected together.
  localparam int unsigned N1 = 6;
  localparam int unsigned P1_D [N1] = '{0, 0, 2, 3, 4, 8};
  localparam int unsigned P1_E [N1] = '{8, 17, 10, 11, 12, 16};
  localparam int unsigned N2 = 6;
  localparam int unsigned P2_D [N2] = '{1, 5, 6, 7, 9, 10};
  localparam int unsigned P2_E [N2] = '{9, 13, 14, 15, 17, 18};

  logic [(1<<N1)-1:0][W-1:0] t1;
  logic [(1<<N2)-1:0][W-1:0] t2;

  // Weight (power of 2^-1) of the term selected by mask m, or 0 if the term
  // is not formed (two atoms of the same factor, or lighter than 2^-63).
  function automatic int unsigned weight1(input int unsigned m);
    int unsigned w;
    w = 0;
    for (int k = 0; k < N1; k++) if (((m >> k) & 1) != 0) w += P1_E[k];
    if ((m & 3) == 3 || w > FRAC) w = 0;
    return w;
  endfunction

  function automatic int unsigned weight2(input int unsigned m);
    int unsigned w;
    w = 0;
    for (int k = 0; k < N2; k++) if (((m >> k) & 1) != 0) w += P2_E[k];
    if (w > FRAC) w = 0;
    return w;
  endfunction

  // AND of the selected digits, placed at the term's bit position.
  always_comb begin
    for (int unsigned m = 0; m < (1 << N1); m++) begin
      logic en;
      en = 1'b1;
      for (int k = 0; k < N1; k++) if (((m >> k) & 1) != 0) en = en & d[P1_D[k]];
      t1[m] = '0;
      if (m == 0)              t1[m][FRAC] = 1'b1;
      else if (weight1(m) > 0) t1[m][FRAC-weight1(m)] = en;
    end
    for (int unsigned m = 0; m < (1 << N2); m++) begin
      logic en;
      en = 1'b1;
      for (int k = 0; k < N2; k++) if (((m >> k) & 1) != 0) en = en & d[P2_D[k]];
      t2[m] = '0;
      if (m == 0)              t2[m][FRAC] = 1'b1;
      else if (weight2(m) > 0) t2[m][FRAC-weight2(m)] = en;
    end
  end

  logic [W-1:0] s1, c1, s2, c2;

  csa_tree #(.N(1 << N1), .WIDTH(W)) u_tree1 (.rows(t1), .sum(s1), .carry(c1));
  csa_tree #(.N(1 << N2), .WIDTH(W)) u_tree2 (.rows(t2), .sum(s2), .carry(c2));

  assign p1 = s1 + c1;
  assign p2 = s2 + c2;

endmodule
