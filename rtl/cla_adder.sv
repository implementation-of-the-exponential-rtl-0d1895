// Carry-lookahead adder of the third stage (turns carry-save into binary).
//
// A parallel-prefix (Kogge-Stone) carry-lookahead adder: bitwise generate and
// propagate signals are combined in log2(WIDTH) prefix levels, giving every
// carry in logarithmic depth. The multiplier this unit is built on has a
// 128-bit fast carry-lookahead adder here; which prefix structure it uses is
// not stated, so the Kogge-Stone arrangement is this design's choice.
//
// Interface: a + b + cin = {cout, s}. Combinational.
module cla_adder #(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned LV = $clog2(WIDTH);

  logic [WIDTH-1:0] gc;   // gc[i]: carry out of bit i

  // Level 0 takes the carry-in as a generate into bit 0; level l combines
  // each bit's group with the group 2^l bits below it.
  always_comb begin
    logic [WIDTH-1:0] g, p, gn, pn;
    p    = a ^ b;
    g    = a & b;
    g[0] = (a[0] & b[0]) | ((a[0] ^ b[0]) & cin);
    for (int unsigned l = 0; l < LV; l++) begin
      for (int unsigned i = 0; i < WIDTH; i++) begin
        if (i >= (1 << l)) begin
          gn[i] = g[i] | (p[i] & g[i - (1 << l)]);
          pn[i] = p[i] & p[i - (1 << l)];
        end else begin
          gn[i] = g[i];
          pn[i] = p[i];
        end
      end
      g = gn;
      p = pn;
    end
    gc = g;
  end

  assign s    = (a ^ b) ^ {gc[WIDTH-2:0], cin};
  assign cout = gc[WIDTH-1];

endmodule
