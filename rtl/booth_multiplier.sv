// Multiplier array of the second stage: 64 x 64 bits to carry-save.
//
// The multiplier operand is recoded to radix-4 Booth digits in
// {-2,-1,0,1,2}; each digit selects 0, +/-A or +/-2A as a partial product,
// and a tree of 3:2 counters reduces all partial products to a sum word and a
// carry word. The final carry-propagate addition is left to the third stage.
// Recoding, partial-product selection and counter-tree reduction are the
// standard organisation of the multiplier the method builds on.
//
// Both operands are unsigned, so the operand is zero-extended and recoded into
// W/2+1 = 33 digits (a 32-digit recoding would read the top bit as a sign).
// A negative partial product is formed as the ones' complement, sign-extended
// to 2W bits, and its +1 is gathered into one extra row. All arithmetic is
// modulo 2^(2W): sum + carry equals a*b modulo 2^128, which is exact since
// the product fits in 128 bits.
//
// Interface: a (multiplicand), b (multiplier); sum, carry. Combinational;
// the surrounding pipeline registers sum and carry.
module booth_multiplier #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] sum,
  output logic [2*WIDTH-1:0] carry
);

  localparam int unsigned ND = WIDTH / 2 + 1;   // Booth digits
  localparam int unsigned PW = 2 * WIDTH;       // product width

  logic [WIDTH+2:0]          bx;                // {0, 0, b, 0}
  logic [ND:0][PW-1:0]       pp;                // ND partial products + negation row

  assign bx = {2'b00, b, 1'b0};

  always_comb begin
    logic [2:0]       grp;
    logic [WIDTH+1:0] mag;    // 0, a or 2a
    logic             neg;
    logic [PW-1:0]    row;
    pp[ND] = '0;
    for (int unsigned i = 0; i < ND; i++) begin
      grp = bx[2*i +: 3];
      unique case (grp)
        3'b001, 3'b010: begin mag = {2'b00, a};       neg = 1'b0; end
        3'b011:         begin mag = {1'b0, a, 1'b0};  neg = 1'b0; end
        3'b100:         begin mag = {1'b0, a, 1'b0};  neg = 1'b1; end
        3'b101, 3'b110: begin mag = {2'b00, a};       neg = 1'b1; end
        default:        begin mag = '0;               neg = 1'b0; end
      endcase
      row = PW'(mag);
      if (neg) row = ~row;
      pp[i] = row << (2 * i);
      pp[ND][2*i] = neg;
    end
  end

  csa_tree #(.N(ND + 1), .WIDTH(PW)) u_tree (.rows(pp), .sum(sum), .carry(carry));

endmodule
