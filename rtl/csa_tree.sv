// Carry-save reduction tree of 3:2 counters (full adders).
//
// Reduces N operands of WIDTH bits to two operands, sum and carry, whose
// arithmetic sum (mod 2^WIDTH) equals the sum of the inputs. Each level
// groups the rows in threes and replaces every group by a sum row and a
// left-shifted carry row; rows left over pass to the next level unchanged.
// Purely combinational. This is the "tree of counters" used by the product
// generator, the predictor and the multiplier array; the level structure is
// this design's own (a plain Wallace arrangement).
module csa_tree #(
  parameter int unsigned N     = 8,
  parameter int unsigned WIDTH = 64
) (
  input  logic [N-1:0][WIDTH-1:0] rows,
  output logic [WIDTH-1:0]        sum,
  output logic [WIDTH-1:0]        carry
);

  // Number of rows left after lvl levels of 3:2 reduction.
  function automatic int unsigned rows_at(input int unsigned lvl);
    int unsigned n;
    n = N;
    for (int unsigned l = 0; l < lvl; l++) begin
      if (n > 2) n = 2 * (n / 3) + (n % 3);
    end
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned l;
    l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();
  localparam int unsigned NMAX   = (N < 2) ? 2 : N;

  // All levels in one block: cur holds the rows of the current level.
  always_comb begin
    logic [NMAX-1:0][WIDTH-1:0] cur, nxt;
    int unsigned n, groups, rem;
    cur = '0;
    for (int unsigned i = 0; i < N; i++) cur[i] = rows[i];
    n = N;
    for (int unsigned l = 0; l < LEVELS; l++) begin
      groups = n / 3;
      rem    = n % 3;
      nxt    = '0;
      for (int unsigned g = 0; g < NMAX / 3; g++) begin
        if (g < groups) begin
          nxt[2*g]   = cur[3*g] ^ cur[3*g+1] ^ cur[3*g+2];
          nxt[2*g+1] = ((cur[3*g] & cur[3*g+1]) | (cur[3*g] & cur[3*g+2]) |
                        (cur[3*g+1] & cur[3*g+2])) << 1;
        end
      end
      for (int unsigned r = 0; r < 2; r++)
        if (r < rem) nxt[2*groups+r] = cur[3*groups+r];
      cur = nxt;
      n   = 2 * groups + rem;
    end
    sum   = cur[0];
    carry = cur[1];
  end

endmodule
