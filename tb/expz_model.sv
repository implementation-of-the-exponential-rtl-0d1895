// Behavioural model of the integer-part exponential exp(z) = y * 2^e.
//
// Stands in for the unit that delivers exp(z) for the integer part z of the
// argument; it is not part of the synthesizable design. It answers in the
// same cycle with y in [1,2) as a 1.52 significand and e as a signed
// exponent, computed with the simulator's double-precision exp(). Outside the
// double range it returns 1.0 * 2^(+/-4000), which drives the final result to
// overflow or underflow.
module expz_model
  import exp_pkg::*;
(
  input  logic signed [ZW-1:0]   z,
  output logic [52:0]            sig,
  output logic signed [EXPW-1:0] e
);
  always_comb begin
    real         r;
    logic [63:0] b;
    if (z > 709) begin
      sig = {1'b1, 52'h0};
      e   = 16'sd4000;
    end else if (z < -708) begin
      sig = {1'b1, 52'h0};
      e   = -16'sd4000;
    end else begin
      r   = $exp(real'(z));
      b   = $realtobits(r);
      sig = {1'b1, b[51:0]};
      e   = EXPW'($signed({5'b0, b[62:52]}) - 16'sd1023);
    end
  end
endmodule
