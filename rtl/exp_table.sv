// Look-up table for exp(A), A = 0.x_1 ... x_7 (the "T" step of cycle 2).
//
// 2^7 entries of 64 bits (8192 bits), addressed by the seven leading
// fractional bits of the argument. The output goes to the multiplicand side
// of the multiplier array, which needs a 1.63 word in [1,2). Entries with
// exp(A) >= 2 (A >= ln 2, addresses 89 to 127) are therefore stored halved,
// and the flag 'half' tells the control to add one to the result exponent;
// that normalisation is this design's choice, as is rounding each entry to
// nearest. The contents are computed at elaboration from the series of
// exp(i/128), so no data file is needed.
//
// Interface: addr in, entry and half out. Combinational read.
module exp_table
  import exp_pkg::*;
(
  input  logic [P-1:0] addr,
  output logic [W-1:0] entry,
  output logic         half
);

  localparam int unsigned DEPTH = 1 << P;

  logic [W:0] rom [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_rom
    localparam logic [W:0] ENTRY = exp_entry(i);
    assign rom[i] = ENTRY;
  end

  assign {half, entry} = rom[addr];

endmodule
