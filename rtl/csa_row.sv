// csa_row: one carry-save row of WIDTH multiplexer full adders.
//
// Each adder takes the three bits of weight 2^i, x[i], y[i] and z[i], and
// produces s[i] (weight 2^i) and co[i] (weight 2^(i+1)). No carry passes
// between the adders of a row, so the row's delay is one full adder whatever
// WIDTH is, and x + y + z == s + (co << 1) holds exactly. Shifting the carry
// word into the next row is left to the wiring of the instantiating module.
//
// Parameters: WIDTH, bits per word (default 64, the larger size evaluated for
// the adder). Timing: combinational, no state.
module csa_row #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,   // enters each adder as its carry in
  output logic [WIDTH-1:0] s,   // sum bits, weight 2^i
  output logic [WIDTH-1:0] co   // carry bits, weight 2^(i+1)
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    mux_full_adder u_fa (
      .x   (x[i]),
      .y   (y[i]),
      .cin (z[i]),
      .sum (s[i]),
      .cout(co[i])
    );
  end
endmodule
