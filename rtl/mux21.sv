// mux21: one-bit 2-to-1 multiplexer, the only cell the multiplexer full
// adder is built from.
//
// Output y follows input a while the select s is 0 and input b while s is 1.
// The pin names A, B, S, Y are those of the multiplexer cells in the full
// adder's block diagram; the select polarity (a on s = 0) is the reading under
// which that diagram agrees with the adder's equations. The gate-level insides
// of the multiplexer are not specified, so it is written as a conditional
// expression and left to synthesis.
//
// Timing: purely combinational, no clock and no state.
module mux21 (
  input  logic a,  // chosen when s = 0
  input  logic b,  // chosen when s = 1
  input  logic s,  // select
  output logic y
);
  assign y = s ? b : a;
endmodule
