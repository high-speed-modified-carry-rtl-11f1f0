// ripple_stage: WIDTH-bit ripple-carry adder of multiplexer full adders, the
// final stage of the carry-save adder.
//
// Adder i adds x[i], y[i] and the carry out of adder i-1; adder 0 takes cin
// and the last adder's carry is cout, so {cout, s} == x + y + cin. Inside each
// adder the carry passes through one multiplexer (M3) only, selected by the
// locally computed x xor y, which keeps the per-bit carry delay short.
//
// Parameters: WIDTH, bits per word (default 64). Timing: combinational; the
// carry chain is the longest path of the whole four-operand adder.
module ripple_stage #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  logic [WIDTH:0] c;  // c[i] is the carry into adder i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    mux_full_adder u_fa (
      .x   (x[i]),
      .y   (y[i]),
      .cin (c[i]),
      .sum (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
