// mux_csa4: four-operand WIDTH-bit carry-save adder whose full adders are all
// the three-multiplexer full adder (mux_full_adder).
//
// The sum a + b + c + d is formed in three rows of full adders:
//   row 1 (csa_row)      s1, c1 = carry-save of a, b, c
//   row 2 (csa_row)      s2, c2 = carry-save of s1, d and c1 moved up one
//                        bit (a 0 enters at bit 0)
//   row 3 (ripple_stage) adds s2 and c2, both aligned to weight 1 and up.
// s2[0] has nothing left to add and is sum[0] directly. At weight 1..WIDTH-1
// the ripple row adds s2[j] and c2[j-1]. At weight WIDTH there is no s2 bit;
// the row-1 carry c1[WIDTH-1], which row 2 had no column for, takes its
// place. The ripple row's carry in is 0 and its carry out is cout, so
// {cout, sum} == a + b + c + d for unsigned operands, WIDTH+2 bits in all.
//
// This is the row structure and bit wiring of the classic four-operand CSA;
// the only change from the classic form is the full adder cell. The ripple
// final stage is kept as in that form.
//
// Parameters: WIDTH, operand width (default 64; 8 is the other evaluated
// size). Timing: purely combinational, no clock, register or reset. The
// longest path is two full adders for the carry-save rows plus the WIDTH-long
// carry chain of the ripple row.
module mux_csa4 #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH:0]   sum,   // bits WIDTH..0 of a+b+c+d
  output logic             cout   // bit WIDTH+1 of a+b+c+d
);
  // The carry word of row 1 is cut to WIDTH-1 bits below, so at least two
  // bits are needed.
  if (WIDTH < 2) begin : g_width_check
    $error("mux_csa4: WIDTH must be at least 2");
  end

  logic [WIDTH-1:0] s1, c1;  // row 1: sum and carry words
  logic [WIDTH-1:0] s2, c2;  // row 2: sum and carry words
  logic [WIDTH-1:0] rx, ry;  // row 3 addends, rx[k] and ry[k] of weight 2^(k+1)

  csa_row #(.WIDTH(WIDTH)) u_row1 (
    .x (a),
    .y (b),
    .z (c),
    .s (s1),
    .co(c1)
  );

  csa_row #(.WIDTH(WIDTH)) u_row2 (
    .x (s1),
    .y (d),
    .z ({c1[WIDTH-2:0], 1'b0}),
    .s (s2),
    .co(c2)
  );

  // Weight 2^(k+1): row-2 sum bit k+1 (row-1 top carry at the top weight)
  // and row-2 carry bit k.
  assign rx = {c1[WIDTH-1], s2[WIDTH-1:1]};
  assign ry = c2;

  ripple_stage #(.WIDTH(WIDTH)) u_row3 (
    .x   (rx),
    .y   (ry),
    .cin (1'b0),
    .s   (sum[WIDTH:1]),
    .cout(cout)
  );

  assign sum[0] = s2[0];
endmodule
