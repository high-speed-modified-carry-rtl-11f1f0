// mux_full_adder: one-bit full adder made of three 2-to-1 multiplexers.
//
// The adder never computes a sum with XOR gates directly. Instead:
//   M1: p    = x ? ~y : y          -- x xor y, selected by x
//   M2: sum  = p ? ~cin : cin      -- x xor y xor cin, selected by p
//   M3: cout = p ? cin : x         -- if x == y the carry is x (= y),
//                                     otherwise it is the incoming carry
// p is the propagate signal: it is the select of both output multiplexers, so
// sum and carry come out of one multiplexer delay each once p is settled.
//
// M1 and M2 are wired as in the published block diagram. For M3 the data
// inputs and select follow the adder's equations and truth table (select
// x xor y, x on 0, cin on 1); that diagram's M3 wiring as drawn would not
// give a full adder. The inverted data inputs (~y, ~cin) are plain inverters.
//
// Ports: x, y, cin in; sum, cout out. Timing: combinational, no state.
module mux_full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;  // x xor y, output of M1

  mux21 u_m1 (.a(y),   .b(~y),   .s(x), .y(p));
  mux21 u_m2 (.a(cin), .b(~cin), .s(p), .y(sum));
  mux21 u_m3 (.a(x),   .b(cin),  .s(p), .y(cout));
endmodule
