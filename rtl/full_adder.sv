// full_adder: one-bit adder unit of the ripple-carry adder under test.
//
// Sum S = A ^ B ^ Cin through two XOR gates, carry Cout = A&B | (A^B)&Cin
// through two ANDs and an OR. Each gate is a continuous assignment with an
// inertial delay (ps), so the sum path of every unit has the same nominal delay
// of two XORs; that equality is what the path comparators rely on. The unit
// itself is only named in the source design; the gate structure is the usual
// textbook one, and the delay values are this design's choice (see ht_pkg).
// Purely combinational: no clock, outputs settle 2*T_XOR (sum) and at most
// T_XOR+T_AND+T_OR (carry) after an input change.
`timescale 1ps/1ps
module full_adder
#(
  parameter int unsigned T_XOR = ht_pkg::T_XOR_PS,
  parameter int unsigned T_AND = ht_pkg::T_AND_PS,
  parameter int unsigned T_OR  = ht_pkg::T_OR_PS
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;   // propagate, a ^ b
  logic g;   // generate,  a & b
  logic t;   // carry passed on, p & cin

  assign #(T_XOR) p    = a ^ b;
  assign #(T_XOR) s    = p ^ cin;
  assign #(T_AND) g    = a & b;
  assign #(T_AND) t    = p & cin;
  assign #(T_OR)  cout = g | t;
endmodule
