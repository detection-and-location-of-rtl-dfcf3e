// path_comparator: the multi-path XOR comparator of the detector.
//
// pulse = XOR of all N path outputs, one gate with inertial delay T_CMP.
// When N like paths carry the same value and switch together, the XOR stays 0
// (N even). If one path holds extra logic and switches later, the XOR output
// rises for the length of the skew: a pulse the sensing unit can catch. The
// XOR structure follows the source design; T_CMP is this design's choice and
// must stay below the skew to be detected, or the gate filters the pulse out.
// Combinational, no clock.
`timescale 1ps/1ps
module path_comparator
#(
  parameter int unsigned N     = 4,
  parameter int unsigned T_CMP = ht_pkg::T_CMP_PS
) (
  input  logic [N-1:0] path,
  output logic         pulse
);
  assign #(T_CMP) pulse = ^path;
endmodule
