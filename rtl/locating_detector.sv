// locating_detector: finds which adder unit carries a Trojan.
//
// WIDTH-1 two-input path detectors, each comparing neighbouring sum paths:
// error[i] (Error i+1) compares S_i with S_(i+1). A slow path S_k upsets the
// detectors on both sides of it, so reading Error1..Error3 left to right the
// infected unit of a 4-bit adder is coded 100 (unit 0), 110 (unit 1),
// 011 (unit 2) and 001 (unit 3). Pairing and codes follow the source design.
// Timing as in path_detector: drive all sums to switch together while clk is
// high and read error before clk falls.
`timescale 1ps/1ps
module locating_detector
#(
  parameter int unsigned WIDTH   = 4,
  parameter int unsigned T_CMP   = ht_pkg::T_CMP_PS,
  parameter int unsigned T_SENSE = ht_pkg::T_SENSE_PS
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] s,
  output logic [WIDTH-2:0] error
);
  for (genvar i = 0; i < WIDTH - 1; i++) begin : g_pair
    path_detector #(.N(2), .T_CMP(T_CMP), .T_SENSE(T_SENSE)) u_det (
      .clk   (clk),
      .path  (s[i+1:i]),
      .error (error[i])
    );
  end
endmodule
