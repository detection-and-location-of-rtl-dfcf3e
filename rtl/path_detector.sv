// path_detector: multi-path Trojan detector, a comparator and a sensing unit.
//
// N paths of identical structure enter an N-input XOR comparator; its output
// drives the SR-latch sensing unit clocked by clk. If the paths are driven so
// that they all switch to the same value at the same moment (in the high phase
// of clk), a clean set of paths leaves Error at 0, while one path slowed by an
// inserted gate produces a pulse and Error goes to 1 until clk falls. With N=2
// it is the single-pair detector of a reference path against a suspect path.
// No golden circuit is needed: the paths are each other's reference. The
// comparator-plus-latch structure follows the source design; the gate delays
// are this design's choice.
`timescale 1ps/1ps
module path_detector
#(
  parameter int unsigned N       = 4,
  parameter int unsigned T_CMP   = ht_pkg::T_CMP_PS,
  parameter int unsigned T_SENSE = ht_pkg::T_SENSE_PS
) (
  input  logic         clk,
  input  logic [N-1:0] path,
  output logic         error
);
  logic pulse;

  path_comparator #(.N(N), .T_CMP(T_CMP)) u_cmp (
    .path  (path),
    .pulse (pulse)
  );

  sensing_unit #(.T_SENSE(T_SENSE)) u_sense (
    .clk   (clk),
    .pulse (pulse),
    .error (error)
  );

  // An XOR over an odd number of equal paths is 1 whenever they are all 1,
  // which the sensor would report as a Trojan.
  initial begin
    assert (N >= 2 && N % 2 == 0)
      else $error("path_detector: N must be even and at least 2");
  end
endmodule
