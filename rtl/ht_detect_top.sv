// ht_detect_top: a 4-bit ripple-carry adder with path-delay Trojan detection
// and location built beside it.
//
// The adder (ripple_carry_adder) may hold a Trojan on any sum path (HT_MASK,
// default: the least significant unit). Its sum paths S0..S3 feed both
//   - a multi-path detector (path_detector, N = WIDTH): one XOR over all sums
//     and one sensing latch, giving detect_error, and
//   - a locating detector (locating_detector): neighbour-pair detectors giving
//     locate_error, bit 0 = Error1 (S0/S1) ... bit WIDTH-2 = Error3 (S2/S3).
// Test procedure: in the high phase of clk, switch the inputs so that every
// sum bit changes to the same value at once (for example B = 0, Cin = 0 and A
// stepping between all-zeros and all-ones). Clean paths switch together and
// the Error outputs stay 0; an infected path switches one payload-gate later
// and the detectors flag it before clk falls, whether or not the Trojan has
// fired. With operands whose sum bits differ the XOR comparators see unequal
// levels and flag too, so the Error outputs only mean something for such test
// vectors. Both detectors on one adder is this design's arrangement; the two
// are shown as separate experiments in the source design.
`timescale 1ps/1ps
module ht_detect_top
#(
  parameter int unsigned      WIDTH   = 4,
  parameter logic [WIDTH-1:0] HT_MASK = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout,
  output logic             detect_error,
  output logic [WIDTH-2:0] locate_error,
  output logic [WIDTH-1:0] ht_fired
);
  ripple_carry_adder #(.WIDTH(WIDTH), .HT_MASK(HT_MASK)) u_rca (
    .clk      (clk),
    .rst_n    (rst_n),
    .a        (a),
    .b        (b),
    .cin      (cin),
    .s        (s),
    .cout     (cout),
    .ht_fired (ht_fired)
  );

  path_detector #(.N(WIDTH)) u_detect (
    .clk   (clk),
    .path  (s),
    .error (detect_error)
  );

  locating_detector #(.WIDTH(WIDTH)) u_locate (
    .clk   (clk),
    .s     (s),
    .error (locate_error)
  );
endmodule
