// ht_pkg: shared timing constants of the path-delay Trojan detector.
//
// Every gate in this design carries an inertial delay, written as `#` on a
// continuous assignment. Synthesis ignores these delays; simulation with
// timing enabled honours them, which is what makes the path-delay mechanism
// visible: a path that holds one extra gate (a Trojan payload) switches later
// than a like path without it, and the comparator turns that skew into a pulse.
// All values are in picoseconds. None of them are published figures for this
// detector; they are plausible gate delays chosen so that the comparator and
// sensing gates are faster than one payload XOR (a pulse narrower than a gate's
// inertial delay is swallowed by that gate).
`timescale 1ps/1ps
package ht_pkg;
  // Two-input XOR (adder sum gates and the Trojan payload).
  localparam int unsigned T_XOR_PS   = 40;
  // Two-input AND and OR of the carry logic.
  localparam int unsigned T_AND_PS   = 25;
  localparam int unsigned T_OR_PS    = 25;
  // Multi-path XOR comparator in front of each sensing latch.
  localparam int unsigned T_CMP_PS   = 20;
  // Output gate of the sensing unit (Error = Q and CLK).
  localparam int unsigned T_SENSE_PS = 15;
  // Number of times the Trojan's rare condition must be seen before it fires.
  localparam int unsigned TRIG_COUNT_DEFAULT = 3;
endpackage
