// sensing_unit: SR-latch sensor that turns a short comparator pulse into an
// Error flag.
//
// The source circuit is an inverter feeding a cross-coupled NAND pair whose
// second NAND is gated by CLK, with an output gate on Q and CLK. Its behaviour,
// written here as the equivalent level-sensitive latch:
//   CLK low : Q follows the comparator pulse (the latch is cleared between tests);
//   CLK high: a pulse sets Q, and Q holds 1 for the rest of the high phase.
// Error = Q and CLK, through a gate of delay T_SENSE, so Error rises shortly
// after a pulse that arrives while CLK is high and falls when CLK falls. A
// pulse during the low phase leaves Error at 0, so test vectors must be applied
// in the high phase. Choosing AND for the output gate is this design's reading:
// an XOR of Q and CLK would toggle with CLK even when no Trojan is present.
// The latch on q is intended (it is the sensor); tools report it as a latch.
`timescale 1ps/1ps
module sensing_unit
#(
  parameter int unsigned T_SENSE = ht_pkg::T_SENSE_PS
) (
  input  logic clk,
  input  logic pulse,
  output logic error
);
  logic set_n;     // inverter output, active-low set of the NAND latch
  logic q;         // latch output Q

  assign set_n = ~pulse;

  always_latch begin
    if (!clk || !set_n) begin
      q = ~set_n;
    end
  end

  assign #(T_SENSE) error = q & clk;
endmodule
