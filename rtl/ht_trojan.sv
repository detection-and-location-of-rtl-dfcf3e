// ht_trojan: a model of a digital Hardware Trojan with a sequential trigger
// and an XOR payload, used to infect one sum path of the adder under test.
//
// Payload: target_ht = target ^ fired, one XOR gate with delay T_XOR. While
// the trigger is dormant the payload passes the target through unchanged, so
// the function of the host circuit is intact, but the path now holds one more
// gate and is T_XOR slower. That extra delay exists whether or not the Trojan
// has fired, which is what the path-delay detector exploits.
// Trigger: a 2-bit state (Q1:Q0) counts rising clock edges on which the rare
// condition &cond (all three watched signals high) holds; when the count reaches
// TRIG_COUNT the Trojan has fired and stays fired until rst_n (asynchronous,
// active low). The XOR payload follows the source design; the trigger condition
// and count are this design's own choice, since only a clocked trigger block is
// described.
`timescale 1ps/1ps
module ht_trojan
#(
  parameter int unsigned T_XOR      = ht_pkg::T_XOR_PS,
  parameter int unsigned TRIG_COUNT = ht_pkg::TRIG_COUNT_DEFAULT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] cond,
  input  logic       target,
  output logic       target_ht,
  output logic       fired
);
  localparam logic [1:0] FIRE_STATE = 2'(TRIG_COUNT);

  logic [1:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
    end else if ((&cond) && (state != FIRE_STATE)) begin
      state <= state + 2'd1;
    end
  end

  assign fired = (state == FIRE_STATE);

  assign #(T_XOR) target_ht = target ^ fired;

  initial begin
    assert (TRIG_COUNT >= 1 && TRIG_COUNT <= 3)
      else $error("ht_trojan: TRIG_COUNT must be 1..3 for a 2-bit trigger state");
  end
endmodule
