// tb_ht_trojan: checks the Trojan model's payload delay, its dormant
// pass-through, its trigger count and its reset.
//
// While dormant, target_ht must equal target, T_XOR later. The rare condition
// (cond = 111) is then held for TRIG_COUNT-1 clock edges (not fired yet) and
// one more (fired), after which target_ht must be the inverse of target.
// Clock edges with the condition absent must not advance the trigger. Reset
// returns the Trojan to dormant.
`timescale 1ps/1ps
module tb_ht_trojan;
  localparam int unsigned T_XOR      = 40;
  localparam int unsigned TRIG_COUNT = 3;
  localparam int unsigned TCLK       = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] cond = '0;
  logic target = 1'b0, target_ht, fired;
  int checks = 0, failures = 0;

  ht_trojan #(.T_XOR(T_XOR), .TRIG_COUNT(TRIG_COUNT)) dut (.*);

  always #(TCLK / 2) clk = ~clk;

  task automatic check(input bit cond_ok, input string what);
    checks++;
    if (!cond_ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // toggle target and check the payload output after T_XOR
  task automatic toggle_and_check(input bit expect_inverted);
    target = ~target;
    #(T_XOR - 1);
    check(target_ht == (~target ^ expect_inverted), "payload output changed too early");
    #1;
    check(target_ht == (target ^ expect_inverted), "payload output wrong after T_XOR");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #100 rst_n = 1'b1;
    #100;
    check(!fired, "fired after reset");
    toggle_and_check(1'b0);
    toggle_and_check(1'b0);
    // edges with a partial condition do not count
    cond = 3'b110;
    repeat (5) @(posedge clk);
    #100;
    check(!fired, "fired on partial condition");
    // the rare condition for TRIG_COUNT-1 edges
    cond = 3'b111;
    repeat (TRIG_COUNT - 1) @(posedge clk);
    #100;
    check(!fired, "fired too early");
    toggle_and_check(1'b0);
    @(posedge clk);
    #100;
    check(fired, "not fired after TRIG_COUNT edges");
    cond = 3'b000;
    #100;
    check(target_ht == ~target, "payload does not invert when fired");
    toggle_and_check(1'b1);
    repeat (3) @(posedge clk);
    #100;
    check(fired, "fired state not held");
    rst_n = 1'b0;
    #100;
    check(!fired, "reset does not clear trigger");
    #100;
    check(target_ht == target, "payload not transparent after reset");
    rst_n = 1'b1;
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
