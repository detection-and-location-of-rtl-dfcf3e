// tb_path_detector: the multi-path detector (comparator + sensing latch).
//
// Four paths are driven from one test signal, each through its own delay.
// With equal delays every step of the test signal (applied in the high phase
// of clk) must leave error low; when one path is 40 ps slower, every step
// must raise error within the high phase, and error must be low again in the
// following low phase. The number of detections must match the number of
// steps made with a slow path.
`timescale 1ps/1ps
module tb_path_detector;
  localparam int unsigned TCLK = 2000;
  localparam int unsigned D    = 80;   // nominal path delay
  localparam int unsigned SKEW = 40;   // one payload gate

  logic clk = 1'b0, stim = 1'b0;
  logic [3:0] path;
  logic error;
  int slow = -1;           // which path is slow, -1 for none
  int checks = 0, failures = 0;
  int detections = 0;

  // delayed copies of the test signal
  // delayed copies of the test signal: nominal and one payload gate slower
  logic stim_fast, stim_slow;
  assign #(D)        stim_fast = stim;
  assign #(D + SKEW) stim_slow = stim;
  for (genvar i = 0; i < 4; i++) begin : g_path
    assign path[i] = (slow == i) ? stim_slow : stim_fast;
  end

  path_detector #(.N(4)) dut (.clk, .path, .error);

  always #(TCLK / 2) clk = ~clk;
  always @(posedge error) detections++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
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

  // one test step: toggle the stimulus early in the high phase, look before clk falls
  task automatic step(input bit expect_err);
    @(posedge clk);
    #100 stim = ~stim;
    #(TCLK / 2 - 200);
    check(error == expect_err, $sformatf("error=%0b, expected %0b (slow=%0d)", error, expect_err, slow));
    @(negedge clk);
    #100;
    check(error == 1'b0, "error not cleared in the low phase");
  endtask

  initial begin
    @(negedge clk);
    for (int k = 0; k < 4; k++) step(1'b0);
    for (int p = 0; p < 4; p++) begin
      slow = p;
      step(1'b1);
      step(1'b1);
    end
    slow = -1;
    for (int k = 0; k < 4; k++) step(1'b0);
    check(detections == 8, $sformatf("%0d detections, expected 8", detections));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
