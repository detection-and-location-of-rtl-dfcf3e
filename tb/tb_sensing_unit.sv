// tb_sensing_unit: the SR-latch sensor.
//
// A 40 ps pulse in the high phase of clk must raise error T_SENSE later and
// hold it until clk falls; error must then stay low through the low phase.
// A pulse in the low phase must not raise error. With no pulse at all, error
// stays low over many clock periods.
`timescale 1ps/1ps
module tb_sensing_unit;
  localparam int unsigned T_SENSE = 15;
  localparam int unsigned TCLK    = 2000;

  logic clk = 1'b0, pulse = 1'b0, error;
  int checks = 0, failures = 0;
  int err_rises = 0;

  sensing_unit #(.T_SENSE(T_SENSE)) dut (.*);

  always #(TCLK / 2) clk = ~clk;
  always @(posedge error) err_rises++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // quiet: no error for several cycles (the latch is cleared in the first low phase)
    @(negedge clk);
    repeat (5) @(posedge clk);
    #(TCLK / 2 - 1);
    check(err_rises == 0, "error without a pulse");
    // pulse in the high phase
    @(posedge clk);
    #200 pulse = 1'b1;
    #(T_SENSE - 1);
    check(error == 1'b0, "error before T_SENSE");
    #1;
    check(error == 1'b1, "error not raised by a pulse in the high phase");
    #(40 - T_SENSE) pulse = 1'b0;
    #500;
    check(error == 1'b1, "error not held after the pulse");
    @(negedge clk);
    #(T_SENSE + 1);
    check(error == 1'b0, "error not cleared when clk falls");
    // pulse in the low phase
    #200 pulse = 1'b1;
    #40 pulse = 1'b0;
    @(posedge clk);
    #500;
    check(error == 1'b0, "pulse in the low phase raised error");
    check(err_rises == 1, "unexpected number of error pulses");
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
