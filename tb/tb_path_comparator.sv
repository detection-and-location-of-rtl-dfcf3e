// tb_path_comparator: the multi-path XOR comparator.
//
// Checks the XOR function over all 16 input values of a 4-path comparator,
// its delay T_CMP, and the pulse it makes when one of four paths switches
// 40 ps after the others (a pulse of that width, starting T_CMP after the
// first edge) against no pulse when all four switch together.
`timescale 1ps/1ps
module tb_path_comparator;
  localparam int unsigned T_CMP = 20;
  localparam int unsigned SKEW  = 40;

  logic [3:0] path = '0;
  logic pulse;
  int checks = 0, failures = 0;
  int rises = 0;
  time t_rise = 0, t_fall = 0;

  path_comparator #(.N(4), .T_CMP(T_CMP)) dut (.*);

  always @(posedge pulse) begin rises++; t_rise = $time; end
  always @(negedge pulse) t_fall = $time;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      path = 4'(v);
      #200;
      check(pulse == ^path, $sformatf("xor of %b", path));
    end
    path = '0;
    #200;
    // delay
    path = 4'b0001;
    #(T_CMP - 1);
    check(pulse == 1'b0, "output before T_CMP");
    #1;
    check(pulse == 1'b1, "output not changed at T_CMP");
    path = '0;
    #200;
    // all four switch together: no pulse
    rises = 0;
    path = 4'hF;
    #500;
    check(rises == 0, "pulse although all paths switched together");
    path = '0;
    #500;
    check(rises == 0, "pulse on the falling step");
    // one path late by SKEW
    path = 4'b0111;
    #(SKEW) path = 4'hF;
    #500;
    check(rises == 1, "no pulse for a late path");
    check(t_fall - t_rise == SKEW, "pulse width differs from the skew");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
