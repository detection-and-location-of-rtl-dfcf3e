// tb_locating_detector: the neighbour-pair locating detector.
//
// Four sum paths are driven from one test signal; path k is made 40 ps
// slower than the others. Read as Error1 Error2 Error3, the detector must
// give 100 for k = 0, 110 for k = 1, 011 for k = 2, 001 for k = 3 and 000
// when no path is slow, on both rising and falling steps of the paths.
`timescale 1ps/1ps
module tb_locating_detector;
  localparam int unsigned TCLK = 2000;
  localparam int unsigned D    = 80;
  localparam int unsigned SKEW = 40;

  logic clk = 1'b0, stim = 1'b0;
  logic [3:0] s;
  logic [2:0] error;
  logic [2:0] seen;
  int slow = -1;
  int checks = 0, failures = 0;

  // delayed copies of the test signal: nominal and one payload gate slower
  logic stim_fast, stim_slow;
  assign #(D)        stim_fast = stim;
  assign #(D + SKEW) stim_slow = stim;
  for (genvar i = 0; i < 4; i++) begin : g_path
    assign s[i] = (slow == i) ? stim_slow : stim_fast;
  end

  locating_detector #(.WIDTH(4)) dut (.clk, .s, .error);

  always #(TCLK / 2) clk = ~clk;

  // collect every error bit raised during a high phase
  always @(error) seen = seen | error;

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

  // expected {Error1, Error2, Error3} for a slow path k
  function automatic logic [2:0] code(input int k);
    case (k)
      0: return 3'b100;
      1: return 3'b110;
      2: return 3'b011;
      3: return 3'b001;
      default: return 3'b000;
    endcase
  endfunction

  task automatic step(input int k);
    @(posedge clk);
    seen = '0;
    #100 stim = ~stim;
    #(TCLK / 2 - 200);
    // error[0] is Error1, so reverse to print Error1 first
    check({seen[0], seen[1], seen[2]} == code(k),
          $sformatf("slow=%0d gave %b%b%b, expected %b", k, seen[0], seen[1], seen[2], code(k)));
    @(negedge clk);
    #100;
    check(error == '0, "errors not cleared in the low phase");
  endtask

  initial begin
    @(negedge clk);
    for (int k = -1; k < 4; k++) begin
      slow = k;
      step(k);
      step(k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
