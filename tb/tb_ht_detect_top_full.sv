// tb_ht_detect_top_full: the design at its default parameters (4-bit adder,
// Trojan in the least significant unit) through one complete test.
//
// After reset the equal-sum test vector (B = 0, Cin = 0, A stepping between
// 0000 and 1111 in the high phase of clk) must raise detect_error and give the
// location code Error1..3 = 100 on each step, with the sums still correct.
// Random operands must then add correctly while the Trojan is dormant (or with
// S0 inverted once it has fired). Finally the Trojan is fired (a0 = b0 = cin = 1
// for three clock edges): S0 must be inverted and the Trojan still detected.
`timescale 1ps/1ps
module tb_ht_detect_top_full;
  localparam int unsigned TCLK = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] a = '0, b = '0;
  logic cin = 1'b0;
  logic [3:0] s, ht_fired;
  logic cout, detect_error;
  logic [2:0] locate_error;
  logic det_seen = 1'b0;
  logic [2:0] loc_seen = '0;
  int checks = 0, failures = 0;

  ht_detect_top dut (.*);

  always #(TCLK / 2) clk = ~clk;

  always @(detect_error or locate_error) begin
    det_seen = det_seen | detect_error;
    loc_seen = loc_seen | locate_error;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic test_step(input logic [3:0] new_a, input logic [3:0] expect_s);
    @(posedge clk);
    det_seen = 1'b0;
    loc_seen = '0;
    #100 a = new_a;
    #(TCLK / 2 - 200);
    check(det_seen, "Trojan not detected");
    check({loc_seen[0], loc_seen[1], loc_seen[2]} == 3'b100,
          $sformatf("location %b%b%b, expected 100", loc_seen[0], loc_seen[1], loc_seen[2]));
    check(s == expect_s, $sformatf("sum %b, expected %b", s, expect_s));
    @(negedge clk);
    #100;
    check(!detect_error && locate_error == '0, "errors not cleared in the low phase");
  endtask

  initial begin
    logic [4:0] sum;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 4; i++) test_step((i % 2 == 0) ? 4'hF : 4'h0, (i % 2 == 0) ? 4'hF : 4'h0);
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      {cin, b, a} = 9'($urandom);
      #(TCLK / 2 - 100);
      sum = 5'(a) + 5'(b) + 5'(cin);
      check({cout, s} == (sum ^ {4'b0, ht_fired[0]}), $sformatf("%0d+%0d+%0d", a, b, cin));
    end
    rst_n = 1'b0;
    #100 rst_n = 1'b1;
    @(negedge clk);
    a = 4'b0001; b = 4'b0001; cin = 1'b1;
    repeat (3) @(posedge clk);
    #100;
    check(ht_fired == 4'b0001, "Trojan did not fire");
    check(s == 4'b0010, "payload did not invert S0");   // 1+1+1 = 3 -> 0011, S0 inverted
    @(negedge clk);
    a = '0; b = '0; cin = 1'b0;
    // fired: S0 now reads ~A0, so the sums differ and both detectors flag
    for (int i = 0; i < 2; i++) test_step((i % 2 == 0) ? 4'hF : 4'h0, (i % 2 == 0) ? 4'hE : 4'h1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
