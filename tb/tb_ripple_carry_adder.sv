// tb_ripple_carry_adder: the adder under test, clean and with a Trojan.
//
// Two copies run on the same operands: one clean (HT_MASK = 0) and one with
// a Trojan on unit 1. Every operand pair (256 x 2 carries-in) must give the
// arithmetic sum and carry from the clean copy, and from the infected copy as
// well except for S1 inverted once its Trojan reports having fired (the sweep
// itself meets the trigger condition). The sum
// paths are timed for the test vector B = 0, Cin = 0, A stepping from 0000 to
// 1111: every clean sum bit switches 2*T_XOR after A, the infected bit T_XOR
// later. Finally the Trojan is fired (a1 = b1 = c1 = 1 for three clock edges)
// and the infected copy must now give a wrong sum bit 1.
`timescale 1ps/1ps
module tb_ripple_carry_adder;
  localparam int unsigned T_XOR = 40;
  localparam int unsigned TCLK  = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] a = '0, b = '0;
  logic cin = 1'b0;
  logic [3:0] s_clean, s_ht, fired_clean, fired_ht;
  logic cout_clean, cout_ht;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.WIDTH(4), .HT_MASK(4'b0000)) u_clean (
    .clk, .rst_n, .a, .b, .cin, .s(s_clean), .cout(cout_clean), .ht_fired(fired_clean));
  ripple_carry_adder #(.WIDTH(4), .HT_MASK(4'b0010)) u_ht (
    .clk, .rst_n, .a, .b, .cin, .s(s_ht), .cout(cout_ht), .ht_fired(fired_ht));

  always #(TCLK / 2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] sum;
    #100 rst_n = 1'b1;
    // function: all operands
    for (int v = 0; v < 512; v++) begin
      {cin, b, a} = 9'(v);
      #1000;
      sum = 5'(a) + 5'(b) + 5'(cin);
      check({cout_clean, s_clean} == sum, $sformatf("clean %0d+%0d+%0d", a, b, cin));
      // the sweep meets the trigger condition of unit 1; once fired, S1 is inverted
      check({cout_ht, s_ht} == (sum ^ {1'b0, fired_ht}),
            $sformatf("HT copy %0d+%0d+%0d (fired=%b)", a, b, cin, fired_ht));
    end
    // the trigger may have advanced during the sweep; restart it
    rst_n = 1'b0;
    #100 rst_n = 1'b1;
    // path timing for the equal-sum test vector
    {cin, b, a} = '0;
    #1000;
    a = 4'hF;
    #(2 * T_XOR - 1);
    check(s_clean == 4'h0 && s_ht == 4'h0, "sums changed before 2*T_XOR");
    #1;
    check(s_clean == 4'hF, "clean sums not all switched at 2*T_XOR");
    check(s_ht == 4'b1101, "infected copy: only bit 1 should lag");
    #(T_XOR - 1);
    check(s_ht == 4'b1101, "infected bit switched before 3*T_XOR");
    #1;
    check(s_ht == 4'hF, "infected bit not switched at 3*T_XOR");
    // fire the Trojan on unit 1: a1 = b1 = 1 and a carry into unit 1
    @(negedge clk);
    a = 4'b0011; b = 4'b0011; cin = 1'b0;
    repeat (2) @(posedge clk);
    #100;
    check(fired_ht == 4'b0000, "Trojan fired before the third edge");
    sum = 5'(a) + 5'(b) + 5'(cin);
    check({cout_ht, s_ht} == sum, "dormant Trojan changed the sum");
    @(posedge clk);
    #100;
    check(fired_ht == 4'b0010, "Trojan on unit 1 not fired");
    check(fired_clean == 4'b0000, "clean adder reports a Trojan");
    sum = 5'(a) + 5'(b) + 5'(cin);
    check({cout_clean, s_clean} == sum, "clean sum wrong");
    check(s_ht == (sum[3:0] ^ 4'b0010), "fired payload does not invert S1");
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
