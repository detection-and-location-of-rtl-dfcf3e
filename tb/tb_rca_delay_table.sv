// tb_rca_delay_table: path delays of the 4-bit adder with and without a
// Trojan, the comparison behind the detector.
//
// Five adders run on the same inputs: clean, and infected in unit 0..3. Two
// transitions are timed by recording when each output last changed:
//  - equal-sum step (B = 0, Cin = 0, A 0000 -> 1111): every sum path takes
//    2*T_XOR, an infected one T_XOR more;
//  - carry ripple (A = 1111, B = 0000, Cin 0 -> 1): S_i settles after
//    T_XOR + i*(T_AND+T_OR), Cout after WIDTH*(T_AND+T_OR), and an infected S_i
//    T_XOR later.
// The worst-case (slowest output) delay of each copy is printed in a table.
// It grows only when the infected unit's sum becomes the slowest output, so a
// single payload gate off the critical path leaves the worst case unchanged,
// which is why the detector compares individual paths rather than the
// worst-case delay.
`timescale 1ps/1ps
module tb_rca_delay_table;
  localparam int unsigned T_XOR = 40;
  localparam int unsigned T_AND = 25;
  localparam int unsigned T_OR  = 25;
  localparam int unsigned NCOPY = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] a = '0, b = '0;
  logic cin = 1'b0;
  logic [3:0] s     [NCOPY];
  logic       cout  [NCOPY];
  logic [3:0] fired [NCOPY];
  time t_s    [NCOPY][4];
  time t_cout [NCOPY];
  time t0;
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NCOPY; c++) begin : g_copy
    logic [3:0] s_c;
    logic       cout_c;
    ripple_carry_adder #(
      .WIDTH(4), .HT_MASK((c == 0) ? 4'b0000 : 4'(1 << (c - 1))),
      .T_XOR(T_XOR), .T_AND(T_AND), .T_OR(T_OR)
    ) u_rca (
      .clk, .rst_n, .a, .b, .cin, .s(s_c), .cout(cout_c), .ht_fired(fired[c]));
    assign s[c]    = s_c;
    assign cout[c] = cout_c;
    // time of the last change of each output bit
    logic [3:0] s_prev    = '0;
    logic       cout_prev = 1'b0;
    always @(s_c or cout_c) begin
      for (int i = 0; i < 4; i++)
        if (s_c[i] != s_prev[i]) t_s[c][i] = $time;
      if (cout_c != cout_prev) t_cout[c] = $time;
      s_prev    = s_c;
      cout_prev = cout_c;
    end
  end

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

  // expected delay of S_i after the step, for copy c (0 clean, k+1 infected in k)
  function automatic time expect_s(input int c, input int i, input time base);
    return base + ((c == i + 1) ? T_XOR : 0);
  endfunction

  initial begin
    time worst [NCOPY];
    time d;
    #100 rst_n = 1'b1;   // clk stays low: triggers never advance
    // equal-sum step
    #1000 t0 = $time;
    a = 4'hF;
    #1000;
    for (int c = 0; c < NCOPY; c++)
      for (int i = 0; i < 4; i++) begin
        d = t_s[c][i] - t0;
        check(d == expect_s(c, i, 2 * T_XOR),
              $sformatf("copy %0d S%0d step delay %0t", c, i, d));
      end
    // carry ripple
    b = '0;
    #1000 t0 = $time;
    cin = 1'b1;
    #1000;
    for (int c = 0; c < NCOPY; c++) begin
      worst[c] = t_cout[c] - t0;
      check(worst[c] == 4 * (T_AND + T_OR), $sformatf("copy %0d Cout delay %0t", c, worst[c]));
      for (int i = 0; i < 4; i++) begin
        d = t_s[c][i] - t0;
        check(d == expect_s(c, i, T_XOR + i * (T_AND + T_OR)),
              $sformatf("copy %0d S%0d ripple delay %0t", c, i, d));
        if (d > worst[c]) worst[c] = d;
      end
    end
    $display("adder           worst-case delay (ps)");
    for (int c = 0; c < NCOPY; c++)
      $display("%-15s %0t", (c == 0) ? "no Trojan" : $sformatf("Trojan unit %0d", c - 1), worst[c]);
    check(worst[1] == worst[0], "Trojan in unit 0 should not change the worst case");
    check(worst[4] == 2 * T_XOR + 3 * (T_AND + T_OR),
          "Trojan in unit 3 should lengthen the worst case");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
