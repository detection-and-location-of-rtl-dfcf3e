// tb_full_adder: exhaustive check of the one-bit adder unit and of its sum
// and carry path delays.
//
// All eight input combinations are applied; sum and carry are compared with
// the arithmetic a+b+cin once the outputs have settled. The sum path delay is
// then measured: from all-zero inputs, raising a must leave s unchanged one
// picosecond before 2*T_XOR and changed at 2*T_XOR, and raising b and cin to
// make a carry must move cout by T_XOR+T_AND+T_OR at the latest.
`timescale 1ps/1ps
module tb_full_adder;
  localparam int unsigned T_XOR = 40;
  localparam int unsigned T_AND = 25;
  localparam int unsigned T_OR  = 25;

  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder #(.T_XOR(T_XOR), .T_AND(T_AND), .T_OR(T_OR)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
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
    logic [1:0] sum;
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #500;
      sum = 2'(a) + 2'(b) + 2'(cin);
      check(s == sum[0], $sformatf("sum for a=%0b b=%0b cin=%0b", a, b, cin));
      check(cout == sum[1], $sformatf("carry for a=%0b b=%0b cin=%0b", a, b, cin));
    end
    // sum path delay: exactly two XOR gates
    {a, b, cin} = 3'b000;
    #500;
    a = 1'b1;
    #(2 * T_XOR - 1);
    check(s == 1'b0, "sum changed before 2*T_XOR");
    #1;
    check(s == 1'b1, "sum not changed at 2*T_XOR");
    // carry through the propagate path: cin rises with a=1, b=0
    #500;
    cin = 1'b1;
    #(T_AND + T_OR - 1);
    check(cout == 1'b0, "carry changed before T_AND+T_OR");
    #1;
    check(cout == 1'b1, "carry not changed at T_AND+T_OR");
    #500;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
