// tb_ht_detect_top: end-to-end test of the adder with its Trojan detectors.
//
// Five copies of the design run side by side on the same inputs: a clean
// adder and one adder each with a Trojan in unit 0, 1, 2 and 3. The test runs
// in three phases.
//  1. Detection and location with the Trojans dormant: in the high phase of
//     clk, B = 0 and Cin = 0 while A steps between 0000 and 1111, so all sum
//     bits switch together. The clean copy must stay quiet; every infected
//     copy must raise detect_error and give its location code (Error1..3 =
//     100, 110, 011, 001). Errors must clear in the low phase.
//  2. Function: random operands, applied in the low phase, must give the
//     arithmetic sum in every copy (a fired Trojan's bit inverted).
//  3. Trigger: A = B = 1111, Cin = 1 makes every unit see its rare condition;
//     after three clock edges every Trojan has fired, its sum bit is inverted,
//     and the detectors still flag and locate it.
// Each mechanism (quiet clean design, detection, each location code, clearing
// in the low phase, correct sums, trigger firing, payload inversion, detection
// of a fired Trojan) is counted, and one that never happens counts a failure.
`timescale 1ps/1ps
module tb_ht_detect_top;
  localparam int unsigned TCLK = 2000;
  localparam int unsigned NCOPY = 5;             // copy 0 clean, copy k+1 infected in unit k

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] a = '0, b = '0;
  logic cin = 1'b0;

  logic [3:0] s        [NCOPY];
  logic       cout     [NCOPY];
  logic       det      [NCOPY];
  logic [2:0] loc      [NCOPY];
  logic [3:0] fired    [NCOPY];
  logic       det_seen [NCOPY];
  logic [2:0] loc_seen [NCOPY];

  int checks = 0, failures = 0;
  int n_quiet = 0, n_detect = 0, n_clear = 0, n_sum = 0;
  int n_fire = 0, n_payload = 0, n_detect_fired = 0;
  int n_code [4] = '{default: 0};

  ht_detect_top #(.WIDTH(4), .HT_MASK(4'b0000)) u_clean (
    .clk, .rst_n, .a, .b, .cin, .s(s[0]), .cout(cout[0]),
    .detect_error(det[0]), .locate_error(loc[0]), .ht_fired(fired[0]));
  for (genvar k = 0; k < 4; k++) begin : g_ht
    ht_detect_top #(.WIDTH(4), .HT_MASK(4'(1 << k))) u_dut (
      .clk, .rst_n, .a, .b, .cin, .s(s[k+1]), .cout(cout[k+1]),
      .detect_error(det[k+1]), .locate_error(loc[k+1]), .ht_fired(fired[k+1]));
  end

  always #(TCLK / 2) clk = ~clk;

  // accumulate every error raised during a high phase
  for (genvar c = 0; c < NCOPY; c++) begin : g_seen
    always @(det[c] or loc[c]) begin
      det_seen[c] = det_seen[c] | det[c];
      loc_seen[c] = loc_seen[c] | loc[c];
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
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Error1..Error3 code of a Trojan in unit k (bit 0 of locate_error is Error1)
  function automatic logic [2:0] code(input int k);
    case (k)
      0: return 3'b001;   // reads 100 as Error1 Error2 Error3
      1: return 3'b011;   // 110
      2: return 3'b110;   // 011
      3: return 3'b100;   // 001
      default: return 3'b000;
    endcase
  endfunction

  // apply new A early in the high phase, judge the detectors before clk falls
  task automatic test_step(input logic [3:0] new_a, input bit trojans_fired);
    @(posedge clk);
    for (int c = 0; c < NCOPY; c++) begin
      det_seen[c] = 1'b0;
      loc_seen[c] = '0;
    end
    #100 a = new_a;
    #(TCLK / 2 - 200);
    check(!det_seen[0] && loc_seen[0] == '0, "clean adder flagged");
    if (!det_seen[0] && loc_seen[0] == '0) n_quiet++;
    for (int k = 0; k < 4; k++) begin
      check(det_seen[k+1], $sformatf("Trojan in unit %0d not detected", k));
      check(loc_seen[k+1] == code(k),
            $sformatf("Trojan in unit %0d located as %b%b%b", k,
                      loc_seen[k+1][0], loc_seen[k+1][1], loc_seen[k+1][2]));
      if (det_seen[k+1]) n_detect++;
      if (det_seen[k+1] && trojans_fired) n_detect_fired++;
      if (loc_seen[k+1] == code(k)) n_code[k]++;
    end
    @(negedge clk);
    #(TCLK / 2 - 100);
    for (int c = 0; c < NCOPY; c++) begin
      check(!det[c] && loc[c] == '0, $sformatf("copy %0d: errors not cleared in low phase", c));
      if (!det[c] && loc[c] == '0) n_clear++;
    end
  endtask

  initial begin
    logic [4:0] sum;
    logic [3:0] mask;
    for (int c = 0; c < NCOPY; c++) begin
      det_seen[c] = 1'b0;
      loc_seen[c] = '0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // phase 1: detection and location, Trojans dormant
    b = '0; cin = 1'b0;
    for (int i = 0; i < 6; i++) test_step((i % 2 == 0) ? 4'hF : 4'h0, 1'b0);

    // phase 2: function with random operands
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      {cin, b, a} = 9'($urandom);
      #(TCLK / 2 - 100);
      sum = 5'(a) + 5'(b) + 5'(cin);
      for (int c = 0; c < NCOPY; c++) begin
        check({cout[c], s[c]} == (sum ^ {1'b0, fired[c]}),
              $sformatf("copy %0d: %0d+%0d+%0d gave %0d", c, a, b, cin, {cout[c], s[c]}));
        if ({cout[c], s[c]} == (sum ^ {1'b0, fired[c]})) n_sum++;
      end
    end

    // phase 3: fire every Trojan, then check payload and detection
    rst_n = 1'b0;
    #100 rst_n = 1'b1;
    @(negedge clk);
    a = 4'hF; b = 4'hF; cin = 1'b1;
    repeat (3) @(posedge clk);
    #100;
    sum = 5'(a) + 5'(b) + 5'(cin);
    check(fired[0] == '0, "clean adder reports a fired Trojan");
    for (int k = 0; k < 4; k++) begin
      mask = 4'(1 << k);
      check(fired[k+1] == mask, $sformatf("Trojan in unit %0d did not fire", k));
      if (fired[k+1] == mask) n_fire++;
      check(s[k+1] == (sum[3:0] ^ mask), $sformatf("payload of unit %0d does not invert", k));
      if (s[k+1] == (sum[3:0] ^ mask)) n_payload++;
    end
    check(s[0] == sum[3:0], "clean sum wrong");
    @(negedge clk);
    b = '0; cin = 1'b0; a = '0;
    for (int i = 0; i < 4; i++) test_step((i % 2 == 0) ? 4'hF : 4'h0, 1'b1);

    // every mechanism must have happened
    check(n_quiet > 0, "clean design never checked quiet");
    check(n_detect > 0, "no detection");
    for (int k = 0; k < 4; k++) check(n_code[k] > 0, $sformatf("location code of unit %0d never seen", k));
    check(n_clear > 0, "errors never cleared");
    check(n_sum > 0, "no sum checked");
    check(n_fire == 4, "not every Trojan fired");
    check(n_payload == 4, "not every payload inverted its bit");
    check(n_detect_fired > 0, "fired Trojan never detected");
    $display("mechanisms: quiet=%0d detect=%0d code100=%0d code110=%0d code011=%0d code001=%0d clear=%0d sum=%0d fire=%0d payload=%0d detect_fired=%0d",
             n_quiet, n_detect, n_code[0], n_code[1], n_code[2], n_code[3], n_clear, n_sum,
             n_fire, n_payload, n_detect_fired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
