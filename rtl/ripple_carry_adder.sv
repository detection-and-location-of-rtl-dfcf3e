// ripple_carry_adder: the circuit under test, a WIDTH-bit ripple-carry adder
// built from full_adder units, Cin into unit 0 and each carry into the next.
//
// HT_MASK marks the units whose sum output passes through a Trojan (ht_trojan)
// before it leaves the adder: bit i set puts a payload XOR on path S_i. The
// default infects the least significant unit, as in the reference experiment;
// 0 gives the clean adder. The Trojans watch their unit's own a, b and cin and
// share clk/rst_n. ht_fired reports each Trojan's trigger (0 for clean units)
// so that a testbench can see when the payload is active.
// Combinational from a/b/cin to s/cout; an infected sum path is T_XOR slower.
`timescale 1ps/1ps
module ripple_carry_adder
#(
  parameter int unsigned        WIDTH   = 4,
  parameter logic [WIDTH-1:0]   HT_MASK = WIDTH'(1),
  parameter int unsigned        T_XOR   = ht_pkg::T_XOR_PS,
  parameter int unsigned        T_AND   = ht_pkg::T_AND_PS,
  parameter int unsigned        T_OR    = ht_pkg::T_OR_PS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout,
  output logic [WIDTH-1:0] ht_fired
);
  logic [WIDTH:0]   c;       // c[i] is the carry into unit i
  logic [WIDTH-1:0] s_fa;    // sum straight out of each unit

  assign c[0] = cin;
  assign cout = c[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_unit
    full_adder #(.T_XOR(T_XOR), .T_AND(T_AND), .T_OR(T_OR)) u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (c[i]),
      .s    (s_fa[i]),
      .cout (c[i+1])
    );

    if (HT_MASK[i]) begin : g_ht
      ht_trojan #(.T_XOR(T_XOR)) u_ht (
        .clk       (clk),
        .rst_n     (rst_n),
        .cond      ({a[i], b[i], c[i]}),
        .target    (s_fa[i]),
        .target_ht (s[i]),
        .fired     (ht_fired[i])
      );
    end else begin : g_clean
      assign s[i]        = s_fa[i];
      assign ht_fired[i] = 1'b0;
    end
  end
endmodule
