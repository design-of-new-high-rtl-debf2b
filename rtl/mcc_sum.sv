// mcc_sum: true carries and sum bits from the pseudo-carries.
//
// The chains deliver Ling-style pseudo-carries h_i = g_i + c_(i-1). The true
// carry is c_i = t_i h_i (t_i = a_i OR b_i) and each sum bit is the half-sum
// XOR the carry into that bit:
//
//   c_i = t_i h_i
//   s_0 = p_0 XOR c_-1,   s_i = p_i XOR c_(i-1)
//   cout = c_(WIDTH-1)
//
// The sum equation is the adder's own; the c_i = t_i h_i conversion follows
// from the Ling form. Gating every output with clk, so that the whole adder
// reads 0 in precharge, is this design's choice.
//
// Interface: clk; p, t, h (bit order, h interleaved even/odd); cin;
// c (all carries: the adder is multi-output), s, cout.
// Timing: combinational.
module mcc_sum #(
  parameter int unsigned WIDTH = mcc_pkg::ADDER_WIDTH
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] t,
  input  logic [WIDTH-1:0] h,
  input  logic             cin,
  output logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  always_comb begin
    c    = {WIDTH{clk}} & t & h;
    s[0] = clk & (p[0] ^ cin);
    for (int unsigned i = 1; i < WIDTH; i++)
      s[i] = clk & (p[i] ^ c[i-1]);
    cout = c[WIDTH-1];
  end

endmodule
