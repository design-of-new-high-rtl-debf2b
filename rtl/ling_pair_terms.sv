// ling_pair_terms: two-bit group terms that let the even and odd carries be
// computed by two independent carry chains.
//
// The adder works with Ling-style pseudo-carries h_i = g_i + c_(i-1) instead
// of the true carries c_i. Since c_i = t_i h_i (with t_i = a_i OR b_i), a
// pseudo-carry depends only on the one two positions below it:
//
//   h_i = (g_i + g_(i-1)) + t_(i-1) t_(i-2) h_(i-2)
//       =  gg[i]          + pp[i]           h_(i-2)
//
// so the even pseudo-carries form one chain and the odd ones another. At the
// bottom the carry-in c_-1 enters: h_0 = g_0 + c_-1 (folded into gg[0], since
// the even chain has no carry-in transistor) and h_1 = (g_1 + g_0) + t_0 c_-1
// (pp[1] = t_0, the odd chain has c_-1 at its foot). The pair form follows
// the adder's Ling-like carry equations; how the terms are gated is this
// design's own choice: simple domino AND/OR terms that read 0 in precharge.
//
// Interface: clk; g, t per bit; cin; gg[WIDTH-1:0] and pp[WIDTH-1:1] per chain
// stage, in bit order (even indices feed the even chain, odd the odd chain).
// Timing: combinational.
module ling_pair_terms #(
  parameter int unsigned WIDTH = mcc_pkg::ADDER_WIDTH
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] g,
  input  logic [WIDTH-1:0] t,
  input  logic             cin,
  output logic [WIDTH-1:0] gg,
  output logic [WIDTH-1:1] pp
);

  always_comb begin
    gg[0] = clk & (g[0] | cin);
    gg[1] = clk & (g[1] | g[0]);
    pp[1] = clk & t[0];
    for (int unsigned i = 2; i < WIDTH; i++) begin
      gg[i] = clk & (g[i] | g[i-1]);
      pp[i] = clk & t[i-1] & t[i-2];
    end
  end

  initial begin
    assert (WIDTH >= 2 && WIDTH % 2 == 0)
      else $error("ling_pair_terms: WIDTH must be even and at least 2");
  end

endmodule
