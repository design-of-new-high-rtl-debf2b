// mcc8_adder: 8-bit multi-output domino carry look-ahead adder with separate
// even and odd Manchester carry chains.
//
// A domino Manchester chain is kept to four stages, so an ordinary design
// ripples 4-bit chains one after the other. Here an 8-bit block is still
// served by 4-stage chains, but two of them work side by side: Ling-style
// pseudo-carries h_i = g_i + c_(i-1) depend only on h_(i-2), so the even
// pseudo-carries (h0, h2, h4, h6) and the odd ones (h1, h3, h5, h7) are
// independent. The datapath, all in the same clk phase:
//
//   1. per bit: g_i = a_i b_i, p_i = a_i XOR b_i, t_i = a_i + b_i
//      (domino_generate, domino_propagate_xor, domino_propagate_or)
//   2. pair terms gg_i = g_i + g_(i-1), pp_i = t_(i-1) t_(i-2), carry-in
//      folded in at bits 0 and 1 (ling_pair_terms)
//   3. even_carry_chain and odd_carry_chain evaluate in parallel
//   4. c_i = t_i h_i, s_i = p_i XOR c_(i-1) (mcc_sum)
//
// clk is the domino phase, not a register clock: while clk is low every
// output (s, c, cout) reads 0 (precharge); while clk is high they give the
// sum of a, b and cin (evaluate). There are no registers. Every carry
// c_0..c_7 is an output, as in a multi-output gate. The bit cells, the
// chains and the sum equation follow the adder's design; the pair-term
// reading of the chain equations and the gating of the sum stage are this
// design's own. WIDTH must be even; 8 is the design's size.
//
// Interface: clk, a, b, cin in; s, c, cout out.
// Timing: combinational; operands must be stable before clk rises and the
// result is read before clk falls.
module mcc8_adder #(
  parameter int unsigned WIDTH = mcc_pkg::ADDER_WIDTH
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c,
  output logic             cout
);

  localparam int unsigned HALF = WIDTH / 2;

  logic [WIDTH-1:0] g, p, t;
  logic [WIDTH-1:0] gg;
  logic [WIDTH-1:1] pp;
  logic [WIDTH-1:0] h;

  logic [HALF-1:0] gg_even, gg_odd, pp_odd, h_even, h_odd;
  logic [HALF-1:1] pp_even;

  // Stage 1: bit-level domino cells.
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    domino_generate      u_gen (.clk(clk), .a(a[i]), .b(b[i]), .g(g[i]));
    domino_propagate_xor u_pxr (.clk(clk), .a(a[i]), .b(b[i]), .p(p[i]));
    domino_propagate_or  u_por (.clk(clk), .a(a[i]), .b(b[i]), .t(t[i]));
  end

  // Stage 2: two-bit group terms.
  ling_pair_terms #(.WIDTH(WIDTH)) u_pairs (
    .clk(clk), .g(g), .t(t), .cin(cin), .gg(gg), .pp(pp)
  );

  // Split the terms between the chains: bit 2k to the even chain, bit 2k+1
  // to the odd chain.
  always_comb begin
    for (int unsigned k = 0; k < HALF; k++) begin
      gg_even[k] = gg[2*k];
      gg_odd[k]  = gg[2*k+1];
      pp_odd[k]  = pp[2*k+1];
    end
    for (int unsigned k = 1; k < HALF; k++)
      pp_even[k] = pp[2*k];
  end

  // Stage 3: the two chains, side by side.
  even_carry_chain #(.LEN(HALF)) u_even (
    .clk(clk), .gg(gg_even), .pp(pp_even), .h(h_even)
  );

  odd_carry_chain #(.LEN(HALF)) u_odd (
    .clk(clk), .cin(cin), .gg(gg_odd), .pp(pp_odd), .h(h_odd)
  );

  always_comb begin
    for (int unsigned k = 0; k < HALF; k++) begin
      h[2*k]   = h_even[k];
      h[2*k+1] = h_odd[k];
    end
  end

  // Stage 4: carries and sum.
  mcc_sum #(.WIDTH(WIDTH)) u_sum (
    .clk(clk), .p(p), .t(t), .h(h), .cin(cin), .c(c), .s(s), .cout(cout)
  );

  initial begin
    assert (WIDTH >= 4 && WIDTH % 2 == 0)
      else $error("mcc8_adder: WIDTH must be even and at least 4");
  end

endmodule
