// odd_carry_chain: multi-output domino Manchester chain for the odd
// pseudo-carries h_1, h_3, h_5, h_7.
//
// Same structure as the even chain, but with the carry-in c_-1 pulling down
// the foot node and one pass transistor per stage, LEN stages in all:
//
//   h[0] = gg[0] + pp[0] c_-1
//   h[k] = gg[k] + pp[k] h[k-1]      k = 1 .. LEN-1
//
// Index k stands for bit 2k+1 of the adder. The last node is h_7; the
// adder's carry-out c_7 = t_7 h_7 is formed in the sum stage. All outputs
// read 0 while clk is low (precharge).
//
// Interface: clk; cin (chain foot); gg, pp, h, each LEN bits.
// Timing: combinational; the worst path runs from cin through all LEN pass
// stages to h[LEN-1]. It evaluates in parallel with the even chain.
module odd_carry_chain #(
  parameter int unsigned LEN = mcc_pkg::CHAIN_LEN
) (
  input  logic           clk,
  input  logic           cin,
  input  logic [LEN-1:0] gg,
  input  logic [LEN-1:0] pp,
  output logic [LEN-1:0] h
);

  // One Manchester stage per node: discharge through its own generate or
  // through the pass transistor from the node below.
  assign h[0] = clk & (gg[0] | (pp[0] & cin));
  for (genvar k = 1; k < LEN; k++) begin : g_stage
    assign h[k] = clk & (gg[k] | (pp[k] & h[k-1]));
  end

  initial begin
    assert (LEN >= 1) else $error("odd_carry_chain: LEN must be at least 1");
  end

endmodule
