// even_carry_chain: multi-output domino Manchester chain for the even
// pseudo-carries h_0, h_2, h_4, h_6.
//
// LEN precharged nodes are linked by pass transistors gated by the pair
// transmits pp; each node has a pull-down gated by its pair generate gg and an
// output inverter, so every node of the chain is an output. The foot node has
// only the gg[0] pull-down (no carry-in transistor). What the chain evaluates:
//
//   h[0] = gg[0]
//   h[k] = gg[k] + pp[k] h[k-1]      k = 1 .. LEN-1
//
// Index k stands for bit 2k of the adder. While clk is low all nodes are
// precharged and every h reads 0. LEN = 4 is the chain length of the design.
//
// Interface: clk; gg[LEN-1:0]; pp[LEN-1:1]; h[LEN-1:0].
// Timing: combinational; the worst path runs from gg[0] through LEN-1 pass
// stages to h[LEN-1].
module even_carry_chain #(
  parameter int unsigned LEN = mcc_pkg::CHAIN_LEN
) (
  input  logic           clk,
  input  logic [LEN-1:0] gg,
  input  logic [LEN-1:1] pp,
  output logic [LEN-1:0] h
);

  // One Manchester stage per node: discharge through its own generate or
  // through the pass transistor from the node below.
  assign h[0] = clk & gg[0];
  for (genvar k = 1; k < LEN; k++) begin : g_stage
    assign h[k] = clk & (gg[k] | (pp[k] & h[k-1]));
  end

  initial begin
    assert (LEN >= 2) else $error("even_carry_chain: LEN must be at least 2");
  end

endmodule
