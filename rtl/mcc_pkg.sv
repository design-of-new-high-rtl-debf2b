// mcc_pkg: sizes shared by the multi-output domino carry look-ahead adder.
//
// The adder is built around two independent Manchester carry chains, one
// for the even carries and one for the odd carries. A chain is limited to
// four stages (the usual length limit of a domino Manchester chain), so the
// basic adder block is twice that, eight bits wide. Both numbers come from
// the adder's design; wider versions (16, 32 bits) would need more than one
// block and are not part of it.
package mcc_pkg;

  // Stages in one Manchester carry chain.
  localparam int unsigned CHAIN_LEN = 4;

  // Width of the adder block: one even and one odd chain side by side.
  localparam int unsigned ADDER_WIDTH = 2 * CHAIN_LEN;

endpackage
