// domino_generate: carry-generate cell g = a AND b in footed domino style.
//
// In the transistor circuit a clocked pMOS precharges the dynamic node while
// clk is low, and a series nMOS stack a, b, clk discharges it while clk is
// high; a keeper holds the node and an output inverter drives g. At the
// logic level this is: g is 0 throughout the precharge phase (clk = 0) and
// a AND b throughout the evaluate phase (clk = 1). The keeper has no logic
// function and is not modelled.
//
// Interface: clk (precharge/evaluate phase), a, b (operand bits), g.
// Timing: combinational; a and b must be stable before clk rises, as for any
// domino gate.
module domino_generate (
  input  logic clk,
  input  logic a,
  input  logic b,
  output logic g
);

  always_comb g = clk & a & b;

endmodule
