// domino_propagate_or: carry-transmit cell t = a OR b in footed domino style.
//
// Two parallel nMOS (a, b) over a clocked foot discharge the precharged
// node; an output inverter drives t. t is 0 while clk is low (precharge) and
// a OR b while clk is high (evaluate). The OR form of the propagate signal is
// what the carry chains and the final carries c_i = t_i h_i use.
//
// Interface: clk, a, b, t. Timing: combinational, valid while clk is high.
module domino_propagate_or (
  input  logic clk,
  input  logic a,
  input  logic b,
  output logic t
);

  always_comb t = clk & (a | b);

endmodule
