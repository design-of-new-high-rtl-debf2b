// domino_propagate_xor: half-sum cell p = a XOR b in footed domino style.
//
// Two pull-down branches under one precharged node, one fed by the true and
// one by the complemented operand bits, with a clocked foot transistor and an
// output inverter. p is 0 while clk is low (precharge) and a XOR b while clk
// is high (evaluate). p is used only for the sum bits; the carry chains use
// the OR transmit signal instead. The complemented operands are formed inside
// the cell. The transistor drawing of this gate labels its branches in a way
// that would give XNOR; the XOR function stated for it is what is built here.
//
// Interface: clk, a, b, p. Timing: combinational, valid while clk is high.
module domino_propagate_xor (
  input  logic clk,
  input  logic a,
  input  logic b,
  output logic p
);

  logic a_n, b_n;
  logic differ;

  always_comb begin
    a_n    = ~a;
    b_n    = ~b;
    differ = (a & b_n) | (a_n & b);
    p      = clk & differ;
  end

endmodule
