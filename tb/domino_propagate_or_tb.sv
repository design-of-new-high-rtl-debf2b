// domino_propagate_or_tb: exhaustive self-checking test of domino_propagate_or.
//
// Applies every combination of clk, a and b several times in random order
// and compares t with a || b, worked out here from the
// operand bits: 0 whenever clk is low (precharge), the logic function when
// clk is high (evaluate). A watchdog ends the run with a failure if it hangs.
module domino_propagate_or_tb;

  logic clk, a, b, t;
  int   checks   = 0;
  int   failures = 0;

  domino_propagate_or dut (.clk(clk), .a(a), .b(b), .t(t));

  task automatic apply(input logic [2:0] v);
    logic expected;
    {clk, a, b} = v;
    #1;
    expected = clk ? (a || b) : 1'b0;
    checks++;
    if (t !== expected) begin
      failures++;
      $display("FAIL clk=%0b a=%0b b=%0b: t=%0b expected %0b", clk, a, b, t, expected);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) apply(3'(v));
    for (int n = 0; n < 64; n++) apply(3'($urandom_range(7)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
