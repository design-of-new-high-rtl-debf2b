// odd_carry_chain_tb: exhaustive self-checking test of the odd chain.
//
// Every combination of clk, carry-in, the four stage generates and the four
// pass gates is applied. The expected outputs are the sum-of-products forms
// of the chain (bit indices 1, 3, 5, 7; c is the carry-in at the foot):
//   h1 = g1 + p1 c
//   h3 = g3 + p3 g1 + p3 p1 c
//   h5 = g5 + p5 g3 + p5 p3 g1 + p5 p3 p1 c
//   h7 = g7 + p7 g5 + p7 p5 g3 + p7 p5 p3 g1 + p7 p5 p3 p1 c
// and all zeros in precharge. It counts that the carry-in reached h7 through
// all four pass stages at least once. Watchdog included.
module odd_carry_chain_tb;

  logic       clk, cin;
  logic [3:0] gg, pp, h;
  int checks   = 0;
  int failures = 0;
  int full_path = 0;

  odd_carry_chain dut (.clk(clk), .cin(cin), .gg(gg), .pp(pp), .h(h));

  initial begin
    for (int v = 0; v < 1024; v++) begin
      logic [3:0] e;
      logic g1, g3, g5, g7, p1, p3, p5, p7;
      {clk, cin, gg, pp} = 10'(v);
      #1;
      {g7, g5, g3, g1} = gg;
      {p7, p5, p3, p1} = pp;
      e[0] = g1 | (p1 & cin);
      e[1] = g3 | (p3 & g1) | (p3 & p1 & cin);
      e[2] = g5 | (p5 & g3) | (p5 & p3 & g1) | (p5 & p3 & p1 & cin);
      e[3] = g7 | (p7 & g5) | (p7 & p5 & g3) | (p7 & p5 & p3 & g1)
           | (p7 & p5 & p3 & p1 & cin);
      if (!clk) e = '0;
      if (clk && cin && gg == 4'b0000 && pp == 4'b1111) full_path++;
      checks++;
      if (h !== e) begin
        failures++;
        $display("FAIL clk=%0b cin=%0b gg=%b pp=%b: h=%b expected %b",
                 clk, cin, gg, pp, h, e);
      end
    end
    checks++;
    if (full_path == 0) begin
      failures++;
      $display("FAIL carry-in never propagated through the whole chain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
