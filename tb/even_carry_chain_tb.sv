// even_carry_chain_tb: exhaustive self-checking test of the even chain.
//
// Every combination of clk, the four stage generates and the three pass
// gates is applied. The expected outputs are the sum-of-products forms of
// the chain (bit indices 0, 2, 4, 6):
//   h0 = g0
//   h2 = g2 + p2 g0
//   h4 = g4 + p4 g2 + p4 p2 g0
//   h6 = g6 + p6 g4 + p6 p4 g2 + p6 p4 p2 g0
// and all zeros in precharge. It also counts that the full-length path
// (g0 alone reaching h6) was exercised. Watchdog included.
module even_carry_chain_tb;

  logic       clk;
  logic [3:0] gg, h;
  logic [3:1] pp;
  int checks   = 0;
  int failures = 0;
  int full_path = 0;

  even_carry_chain dut (.clk(clk), .gg(gg), .pp(pp), .h(h));

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [3:0] e;
      logic g0, g2, g4, g6, p2, p4, p6;
      {clk, gg, pp} = 8'(v);
      #1;
      {g6, g4, g2, g0} = gg;
      {p6, p4, p2}     = pp;
      e[0] = g0;
      e[1] = g2 | (p2 & g0);
      e[2] = g4 | (p4 & g2) | (p4 & p2 & g0);
      e[3] = g6 | (p6 & g4) | (p6 & p4 & g2) | (p6 & p4 & p2 & g0);
      if (!clk) e = '0;
      if (clk && gg == 4'b0001 && pp == 3'b111) full_path++;
      checks++;
      if (h !== e) begin
        failures++;
        $display("FAIL clk=%0b gg=%b pp=%b: h=%b expected %b", clk, gg, pp, h, e);
      end
    end
    checks++;
    if (full_path == 0) begin
      failures++;
      $display("FAIL full-length chain path never exercised");
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
