// mcc8_adder_tb: end-to-end test of the 8-bit multi-output domino adder at
// its default size.
//
// A free-running clk drives the domino phases. On each falling edge
// (precharge) a new operand pair and carry-in are applied and every output
// must read 0; on the following rising edge (evaluate) s, cout and all
// carries c_0..c_7 must equal the integer sum a + b + cin and the carries of
// a bit-by-bit ripple reference, within the same cycle (no extra latency).
// All 2^17 operand/carry-in combinations are applied. The test also counts
// how often each mechanism of the design occurred and fails if one never did:
//   - precharge phase checked
//   - carry-in rippling through the whole odd chain (every bit propagates)
//   - a carry generated at bit 0 carried by the even chain to bit 6 and on
//   - even and odd chain both carrying at once
//   - carry-out produced
// A cycle-count watchdog ends a hung run with a failure.
module mcc8_adder_tb;

  localparam int unsigned W = 8;
  localparam int unsigned VECTORS = 1 << (2*W + 1);

  logic         clk = 1'b0;
  logic         cin = 1'b0, cout;
  logic [W-1:0] a = '0, b = '0, s, c;
  int checks   = 0;
  int failures = 0;
  int n_precharge = 0, n_odd_full = 0, n_even_full = 0, n_both = 0, n_cout = 0;

  mcc8_adder dut (.clk(clk), .a(a), .b(b), .cin(cin), .s(s), .c(c), .cout(cout));

  always #5 clk = ~clk;

  task automatic check_eval();
    logic [W:0]   total;
    logic [W-1:0] ripple;
    logic         carry;
    carry = cin;
    for (int i = 0; i < int'(W); i++) begin
      carry     = (a[i] & b[i]) | ((a[i] | b[i]) & carry);
      ripple[i] = carry;
    end
    total = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
    checks++;
    if (s !== total[W-1:0] || cout !== total[W] || c !== ripple) begin
      failures++;
      if (failures < 20)
        $display("FAIL a=%h b=%h cin=%0b: s=%h cout=%0b c=%b expected %h %0b %b",
                 a, b, cin, s, cout, c, total[W-1:0], total[W], ripple);
    end
    if (cin && (a ^ b) == '1) n_odd_full++;
    if (a[0] && b[0] && (a[W-1:1] ^ b[W-1:1]) == '1) n_even_full++;
    if (ripple[W-2] && ripple[W-1] && (a[W-1] ^ b[W-1]) && (a[W-2] ^ b[W-2])) n_both++;
    if (total[W]) n_cout++;
  endtask

  initial begin
    for (int unsigned v = 0; v < VECTORS; v++) begin
      @(negedge clk);
      {a, b, cin} = (2*W+1)'(v);
      #1;
      checks++;
      n_precharge++;
      if (s !== '0 || c !== '0 || cout !== 1'b0) begin
        failures++;
        if (failures < 20)
          $display("FAIL precharge a=%h b=%h: s=%h c=%b cout=%0b", a, b, s, c, cout);
      end
      @(posedge clk);
      #1;
      check_eval();
    end
    $display("mechanisms: precharge=%0d odd_chain_full=%0d even_chain_full=%0d both_chains=%0d carry_out=%0d",
             n_precharge, n_odd_full, n_even_full, n_both, n_cout);
    checks += 5;
    if (n_precharge == 0) begin failures++; $display("FAIL precharge never checked"); end
    if (n_odd_full == 0)  begin failures++; $display("FAIL odd chain full path never used"); end
    if (n_even_full == 0) begin failures++; $display("FAIL even chain full path never used"); end
    if (n_both == 0)      begin failures++; $display("FAIL chains never both carried"); end
    if (n_cout == 0)      begin failures++; $display("FAIL carry-out never produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (VECTORS + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
