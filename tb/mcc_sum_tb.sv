// mcc_sum_tb: exhaustive self-checking test of the carry and sum stage.
//
// For every pair of 8-bit operands and carry-in, the test forms the stage's
// inputs itself (p = a xor b, t = a or b, and the pseudo-carries
// h_i = a_i b_i + c_(i-1) from a bit-by-bit ripple reference) and expects the
// stage to return the integer sum a + b + cin, its carry-out, and the ripple
// carries c_0..c_7. Random vectors are also applied with clk low, where every
// output must be 0. Watchdog included.
module mcc_sum_tb;

  localparam int unsigned W = 8;

  logic         clk, cin, cout;
  logic [W-1:0] p, t, h, c, s;
  int checks   = 0;
  int failures = 0;

  mcc_sum dut (
    .clk(clk), .p(p), .t(t), .h(h), .cin(cin), .c(c), .s(s), .cout(cout)
  );

  task automatic apply(input logic ck, input logic [W-1:0] a, input logic [W-1:0] b,
                       input logic ci);
    logic [W-1:0] ripple, hv;
    logic [W:0]   total;
    logic         carry;
    carry = ci;
    for (int i = 0; i < int'(W); i++) begin
      hv[i]     = (a[i] & b[i]) | carry;
      carry     = (a[i] & b[i]) | ((a[i] ^ b[i]) & carry);
      ripple[i] = carry;
    end
    total = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, ci};
    clk = ck; p = a ^ b; t = a | b; h = hv; cin = ci;
    #1;
    checks++;
    if (ck) begin
      if (s !== total[W-1:0] || cout !== total[W] || c !== ripple) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0b: s=%h cout=%0b c=%b expected %h %0b %b",
                 a, b, ci, s, cout, c, total[W-1:0], total[W], ripple);
      end
    end else if (s !== '0 || c !== '0 || cout !== 1'b0) begin
      failures++;
      $display("FAIL precharge a=%h b=%h cin=%0b: s=%h c=%b cout=%0b", a, b, ci, s, c, cout);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << (2*W+1)); v++)
      apply(1'b1, W'(v >> (W+1)), W'(v >> 1), 1'(v));
    for (int n = 0; n < 1000; n++)
      apply(1'b0, W'($urandom), W'($urandom), 1'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
