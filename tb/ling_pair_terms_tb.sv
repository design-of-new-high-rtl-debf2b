// ling_pair_terms_tb: self-checking test of the two-bit group terms.
//
// Drives random bit generates g, transmits t and carry-in (plus the all-zero,
// all-one and walking-one corners) in both clk phases. The expected group
// generate of bit i is "bit i or bit i-1 generates" (with the carry-in acting
// as the generate below bit 0 for gg[0]); the expected group transmit of bit i
// is "bits i-1 and i-2 both transmit" (just t[0] for bit 1). Precharge must
// give all zeros. A watchdog ends a hung run with a failure.
module ling_pair_terms_tb;

  localparam int unsigned W = 8;

  logic         clk, cin;
  logic [W-1:0] g, t, gg;
  logic [W-1:1] pp;
  int checks   = 0;
  int failures = 0;

  ling_pair_terms dut (
    .clk(clk), .g(g), .t(t), .cin(cin), .gg(gg), .pp(pp)
  );

  task automatic apply(input logic ck, input logic [W-1:0] gv,
                       input logic [W-1:0] tv, input logic ci);
    logic [W-1:0] exp_gg;
    logic [W-1:1] exp_pp;
    clk = ck; g = gv; t = tv; cin = ci;
    #1;
    exp_gg = '0;
    exp_pp = '0;
    if (ck) begin
      for (int i = 0; i < int'(W); i++) begin
        logic below;
        below     = (i == 0) ? ci : gv[i-1];
        exp_gg[i] = gv[i] || below;
      end
      exp_pp[1] = tv[0];
      for (int i = 2; i < int'(W); i++) exp_pp[i] = tv[i-1] && tv[i-2];
    end
    checks++;
    if (gg !== exp_gg || pp !== exp_pp) begin
      failures++;
      $display("FAIL clk=%0b g=%b t=%b cin=%0b: gg=%b pp=%b expected %b %b",
               ck, gv, tv, ci, gg, pp, exp_gg, exp_pp);
    end
  endtask

  initial begin
    apply(1'b1, '0, '0, 1'b0);
    apply(1'b1, '1, '1, 1'b1);
    apply(1'b0, '1, '1, 1'b1);
    for (int i = 0; i < int'(W); i++) begin
      apply(1'b1, W'(1) << i, '0, 1'b0);
      apply(1'b1, '0, W'(1) << i, 1'b1);
      apply(1'b1, '0, ~(W'(1) << i), 1'b1);
    end
    for (int n = 0; n < 2000; n++)
      apply(1'($urandom_range(1)), W'($urandom), W'($urandom), 1'($urandom_range(1)));
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
