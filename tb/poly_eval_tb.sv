// poly_eval_tb: the Horner datapath at degree 2 (default formats), degree 1
// and degree 3, each against its bit-exact model (poly_eval_harness). Fails
// if no result ever saturated.
module poly_eval_tb;

  logic clk = 1'b0, rst_n = 1'b0;
  logic done2, done1, done3;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  poly_eval_harness h2 (.clk, .rst_n, .done(done2));
  poly_eval_harness #(.D(1), .CW(20), .CF('{18, 16, 0, 0, 0}), .OUT_W(12), .OUT_F(12)) h1
    (.clk, .rst_n, .done(done1));
  poly_eval_harness #(.D(3), .CW(24), .CF('{22, 20, 18, 14, 0}), .OUT_W(16), .OUT_F(14)) h3
    (.clk, .rst_n, .done(done3));

  initial begin
    #10000000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done1 && done2 && done3);
    checks   = h1.checks + h2.checks + h3.checks + 1;
    failures = h1.failures + h2.failures + h3.failures;
    $display("saturated results: %0d %0d %0d", h1.saturated, h2.saturated, h3.saturated);
    if (h1.saturated + h2.saturated + h3.saturated == 0) begin
      failures++;
      $display("ERROR: saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
