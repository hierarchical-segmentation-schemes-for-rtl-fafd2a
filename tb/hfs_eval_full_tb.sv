// hfs_eval_full_tb: the evaluator at its default configuration (16-bit
// x*ln(x), P2SL(US), v0 = 12, second order) driven with every one of the 2^16
// inputs back to back, one per clock. Every result must be faithfully rounded
// and arrive exactly 10 clocks after its input; x = 0 must raise exc.
module hfs_eval_full_tb;

  localparam int unsigned N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [N-1:0] x = '0;
  logic out_valid, exc;
  logic signed [15:0] y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hfs_eval dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y, .exc);

  hfs_check #(.FUNC(2), .N(N), .OUT_W(16), .OUT_F(16), .EXC_ZERO(1'b1), .LATENCY(10))
    chk (.clk, .rst_n, .in_valid, .x, .out_valid, .y, .exc);

  initial begin
    #1000000000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < (1 << N); i++) begin
      in_valid <= 1'b1;
      x        <= N'(i);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    checks   = chk.checks + 1;
    failures = chk.failures;
    if (chk.results != (1 << N)) begin
      failures++;
      $display("ERROR: %0d results for %0d inputs", chk.results, 1 << N);
    end
    if (chk.exceptions != 1) failures++;
    $display("results=%0d exceptions=%0d worst error %f ulp", chk.results, chk.exceptions, chk.worst_ulp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
