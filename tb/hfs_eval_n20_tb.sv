// hfs_eval_n20_tb: the evaluator widened to 20-bit operands, computing
// x*ln(x) with a P2SL(US) hierarchy, v0 = 16, 155 segments and 40-bit
// coefficients (tables rtl/hfs_f2n20_*.hex). All 2^20 inputs are applied back
// to back; every output must be faithfully rounded at 20 fractional bits and
// arrive 10 clocks after its input, and x = 0 must raise exc.
module hfs_eval_n20_tb;
  import hfs_pkg::*;

  localparam int unsigned N = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [N-1:0] x = '0;
  logic out_valid, exc;
  logic signed [N-1:0] y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hfs_eval #(.N(N), .SCHEME(SCHEME_P2SL), .V0(16), .S0(17), .M(155), .OFF_W(8),
             .CW(40), .CF('{40, 35, 21, 0, 0}), .OUT_W(N), .OUT_F(N), .EXC_ZERO(1'b1),
             .ROM0_FILE("rtl/hfs_f2n20_rom0.hex"), .ROM1_FILE("rtl/hfs_f2n20_rom1.hex"))
    dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y, .exc);

  hfs_check #(.FUNC(2), .N(N), .OUT_W(N), .OUT_F(N), .EXC_ZERO(1'b1), .LATENCY(10))
    chk (.clk, .rst_n, .in_valid, .x, .out_valid, .y, .exc);

  initial begin
    #20000000000;
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
    if (chk.results != (1 << N) || chk.exceptions != 1) begin
      failures++;
      $display("ERROR: %0d results, %0d exceptions", chk.results, chk.exceptions);
    end
    $display("results=%0d worst error %f ulp", chk.results, chk.worst_ulp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
