// hfs_eval_tb: end-to-end test of the evaluator in all four outer
// segmentation schemes, each with its own tables:
//   A  x*ln(x),        P2SL(US), v0 = 12  (the default configuration)
//   B  rational f3,    US(US),   v0 = 5   (P2S unit bypassed)
//   C  sqrt(-ln(x)),   P2S(US),  v0 = 12
//   D  rational f3,    P2SR(US), v0 = 5
//   E  x*ln(x),        P2SL(US), v0 = 12, first-order polynomials
// All 2^16 inputs are applied to every instance, in a shuffled order, with
// idle clocks (in_valid low) inserted at random. Every result is checked for
// faithful rounding against the function computed in double precision and for
// a latency of exactly 10 clocks (8 for the first-order instance). The test also counts how often each
// mechanism occurred and fails if one never did: the P2S address in each of
// its three forms, the bypass, the exception at x = 0, pipeline bubbles, and
// outer segments of both the narrowest and the widest kind.
module hfs_eval_tb;
  import hfs_pkg::*;

  localparam int unsigned N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [N-1:0] x = '0;
  always #5 clk = ~clk;

  logic ov_a, ov_b, ov_c, ov_d, ov_e, ex_a, ex_b, ex_c, ex_d, ex_e;
  logic signed [15:0] y_a, y_b, y_c, y_d, y_e;

  hfs_eval u_a (.clk, .rst_n, .in_valid, .x, .out_valid(ov_a), .y(y_a), .exc(ex_a));

  hfs_eval #(.SCHEME(SCHEME_US), .V0(5), .S0(32), .M(126), .OFF_W(7), .CW(24),
             .CF('{22, 17, 13, 0, 0}), .OUT_F(14), .EXC_ZERO(1'b0),
             .ROM0_FILE("rtl/hfs_f3_rom0.hex"), .ROM1_FILE("rtl/hfs_f3_rom1.hex"))
    u_b (.clk, .rst_n, .in_valid, .x, .out_valid(ov_b), .y(y_b), .exc(ex_b));

  hfs_eval #(.SCHEME(SCHEME_P2S), .V0(12), .S0(24), .M(78), .OFF_W(7), .CW(32),
             .CF('{29, 18, 10, 0, 0}), .OUT_F(13), .EXC_ZERO(1'b1),
             .ROM0_FILE("rtl/hfs_f1_rom0.hex"), .ROM1_FILE("rtl/hfs_f1_rom1.hex"))
    u_c (.clk, .rst_n, .in_valid, .x, .out_valid(ov_c), .y(y_c), .exc(ex_c));

  hfs_eval #(.SCHEME(SCHEME_P2SR), .V0(5), .S0(6), .M(310), .OFF_W(9), .CW(28),
             .CF('{20, 17, 17, 0, 0}), .OUT_F(14), .EXC_ZERO(1'b0),
             .ROM0_FILE("rtl/hfs_f3p2sr_rom0.hex"), .ROM1_FILE("rtl/hfs_f3p2sr_rom1.hex"))
    u_d (.clk, .rst_n, .in_valid, .x, .out_valid(ov_d), .y(y_d), .exc(ex_d));

  hfs_eval #(.D(1), .SCHEME(SCHEME_P2SL), .V0(12), .S0(13), .M(382), .OFF_W(9), .CW(26),
             .CF('{26, 21, 0, 0, 0}), .OUT_F(16), .EXC_ZERO(1'b1),
             .ROM0_FILE("rtl/hfs_f2d1_rom0.hex"), .ROM1_FILE("rtl/hfs_f2d1_rom1.hex"))
    u_e (.clk, .rst_n, .in_valid, .x, .out_valid(ov_e), .y(y_e), .exc(ex_e));

  hfs_check #(.FUNC(2), .OUT_F(16), .EXC_ZERO(1'b1)) c_a
    (.clk, .rst_n, .in_valid, .x, .out_valid(ov_a), .y(y_a), .exc(ex_a));
  hfs_check #(.FUNC(3), .OUT_F(14), .EXC_ZERO(1'b0)) c_b
    (.clk, .rst_n, .in_valid, .x, .out_valid(ov_b), .y(y_b), .exc(ex_b));
  hfs_check #(.FUNC(1), .OUT_F(13), .EXC_ZERO(1'b1)) c_c
    (.clk, .rst_n, .in_valid, .x, .out_valid(ov_c), .y(y_c), .exc(ex_c));
  hfs_check #(.FUNC(3), .OUT_F(14), .EXC_ZERO(1'b0)) c_d
    (.clk, .rst_n, .in_valid, .x, .out_valid(ov_d), .y(y_d), .exc(ex_d));
  hfs_check #(.FUNC(2), .OUT_F(16), .EXC_ZERO(1'b1), .LATENCY(8)) c_e
    (.clk, .rst_n, .in_valid, .x, .out_valid(ov_e), .y(y_e), .exc(ex_e));

  int checks = 0, failures = 0;
  int n_bubble = 0, n_bypass = 0, n_p2s = 0, n_p2sl = 0, n_p2sr = 0;
  int n_p2s_ones = 0, n_narrow = 0, n_wide = 0;

  // Mechanism counters, taken from what the test applies and what the
  // outer-address logic of each instance produces.
  always @(posedge clk) if (rst_n) begin
    if (!in_valid) n_bubble++;
    if (u_b.v_s2) n_bypass++;
    if (u_a.v_s2) n_p2sl++;
    if (u_c.v_s2) n_p2s++;
    if (u_d.v_s2) n_p2sr++;
    if (u_c.v_s2 && u_c.j_s2 >= 12) n_p2s_ones++;        // leading-ones half
    if (u_a.v_s2 && u_a.j_s2 == 0) n_narrow++;          // x < 2^-12
    if (u_a.v_s2 && u_a.j_s2 == 12) n_wide++;           // x >= 1/2
  end

  initial begin
    #20000000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mech(string name, int count);
    checks++;
    $display("  %-28s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("ERROR: %s never happened", name);
    end
  endtask

  initial begin
    int unsigned perm [];
    perm = new[1 << N];
    foreach (perm[i]) perm[i] = i;
    perm.shuffle();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    foreach (perm[i]) begin
      while ($urandom_range(7) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      x        <= N'(perm[i]);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    checks   = c_a.checks + c_b.checks + c_c.checks + c_d.checks + c_e.checks;
    failures = c_a.failures + c_b.failures + c_c.failures + c_d.failures + c_e.failures;
    $display("worst error (ulp): A %f  B %f  C %f  D %f  E %f",
             c_a.worst_ulp, c_b.worst_ulp, c_c.worst_ulp, c_d.worst_ulp, c_e.worst_ulp);
    checks++;
    if (c_a.results != (1 << N) || c_b.results != (1 << N) ||
        c_c.results != (1 << N) || c_d.results != (1 << N) ||
        c_e.results != (1 << N)) begin
      failures++;
      $display("ERROR: missing results");
    end
    $display("mechanisms:");
    mech("pipeline bubbles", n_bubble);
    mech("US bypass of the P2S unit", n_bypass);
    mech("P2SL addresses", n_p2sl);
    mech("P2S addresses", n_p2s);
    mech("P2S leading-ones half", n_p2s_ones);
    mech("P2SR addresses", n_p2sr);
    mech("narrowest outer segment", n_narrow);
    mech("widest outer segment", n_wide);
    mech("x = 0 exception (A)", c_a.exceptions);
    mech("x = 0 exception (C)", c_c.exceptions);
    mech("first-order results (E)", c_e.results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
