// poly_eval_harness: drives one poly_eval instance with NVEC random operand
// and coefficient sets (idle clocks mixed in) and checks every result against
// a bit-exact integer model of the datapath written here: Horner steps with
// the product shifted arithmetically from CF[k+1] + XW to CF[k] fractional
// bits and wrapped to ACC_W bits, then round-to-nearest at OUT_F fractional
// bits and saturation to OUT_W bits. Also checks the latency (2*D + 1 clocks)
// and counts saturated results. done rises when all results are in.
module poly_eval_harness
  import hfs_pkg::*;
#(
  parameter int unsigned D     = 2,
  parameter int unsigned CW    = 30,
  parameter int          CF [MAX_D+1] = '{30, 25, 15, 0, 0},
  parameter int unsigned OUT_W = 16,
  parameter int unsigned OUT_F = 16,
  parameter int unsigned NVEC  = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done
);

  localparam int unsigned XW    = 16;
  localparam int unsigned ACC_W = CW + 1;
  localparam int unsigned LAT   = 2 * D + 1;

  int checks = 0, failures = 0, saturated = 0, results = 0;

  logic               in_valid = 1'b0;
  logic [XW-1:0]      x_hat = '0;
  logic [D:0][CW-1:0] coef = '0;
  logic               out_valid;
  logic signed [OUT_W-1:0] y;

  poly_eval #(.XW(XW), .D(D), .CW(CW), .CF(CF), .OUT_W(OUT_W), .OUT_F(OUT_F)) dut
    (.clk, .rst_n, .in_valid, .x_hat, .coef, .out_valid, .y);

  function automatic longint sx(longint v, int w);
    longint m = longint'(1) << (w - 1);
    v = v & ((longint'(1) << w) - 1);
    return (v ^ m) - m;
  endfunction

  function automatic longint model(logic [XW-1:0] xh, logic [D:0][CW-1:0] c, output bit sat);
    longint acc = sx(longint'(c[D]), CW);
    longint r, ymax, ymin;
    int sh;
    for (int k = int'(D) - 1; k >= 0; k--) begin
      longint prod = acc * longint'(xh);
      sh  = CF[k+1] + int'(XW) - CF[k];
      prod = (sh >= 0) ? (prod >>> sh) : (prod <<< -sh);
      acc = sx(sx(prod, ACC_W) + sx(longint'(c[k]), CW), ACC_W);
    end
    sh = CF[0] - int'(OUT_F);
    r  = (sh > 0) ? ((acc + (longint'(1) << (sh - 1))) >>> sh) : (acc <<< -sh);
    ymax = (longint'(1) << (OUT_W - 1)) - 1;
    ymin = -(longint'(1) << (OUT_W - 1));
    sat = (r > ymax || r < ymin);
    return (r > ymax) ? ymax : (r < ymin) ? ymin : r;
  endfunction

  typedef struct { longint y; bit sat; longint unsigned t; } exp_t;
  exp_t q [$];
  longint unsigned cycle = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid) begin
      bit s;
      longint e;
      e = model(x_hat, coef, s);
      q.push_back('{e, s, cycle});
    end
    if (rst_n && out_valid) begin
      exp_t e;
      results++;
      checks += 2;
      if (q.size() == 0) begin
        failures++;
        $display("ERROR: D=%0d result with no input", D);
      end else begin
        e = q.pop_front();
        if (e.sat) saturated++;
        if (cycle - e.t != LAT) begin
          failures++;
          $display("ERROR: D=%0d latency %0d, expected %0d", D, cycle - e.t, LAT);
        end
        if (longint'(y) != e.y) begin
          failures++;
          if (failures < 10) $display("ERROR: D=%0d y=%0d expected %0d", D, y, e.y);
        end
      end
    end
  end

  initial begin
    done = 1'b0;
    @(posedge rst_n);
    @(posedge clk);
    for (int n = 0; n < int'(NVEC); n++) begin
      if ($urandom_range(5) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      x_hat    <= XW'($urandom);
      for (int k = 0; k <= int'(D); k++) begin
        logic [CW-1:0] c;
        c = CW'({$urandom, $urandom});
        // Mostly small coefficients (no wrap), some full-range ones.
        if ($urandom_range(3) != 0) c = CW'(sx(longint'(c), CW) >>> $urandom_range(CW - 1, CW / 3));
        // Every 50th set: largest positive or negative coefficients.
        if (n % 50 == 25) c = {1'b0, {(CW-1){1'b1}}};
        if (n % 50 == 49) c = {1'b1, {(CW-1){1'b0}}};
        coef[k] <= c;
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (results != int'(NVEC)) begin
      failures++;
      $display("ERROR: D=%0d %0d results for %0d inputs", D, results, NVEC);
    end
    done = 1'b1;
  end

endmodule
