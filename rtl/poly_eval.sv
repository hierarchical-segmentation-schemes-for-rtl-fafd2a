// poly_eval: pipelined Horner evaluation p(x_hat) = ((c_D x_hat + c_{D-1}) x_hat
// + ...) x_hat + c_0 with D multipliers and D adders, then rounding to the
// OUT_W-bit result.
//
// Number formats: x_hat is an unsigned XW-bit integer standing for
// x_hat * 2^-XW. Coefficient c_k is a CW-bit two's complement integer with
// CF[k] fractional bits. After each multiply the product (CF[k+1] + XW
// fractional bits) is shifted arithmetically to CF[k] fractional bits, the
// discarded bits truncated, and c_k added. The final sum is rounded to
// nearest (ties up) at OUT_F fractional bits and saturated to OUT_W bits.
// Per-coefficient binary points let a table give the higher-order
// coefficients, which can be large, their range without starving c_0 of
// precision.
//
// Timing: one result per clock. Each Horner step takes two clocks (multiply,
// then add) and the rounding one more, so y follows (x_hat, coef) by
// LATENCY = 2*D + 1 clocks; out_valid marks it. The Horner structure follows
// the published datapath; the binary points, truncation, round-to-nearest and
// register placement are this design's choices.
module poly_eval
  import hfs_pkg::*;
#(
  parameter int unsigned XW    = 16,            // x_hat width
  parameter int unsigned D     = 2,             // polynomial degree
  parameter int unsigned CW    = 30,            // coefficient width
  parameter int unsigned ACC_W = CW + 1,        // accumulator width
  parameter int          CF [MAX_D+1] = '{30, 25, 15, 0, 0},  // frac bits of c_0..c_D
  parameter int unsigned OUT_W = 16,            // result width
  parameter int unsigned OUT_F = 16             // result fractional bits
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [XW-1:0]             x_hat,
  input  logic [D:0][CW-1:0]        coef,      // coef[k] = c_k
  output logic                      out_valid,
  output logic signed [OUT_W-1:0]   y
);

  if (D < 1 || D > MAX_D) begin : g_bad_degree
    $error("poly_eval: D must lie in 1..MAX_D");
  end

  localparam int unsigned LATENCY = 2 * D + 1;
  localparam int unsigned PW      = ACC_W + XW + 1;  // product width

  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic signed [PW-1:0]    prod_t;

  // Delay lines for the operand, the coefficients and the valid flag.
  logic [XW-1:0]      xh_pipe   [2*D+1];
  logic [D:0][CW-1:0] coef_pipe [2*D+1];
  logic [LATENCY:0]   vld_pipe;

  assign xh_pipe[0]   = x_hat;
  assign coef_pipe[0] = coef;
  assign vld_pipe[0]  = in_valid;

  for (genvar t = 1; t <= 2 * D; t++) begin : g_dly
    always_ff @(posedge clk) begin
      xh_pipe[t]   <= xh_pipe[t-1];
      coef_pipe[t] <= coef_pipe[t-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld_pipe[LATENCY:1] <= '0;
    else        vld_pipe[LATENCY:1] <= vld_pipe[LATENCY-1:0];

  // acc[k] holds the partial result that has c_k added (CF[k] fractional bits).
  acc_t  acc  [D+1];
  prod_t prod [D];

  assign acc[D] = acc_t'($signed(coef[D]));

  for (genvar k = D - 1; k >= 0; k--) begin : g_horner
    localparam int T  = 2 * (D - 1 - k);            // cycle the step starts
    localparam int SH = CF[k+1] + int'(XW) - CF[k]; // alignment shift
    acc_t aligned;   // the table keeps every aligned product within ACC_W bits

    always_ff @(posedge clk)
      prod[k] <= prod_t'(acc[k+1]) * prod_t'({1'b0, xh_pipe[T]});

    if (SH >= 0) begin : g_r
      assign aligned = acc_t'(prod[k] >>> SH);
    end else begin : g_l
      assign aligned = acc_t'(prod[k] <<< (-SH));
    end

    always_ff @(posedge clk)
      acc[k] <= aligned + acc_t'($signed(coef_pipe[T+1][k]));
  end

  // Round to nearest at OUT_F fractional bits and saturate.
  localparam int RSH = CF[0] - int'(OUT_F);
  localparam logic signed [ACC_W:0] YMAX = (ACC_W+1)'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W:0] YMIN = -(ACC_W+1)'(1 << (OUT_W - 1));

  logic signed [ACC_W:0] rounded;

  if (RSH > 0) begin : g_rnd
    assign rounded = ((ACC_W+1)'(acc[0]) + (ACC_W+1)'(1 << (RSH - 1))) >>> RSH;
  end else begin : g_nornd
    assign rounded = (ACC_W+1)'(acc[0]) <<< (-RSH);
  end

  always_ff @(posedge clk)
    if (rounded > YMAX)      y <= YMAX[OUT_W-1:0];
    else if (rounded < YMIN) y <= YMIN[OUT_W-1:0];
    else                     y <= rounded[OUT_W-1:0];

  assign out_valid = vld_pipe[LATENCY];

endmodule
