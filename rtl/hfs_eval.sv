// hfs_eval: fully pipelined function evaluator y = f(x) for an N-bit input
// x = 0.x[N-1]..x[0] in [0,1), built on a two-level hierarchy of segments and
// a degree-D polynomial per segment.
//
// The top V0 bits of x (delta0) pick an outer segment through the P2S unit:
// powers-of-two segments (P2S, P2SL, P2SR) or, with SCHEME = US, delta0
// itself. ROM0 gives that outer segment's inner field width v1 and the ROM1
// offset of its first inner segment. The bit selection unit then takes
// delta1, the next v1 bits below the outer field, and x_hat = delta1:delta2,
// the input's offset from the start of the outer segment. ROM1[offset +
// delta1] holds c_D..c_0 of that inner segment's polynomial, evaluated in
// x_hat by Horner's rule and rounded to OUT_W bits with OUT_F fractional bits.
//
// Pipeline (one new x every clock, no stalls):
//   clock 1  input register
//   clock 2  P2S address register
//   clock 3  ROM0 read
//   clock 4  bit selection and offset add, ROM1 address register
//   clock 5  ROM1 read
//   clocks 6..5+2D+1  Horner steps and rounding (poly_eval)
// so y and out_valid follow in_valid and x by LATENCY = 6 + 2*D clocks
// (10 for D = 2). exc is raised with the result when EXC_ZERO is set and
// x = 0, where functions such as x*log(x) or sqrt(-log(x)) are undefined;
// y is then 0.
//
// The structure (P2S unit, bit selection, two cascaded tables, offset adder,
// Horner datapath) follows the published architecture. Table contents are
// produced offline: each inner segment carries a minimax quadratic fitted so
// that every output is faithfully rounded (error below one unit in the last
// place). The defaults are the 16-bit second-order evaluator of x*ln(x) with
// a P2SL(US) hierarchy and v0 = 12 (47 segments, 30-bit coefficients). The
// register placement, handshake, exception value and number formats are this
// design's own choices.
module hfs_eval
  import hfs_pkg::*;
#(
  parameter int unsigned N         = 16,           // input width n
  parameter int unsigned D         = 2,            // polynomial degree d
  parameter scheme_e     SCHEME    = SCHEME_P2SL,  // outer scheme Lambda0
  parameter int unsigned V0        = 12,           // outer field width v0
  parameter int unsigned S0        = 13,           // ROM0 depth s0
  parameter int unsigned M         = 47,           // segments m (ROM1 depth)
  parameter int unsigned V1_W      = 5,            // v1 field width in ROM0
  parameter int unsigned OFF_W     = 6,            // offset field width in ROM0
  parameter int unsigned CW        = 30,           // coefficient width
  parameter int          CF [MAX_D+1] = '{30, 25, 15, 0, 0}, // frac bits of c_0..c_D
  parameter int unsigned OUT_W     = 16,           // output width
  parameter int unsigned OUT_F     = 16,           // output fractional bits
  parameter bit          EXC_ZERO  = 1'b1,         // flag x = 0 as an exception
  parameter string       ROM0_FILE = "rtl/hfs_f2_rom0.hex",
  parameter string       ROM1_FILE = "rtl/hfs_f2_rom1.hex"
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [N-1:0]            x,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y,
  output logic                    exc
);

  localparam int unsigned A0_W    = (S0 > 1) ? $clog2(S0) : 1;
  localparam int unsigned A1_W    = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned PL      = 2 * D + 1;      // poly_eval latency

  // Stage 1: input register.
  logic         v_s1, v_s2, v_s3, v_s4, v_s5;
  logic [N-1:0] x_s1, x_s2, x_s3;
  logic [V0-1:0] j_s2, j_s3;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v_s1 <= 1'b0; v_s2 <= 1'b0; v_s3 <= 1'b0; v_s4 <= 1'b0; v_s5 <= 1'b0;
    end else begin
      v_s1 <= in_valid; v_s2 <= v_s1; v_s3 <= v_s2; v_s4 <= v_s3; v_s5 <= v_s4;
    end

  always_ff @(posedge clk) x_s1 <= x;

  // Stage 2: outer segment address.
  logic [V0-1:0] j_c;

  p2s_unit #(.V(V0)) u_p2s (
    .scheme (SCHEME),
    .delta0 (x_s1[N-1 -: V0]),
    .addr   (j_c)
  );

  always_ff @(posedge clk) begin
    x_s2 <= x_s1;
    j_s2 <= j_c;
  end

  // Stage 3: ROM0 read.
  logic [V1_W-1:0]  v1_s3;
  logic [OFF_W-1:0] off_s3;

  hfs_rom0 #(.S0(S0), .V1_W(V1_W), .OFF_W(OFF_W), .INIT_FILE(ROM0_FILE)) u_rom0 (
    .clk    (clk),
    .en     (v_s2),
    .addr   (A0_W'(j_s2)),
    .v1     (v1_s3),
    .offset (off_s3)
  );

  always_ff @(posedge clk) begin
    x_s3 <= x_s2;
    j_s3 <= j_s2;
  end

  // Stage 4: bit selection and ROM1 address.
  logic [A1_W-1:0] d1_c, a1_c, a1_s4;
  logic [N-1:0]    xh_c, xh_s4, xh_s5;
  logic            z_s4, z_s5;

  bit_select #(.N(N), .V0(V0), .V1_W(V1_W), .D1_W(A1_W)) u_bsel (
    .scheme (SCHEME),
    .x      (x_s3),
    .j      (j_s3),
    .v1     (v1_s3),
    .delta1 (d1_c),
    .x_hat  (xh_c)
  );

  offset_adder #(.OFF_W(OFF_W), .D1_W(A1_W), .AW(A1_W)) u_oadd (
    .offset (off_s3),
    .delta1 (d1_c),
    .addr   (a1_c)
  );

  always_ff @(posedge clk) begin
    a1_s4 <= a1_c;
    xh_s4 <= xh_c;
    z_s4  <= EXC_ZERO && (x_s3 == '0);
  end

  // Stage 5: ROM1 read.
  logic [D:0][CW-1:0] coef_s5;

  hfs_rom1 #(.M(M), .D(D), .CW(CW), .INIT_FILE(ROM1_FILE)) u_rom1 (
    .clk  (clk),
    .en   (v_s4),
    .addr (a1_s4),
    .coef (coef_s5)
  );

  always_ff @(posedge clk) begin
    xh_s5 <= xh_s4;
    z_s5  <= z_s4;
  end

  // Stages 6..: polynomial.
  logic                    pv;
  logic signed [OUT_W-1:0] py;
  logic [PL-1:0]           z_pipe;

  poly_eval #(
    .XW(N), .D(D), .CW(CW), .CF(CF), .OUT_W(OUT_W), .OUT_F(OUT_F)
  ) u_poly (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v_s5),
    .x_hat     (xh_s5),
    .coef      (coef_s5),
    .out_valid (pv),
    .y         (py)
  );

  always_ff @(posedge clk) z_pipe <= {z_pipe[PL-2:0], z_s5};

  assign out_valid = pv;
  assign exc       = pv && z_pipe[PL-1];
  assign y         = z_pipe[PL-1] ? '0 : py;

  // The outer address must fall inside ROM0 and the ROM1 address inside ROM1.
  a_rom0_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 v_s2 |-> 32'(j_s2) < S0);
  a_rom1_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 v_s4 |-> 32'(a1_s4) < M);

endmodule
