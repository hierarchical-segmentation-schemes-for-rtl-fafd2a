// bit_select: splits the input into delta1 (inner segment index) and the
// translated operand x_hat = delta1:delta2 that the polynomial datapath uses.
//
// The outer field delta0 = a[V0-1]..a[0] sits at the top of x. For uniform
// outer segments delta1 starts right below it. For powers-of-two segments the
// field starts lower or higher depending on the outer address j (s0 outer
// segments in all): after a[0] for j = 0 and j = s0-1, after a[j-1] for
// 1 <= j < s0/2, and after a[s0-2-j] for s0/2 <= j <= s0-2. P2SL uses the
// first half of that rule (plus "after a[V0-1]" for its last, widest segment)
// and P2SR the second half. With "after a[p]" the low R = p + N - V0 bits of x
// are x_hat, the input's offset from the start of its outer segment. A right
// barrel shift by R - v1 then leaves delta1 = the top v1 bits of x_hat.
// The placement rule is the published one; the mask-and-shift form is this
// design's choice. Purely combinational.
module bit_select
  import hfs_pkg::*;
#(
  parameter int unsigned N    = 16,  // input width n
  parameter int unsigned V0   = 12,  // outer field width v0
  parameter int unsigned V1_W = 5,   // width of the v1 field read from ROM0
  parameter int unsigned D1_W = 6    // width of delta1 as used for addressing
) (
  input  scheme_e          scheme,  // outer segmentation scheme
  input  logic [N-1:0]     x,       // input operand 0.x[N-1]..x[0]
  input  logic [V0-1:0]    j,       // outer segment address from the P2S unit
  input  logic [V1_W-1:0]  v1,      // inner field width of this outer segment
  output logic [D1_W-1:0]  delta1,  // inner segment index
  output logic [N-1:0]     x_hat    // delta1:delta2, zero-extended
);

  localparam int unsigned RW = $clog2(N + 1);

  logic [RW-1:0] p;       // delta1 starts right after bit a[p] of delta0
  logic [RW-1:0] r;       // width of x_hat
  logic [RW-1:0] sh;      // barrel shift amount R - v1
  logic [N-1:0]  mask;

  always_comb begin
    p = '0;
    case (scheme)
      SCHEME_US: p = '0;
      SCHEME_P2SL:
        if (j == '0)                 p = '0;
        else                         p = RW'(j) - RW'(1);
      SCHEME_P2SR:
        if (32'(j) >= V0)            p = '0;
        else                         p = RW'(V0 - 1) - RW'(j);
      SCHEME_P2S:
        if (j == '0 || 32'(j) >= 2 * V0 - 1) p = '0;
        else if (32'(j) < V0)        p = RW'(j) - RW'(1);
        else                         p = RW'(2 * V0 - 2) - RW'(j);
      default: p = '0;
    endcase
    r = p + RW'(N - V0);
  end

  always_comb begin
    for (int b = 0; b < N; b++) mask[b] = (RW'(b) < r);
    x_hat   = x & mask;
    sh      = (RW'(v1) > r) ? '0 : r - RW'(v1);
    delta1  = D1_W'(x_hat >> sh);
  end

endmodule
