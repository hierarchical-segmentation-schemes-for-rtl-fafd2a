// p2s_unit: outer-segment address of the top field delta0 of the input.
//
// For powers-of-two segmentation the segment an input falls in is set by the
// run of equal bits at the top of delta0 = a[V-1]..a[0]. Two prefix cascades
// walk down from a[V-1]: an OR chain (or_c[k] = a[V-1] | ... | a[V-1-k]) and an
// AND chain (and_c[k] = a[V-1] & ... & a[V-1-k]). A 1-bit multi-operand adder
// counts the ones among a[V-1], the OR taps and the AND taps:
//   P2S  : a[V-1] + sum(or_c) + sum(and_c)   addresses 0 .. 2V-1
//   P2SL : a[V-1] + sum(or_c)                addresses 0 .. V  (small segments near 0)
//   P2SR : a[V-1] + sum(and_c)               addresses 0 .. V  (small segments near 1)
//   US   : delta0 itself (bypass)            addresses 0 .. 2^V-1
// For V = 5 the P2S case gives the ten ranges 00000, 00001, 0001x, 001xx,
// 01xxx, 10xxx, 110xx, 1110x, 11110, 11111 -> addresses 0..9.
// The cascades, the adder and the bypass follow the published circuit; the
// use of the OR taps alone for P2SL and the AND taps alone for P2SR is this
// design's reading of which run (leading zeros or leading ones) each variant
// must count. Purely combinational; the caller registers the result.
module p2s_unit
  import hfs_pkg::*;
#(
  parameter int unsigned V = 12   // bits in delta0 (v0)
) (
  input  scheme_e        scheme,  // outer segmentation scheme (Lambda0)
  input  logic [V-1:0]   delta0,  // top v0 bits of the input
  output logic [V-1:0]   addr     // outer segment index (ROM0 address)
);

  localparam int unsigned CW = $clog2(2 * V + 1);

  logic [V-1:0]  or_c, and_c;
  logic [CW-1:0] n_or, n_and, n_top;

  // Prefix cascades; element 0 is a[V-1] itself and is counted once.
  assign or_c[0]  = delta0[V-1];
  assign and_c[0] = delta0[V-1];

  for (genvar k = 1; k < V; k++) begin : g_cascade
    assign or_c[k]  = or_c[k-1]  | delta0[V-1-k];
    assign and_c[k] = and_c[k-1] & delta0[V-1-k];
  end

  // 1-bit multi-operand adders over the taps.
  always_comb begin
    n_top = CW'(delta0[V-1]);
    n_or  = '0;
    n_and = '0;
    for (int k = 1; k < V; k++) begin
      n_or  = n_or  + CW'(or_c[k]);
      n_and = n_and + CW'(and_c[k]);
    end
  end

  always_comb begin
    case (scheme)
      SCHEME_P2S:  addr = V'(CW'(n_top + n_or + n_and));
      SCHEME_P2SL: addr = V'(CW'(n_top + n_or));
      SCHEME_P2SR: addr = V'(CW'(n_top + n_and));
      default:     addr = delta0;
    endcase
  end

endmodule
