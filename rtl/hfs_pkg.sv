// hfs_pkg: types and helpers shared by the hierarchical-segmentation function
// evaluator.
//
// scheme_e names the four outer segmentation schemes of a two-level hierarchy:
// uniform segments (US), powers-of-two segments that shrink towards both ends
// of [0,1) (P2S), towards 0 only (P2SL) and towards 1 only (P2SR). The inner
// level is always uniform. p2s_depth() gives the number of outer segments a
// v0-bit field can address under each scheme (2^v0, 2*v0, v0+1, v0+1).
package hfs_pkg;

  typedef enum logic [1:0] {
    SCHEME_US   = 2'd0,
    SCHEME_P2S  = 2'd1,
    SCHEME_P2SL = 2'd2,
    SCHEME_P2SR = 2'd3
  } scheme_e;

  // Largest polynomial degree supported; binary-point lists have MAX_D + 1
  // entries (c_0 first), entries above the degree in use are ignored.
  localparam int unsigned MAX_D = 4;

  function automatic int unsigned p2s_depth(scheme_e scheme, int unsigned v0);
    case (scheme)
      SCHEME_US:  return 1 << v0;
      SCHEME_P2S: return 2 * v0;
      default:    return v0 + 1;
    endcase
  endfunction

endpackage
