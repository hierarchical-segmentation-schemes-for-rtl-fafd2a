// bit_select_tb: checks the bit selection unit (N = 16, v0 = 12 and v0 = 5)
// in all four schemes on random inputs and random v1. The expected outer
// segment width is derived from the input itself: the outer field consumes
// min(run + 1, v0) bits where run is the length of the leading run of zeros
// (for the small-near-0 side) or ones (for the small-near-1 side), one bit
// for the single wide segment of P2SL / P2SR, and v0 bits for US. x_hat is
// then x minus the start of that segment and delta1 its top v1 bits.
module bit_select_tb;
  import hfs_pkg::*;

  localparam int unsigned N = 16;

  int checks = 0, failures = 0;

  scheme_e       sc;
  logic [N-1:0]  x;
  logic [11:0]   j12;
  logic [4:0]    j5;
  logic [4:0]    v1;
  logic [15:0]   d1_a, d1_b;
  logic [N-1:0]  xh_a, xh_b;

  bit_select #(.N(N), .V0(12), .V1_W(5), .D1_W(16)) u_a
    (.scheme(sc), .x, .j(j12), .v1, .delta1(d1_a), .x_hat(xh_a));
  bit_select #(.N(N), .V0(5), .V1_W(5), .D1_W(16)) u_b
    (.scheme(sc), .x, .j(j5), .v1, .delta1(d1_b), .x_hat(xh_b));

  function automatic int run_len(int v, logic [N-1:0] xv, bit ones);
    int r = 0;
    for (int b = N - 1; b >= N - v && xv[b] == ones; b--) r++;
    return r;
  endfunction

  // Outer address as the P2S unit defines it (checked in its own test).
  function automatic int addr_of(scheme_e s, int v, logic [N-1:0] xv);
    int lz = run_len(v, xv, 1'b0), lo = run_len(v, xv, 1'b1);
    bit top = xv[N-1];
    case (s)
      SCHEME_US:   return int'(xv >> (N - v));
      SCHEME_P2SL: return top ? v : (lz == v ? 0 : v - lz);
      SCHEME_P2SR: return lo;
      default:     return top ? v - 1 + lo : (lz == v ? 0 : v - lz);
    endcase
  endfunction

  function automatic int consumed(scheme_e s, int v, logic [N-1:0] xv);
    int lz = run_len(v, xv, 1'b0), lo = run_len(v, xv, 1'b1);
    bit top = xv[N-1];
    case (s)
      SCHEME_US:   return v;
      SCHEME_P2SL: return top ? 1 : (lz + 1 > v ? v : lz + 1);
      SCHEME_P2SR: return !top ? 1 : (lo + 1 > v ? v : lo + 1);
      default:     return top ? (lo + 1 > v ? v : lo + 1) : (lz + 1 > v ? v : lz + 1);
    endcase
  endfunction

  task automatic check_one(int v, logic [N-1:0] xg, logic [15:0] d1, logic [N-1:0] xh);
    int r = N - consumed(sc, v, xg);
    logic [N-1:0] exp_xh = xg - ((xg >> r) << r);
    logic [N-1:0] exp_d1 = (int'(v1) > r) ? exp_xh : exp_xh >> (r - int'(v1));
    checks += 2;
    if (xh !== exp_xh || d1 !== 16'(exp_d1)) begin
      failures++;
      if (failures < 10)
        $display("ERROR: v0=%0d %s x=%b v1=%0d: x_hat %h delta1 %h, expected %h %h",
                 v, sc.name(), xg, v1, xh, d1, exp_xh, exp_d1);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    scheme_e all [4] = '{SCHEME_US, SCHEME_P2S, SCHEME_P2SL, SCHEME_P2SR};
    foreach (all[s]) begin
      sc = all[s];
      for (int i = 0; i < 4000; i++) begin
        // Bias towards long leading runs so every outer segment is reached.
        x = N'($urandom);
        case ($urandom_range(3))
          0: x = x >> $urandom_range(N - 1);
          1: x = ~(N'(~x) >> $urandom_range(N - 1));
          default: ;
        endcase
        j12 = 12'(addr_of(sc, 12, x));
        j5  = 5'(addr_of(sc, 5, x));
        v1  = 5'($urandom_range(N - consumed(sc, 5, x)));
        if (int'(v1) > N - consumed(sc, 12, x)) v1 = 5'(N - consumed(sc, 12, x));
        #1;
        check_one(12, x, d1_a, xh_a);
        check_one(5, x, d1_b, xh_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
