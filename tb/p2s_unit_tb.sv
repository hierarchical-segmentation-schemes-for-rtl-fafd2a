// p2s_unit_tb: checks the outer-address unit for v0 = 5 and v0 = 12 in all
// four schemes, over every delta0 value. Expected addresses come from a
// run-length model: count the leading zeros (lz) and leading ones (lo) of
// delta0; P2S gives V - lz for a leading 0 (0 when all bits are 0) and
// V - 1 + lo for a leading 1; P2SL keeps the first rule and maps every
// leading 1 to V; P2SR gives lo; US gives delta0. The ten ranges of the
// v0 = 5 P2S example (00000 -> 0 ... 11111 -> 9) are also checked by value.
module p2s_unit_tb;
  import hfs_pkg::*;

  int checks = 0, failures = 0;

  scheme_e        sc;
  logic [4:0]     d5;
  logic [4:0]     a5;
  logic [11:0]    d12;
  logic [11:0]    a12;

  p2s_unit #(.V(5))  u5  (.scheme(sc), .delta0(d5),  .addr(a5));
  p2s_unit #(.V(12)) u12 (.scheme(sc), .delta0(d12), .addr(a12));

  function automatic int ref_addr(scheme_e s, int v, int d);
    int lz = 0, lo = 0;
    bit top = d[v-1];
    for (int b = v - 1; b >= 0 && !d[b]; b--) lz++;
    for (int b = v - 1; b >= 0 && d[b]; b--)  lo++;
    case (s)
      SCHEME_US:   return d;
      SCHEME_P2SL: return top ? v : (lz == v ? 0 : v - lz);
      SCHEME_P2SR: return lo;
      default:     return top ? v - 1 + lo : (lz == v ? 0 : v - lz);
    endcase
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    scheme_e all [4] = '{SCHEME_US, SCHEME_P2S, SCHEME_P2SL, SCHEME_P2SR};
    // The published v0 = 5 example: one representative per range.
    int ex_in  [10] = '{5'b00000, 5'b00001, 5'b00011, 5'b00101, 5'b01110,
                        5'b10001, 5'b11010, 5'b11101, 5'b11110, 5'b11111};
    sc = SCHEME_P2S;
    foreach (ex_in[i]) begin
      d5 = 5'(ex_in[i]);
      #1;
      checks++;
      if (int'(a5) != i) begin
        failures++;
        $display("ERROR: table example %b -> %0d, expected %0d", d5, a5, i);
      end
    end
    foreach (all[s]) begin
      sc = all[s];
      for (int d = 0; d < 32; d++) begin
        d5 = 5'(d);
        #1;
        checks++;
        if (int'(a5) != ref_addr(sc, 5, d)) begin
          failures++;
          $display("ERROR: V=5 %s %b -> %0d, expected %0d", sc.name(), d5, a5, ref_addr(sc, 5, d));
        end
      end
      for (int d = 0; d < 4096; d++) begin
        d12 = 12'(d);
        #1;
        checks++;
        if (int'(a12) != ref_addr(sc, 12, d)) begin
          failures++;
          if (failures < 10)
            $display("ERROR: V=12 %s %b -> %0d, expected %0d", sc.name(), d12, a12, ref_addr(sc, 12, d));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
