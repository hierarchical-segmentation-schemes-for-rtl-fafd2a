// hfs_check: scoreboard for one hfs_eval instance, used by the evaluator
// testbenches. It remembers every accepted input with the clock it entered,
// and for every result checks
//   * the latency (must equal LATENCY clocks),
//   * faithful rounding: |y * 2^-OUT_F - f(x)| < 2^-OUT_F, with f computed
//     in double precision from its formula (f1 = sqrt(-ln x), f2 = x ln x,
//     f3 = the rational function (0.0004x + 0.0002) / (x^4 - 1.96x^3 +
//     1.348x^2 - 0.378x + 0.0373)),
//   * the exception flag, raised exactly for x = 0 when EXC_ZERO is set.
// Nothing is sampled while rst_n is low. Counters are read by the enclosing testbench.
module hfs_check #(
  parameter int unsigned FUNC     = 2,
  parameter int unsigned N        = 16,
  parameter int unsigned OUT_W    = 16,
  parameter int unsigned OUT_F    = 16,
  parameter bit          EXC_ZERO = 1'b1,
  parameter int unsigned LATENCY  = 10
) (
  input logic                    clk,
  input logic                    rst_n,
  input logic                    in_valid,
  input logic [N-1:0]            x,
  input logic                    out_valid,
  input logic signed [OUT_W-1:0] y,
  input logic                    exc
);

  int unsigned checks = 0, failures = 0, results = 0, exceptions = 0;
  real         worst_ulp = 0.0;
  longint unsigned cycle = 0;

  typedef struct { logic [N-1:0] x; longint unsigned t; } item_t;
  item_t q [$];

  function automatic real fref(real xr);
    case (FUNC)
      1:       return $sqrt(-$ln(xr));
      2:       return xr * $ln(xr);
      default: return (0.0004 * xr + 0.0002) /
                      (xr**4 - 1.96 * xr**3 + 1.348 * xr**2 - 0.378 * xr + 0.0373);
    endcase
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid) q.push_back('{x, cycle});
    if (rst_n && out_valid) begin
      item_t it;
      real   xr, err;
      results++;
      if (q.size() == 0) begin
        failures++;
        $display("ERROR: result with no input pending");
      end else begin
        it = q.pop_front();
        checks++;
        if (cycle - it.t != LATENCY) begin
          failures++;
          $display("ERROR: latency %0d, expected %0d", cycle - it.t, LATENCY);
        end
        checks++;
        if (EXC_ZERO && it.x == '0) begin
          exceptions++;
          if (!exc || y != 0) begin
            failures++;
            $display("ERROR: x=0 gave exc=%0b y=%0d", exc, y);
          end
        end else begin
          xr  = real'(it.x) / (2.0 ** N);
          err = (real'(y) / (2.0 ** OUT_F) - fref(xr)) * (2.0 ** OUT_F);
          if (err < 0) err = -err;
          if (err > worst_ulp) worst_ulp = err;
          if (exc || err >= 1.0) begin
            failures++;
            if (failures < 10)
              $display("ERROR: f%0d x=%h y=%0d exc=%0b error %f ulp", FUNC, it.x, y, exc, err);
          end
        end
      end
    end
  end

endmodule
