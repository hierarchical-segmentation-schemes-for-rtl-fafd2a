// offset_adder_tb: exhaustive check of the ROM1 address adder for 6-bit
// offsets and 6-bit delta1 into a 7-bit address, and a wrapping 4-bit case.
module offset_adder_tb;

  int checks = 0, failures = 0;

  logic [5:0] off6, d6;
  logic [6:0] a7;
  logic [3:0] a4;

  offset_adder #(.OFF_W(6), .D1_W(6), .AW(7)) u7 (.offset(off6), .delta1(d6), .addr(a7));
  offset_adder #(.OFF_W(6), .D1_W(6), .AW(4)) u4 (.offset(off6), .delta1(d6), .addr(a4));

  initial begin
    #10000000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++)
      for (int d = 0; d < 64; d++) begin
        off6 = 6'(o);
        d6   = 6'(d);
        #1;
        checks += 2;
        if (int'(a7) != o + d || int'(a4) != (o + d) % 16) begin
          failures++;
          $display("ERROR: %0d + %0d gave %0d / %0d", o, d, a7, a4);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
