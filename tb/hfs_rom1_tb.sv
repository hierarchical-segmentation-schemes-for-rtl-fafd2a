// hfs_rom1_tb: loads ROM1 (47 words of three 30-bit coefficients) from a
// pattern file in which coefficient k of word i is
// (7919*(k+1)*i + 12345*k + 1) mod 2^30, reads every address in random order
// and checks each coefficient one clock after the address, and that the
// output holds while en is low.
module hfs_rom1_tb;

  int checks = 0, failures = 0;

  logic clk = 1'b0, en = 1'b0;
  logic [5:0] addr = '0;
  logic [2:0][29:0] coef;
  always #5 clk = ~clk;

  hfs_rom1 #(.M(47), .D(2), .CW(30), .INIT_FILE("tb/rom1_pattern.hex")) dut
    (.clk, .en, .addr, .coef);

  function automatic logic [29:0] cval(int i, int k);
    return 30'((longint'(i) * 7919 * (k + 1) + 12345 * k + 1) % (1 << 30));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0][29:0] held;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(46);
      en   <= 1'b1;
      addr <= 6'(a);
      @(posedge clk);
      en   <= 1'b0;
      addr <= 6'($urandom_range(46));
      #1;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (coef[k] !== cval(a, k)) begin
          failures++;
          $display("ERROR: addr %0d c%0d read %h, expected %h", a, k, coef[k], cval(a, k));
        end
      end
      held = coef;
      @(posedge clk);
      #1;
      checks++;
      if (coef !== held) begin
        failures++;
        $display("ERROR: output changed while en was low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
