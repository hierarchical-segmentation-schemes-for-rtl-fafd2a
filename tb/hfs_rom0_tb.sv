// hfs_rom0_tb: loads ROM0 (13 x {5-bit v1, 6-bit offset}) from a pattern
// file whose word i is (37*i + 5) mod 2^11, reads every address in random
// order and checks each word one clock after its address, and that the
// output holds while en is low.
module hfs_rom0_tb;

  int checks = 0, failures = 0;

  logic clk = 1'b0, en = 1'b0;
  logic [3:0] addr = '0;
  logic [4:0] v1;
  logic [5:0] offset;
  always #5 clk = ~clk;

  hfs_rom0 #(.S0(13), .V1_W(5), .OFF_W(6), .INIT_FILE("tb/rom0_pattern.hex")) dut
    (.clk, .en, .addr, .v1, .offset);

  function automatic logic [10:0] word(int i);
    return 11'((37 * i + 5) % 2048);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0] held;
    @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      int a;
      a = $urandom_range(12);
      en   <= 1'b1;
      addr <= 4'(a);
      @(posedge clk);
      en   <= 1'b0;
      addr <= 4'($urandom_range(12));
      #1;
      checks++;
      if ({v1, offset} !== word(a)) begin
        failures++;
        $display("ERROR: addr %0d read %h, expected %h", a, {v1, offset}, word(a));
      end
      held = {v1, offset};
      @(posedge clk);
      #1;
      checks++;
      if ({v1, offset} !== held) begin
        failures++;
        $display("ERROR: output changed while en was low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
