// hfs_rom0: outer-segment table. One word per outer segment, {v1, offset}:
// v1 is the number of input bits used to pick a uniform inner segment inside
// that outer segment (2^v1 inner segments) and offset is the ROM1 address of
// its first inner segment. Depth S0 is 2^v0 (US), 2*v0 (P2S) or v0+1
// (P2SL/P2SR). The contents come from a hex file with one word per line,
// v1 in the upper V1_W bits. Synchronous read (block-RAM style): the word at
// addr appears one clock after it is presented, when en is high.
module hfs_rom0 #(
  parameter int unsigned S0        = 13,                   // depth s0
  parameter int unsigned V1_W      = 5,                    // v1 field width
  parameter int unsigned OFF_W     = 6,                    // offset field width
  parameter string       INIT_FILE = "rtl/hfs_f2_rom0.hex"
) (
  input  logic                   clk,
  input  logic                   en,
  input  logic [$clog2(S0)-1:0]  addr,
  output logic [V1_W-1:0]        v1,
  output logic [OFF_W-1:0]       offset
);

  logic [V1_W+OFF_W-1:0] mem [S0];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk)
    if (en) {v1, offset} <= mem[addr];

endmodule
