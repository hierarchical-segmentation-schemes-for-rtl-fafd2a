// hfs_rom1: coefficient table. One word per segment (M segments in all)
// holding the D+1 polynomial coefficients c_D..c_0, each a CW-bit two's
// complement number with its own fixed binary point (chosen when the table is
// generated). In the hex file a word is {c_D, ..., c_1, c_0} with c_0 in the
// least significant bits; coef[k] is c_k. Synchronous read, one clock, gated
// by en, as a block RAM would be.
module hfs_rom1 #(
  parameter int unsigned M         = 47,                   // segments m
  parameter int unsigned D         = 2,                    // polynomial degree d
  parameter int unsigned CW        = 30,                   // coefficient width
  parameter string       INIT_FILE = "rtl/hfs_f2_rom1.hex"
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic [$clog2(M)-1:0]  addr,
  output logic [D:0][CW-1:0]    coef
);

  logic [D:0][CW-1:0] mem [M];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk)
    if (en) coef <= mem[addr];

endmodule
