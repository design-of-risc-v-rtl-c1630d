// bmi_zbf: bit-field place bfp (and bfpw on RV64).
//
// rs2 carries both the data and a control word cfg in its upper half:
// len = cfg[12:8] (RV64) or cfg[11:8] (RV32 and bfpw), a length of 0 meaning
// XLEN/2; off = cfg[5:0] (RV64) or cfg[4:0]. On RV64, cfg[31:30] = 2'b10
// selects the short form, whose cfg is the upper 16 bits of that word. The
// low len bits of rs2, shifted up by off, replace the same bits of rs1:
//   mask = ((1 << len) - 1) << off,  y = ((b << off) & mask) | (a & ~mask).
// The layout is the bitmanip draft's. bfpw applies the 32-bit form to the
// low words and sign-extends the result.
//
// Interface: op/word from the decoder, a = rs1, b = rs2, y = result.
// Combinational.
module bmi_zbf
  import bmi_pkg::*;
#(
  parameter int XLEN = 64
) (
  input  bmi_op_e         op,
  input  logic            word,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);

  localparam int OW = $clog2(XLEN);

  always_comb begin
    logic [31:0]     cfg;
    logic [OW:0]     len;
    logic [OW-1:0]   off;
    logic [XLEN-1:0] mask, data, r;
    logic            narrow;         // 32-bit form (RV32 or bfpw)

    narrow = word || (XLEN == 32);
    if (narrow) begin
      cfg = {16'd0, b[31:16]};
      len = (OW+1)'(cfg[11:8]);
      off = OW'(cfg[4:0]);
      if (len == '0) len = (OW+1)'(16);
    end else begin
      cfg = b[XLEN-1:XLEN-32];
      if (cfg[31:30] == 2'b10) cfg = {16'd0, cfg[31:16]};
      len = (OW+1)'(cfg[12:8]);
      off = OW'(cfg[OW-1:0]);
      if (len == '0) len = (OW+1)'(XLEN / 2);
    end

    mask = '0;
    for (int i = 0; i < XLEN; i++) mask[i] = (i < int'(len));
    mask = mask << off;
    data = b << off;
    r    = (data & mask) | (a & ~mask);
    if (word) r = XLEN'($signed(r[31:0]));
    y = (op == OP_BFP) ? r : '0;
  end

endmodule
