// bmi_zbr: CRC instructions crc32.{b,h,w,d} and crc32c.{b,h,w,d}.
//
// Each instruction advances a bit-reflected CRC register (rs1) over the
// 8, 16, 32 or 64 low-order message bits already XORed into it, one bit per
// stage: x = (x >> 1) ^ (POLY & {XLEN{x[0]}}), with POLY = 0xEDB88320
// (CRC-32) or 0x82F63B78 (CRC-32C). The stages form one unrolled chain
// and the result is tapped after 8 << size stages. This is the function of
// the bitmanip draft; software still XORs each message chunk into rs1.
//
// Interface: op from the decoder, size = instr[21:20] (0: .b, 1: .h, 2: .w,
// 3: .d, RV64 only), a = rs1, y = result. Combinational.
module bmi_zbr
  import bmi_pkg::*;
#(
  parameter int XLEN = 64
) (
  input  bmi_op_e         op,
  input  logic [1:0]      size,
  input  logic [XLEN-1:0] a,
  output logic [XLEN-1:0] y
);

  localparam logic [31:0] POLY_CRC32  = 32'hEDB88320;
  localparam logic [31:0] POLY_CRC32C = 32'h82F63B78;

  logic [XLEN-1:0] poly;
  logic [XLEN-1:0] tap [4];

  assign poly = XLEN'((op == OP_CRC32C) ? POLY_CRC32C : POLY_CRC32);

  always_comb begin
    logic [XLEN-1:0] x;
    x = a;
    for (int i = 0; i < 4; i++) tap[i] = '0;
    for (int i = 1; i <= XLEN; i++) begin
      x = (x >> 1) ^ (poly & {XLEN{x[0]}});
      if (i == 8)  tap[0] = x;
      if (i == 16) tap[1] = x;
      if (i == 32) tap[2] = x;
      if (i == 64) tap[3] = x;
    end
  end

  assign y = (op == OP_CRC32 || op == OP_CRC32C) ? tap[size] : '0;

endmodule
