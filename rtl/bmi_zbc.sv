// bmi_zbc: carry-less multiply clmul, clmulh, clmulr and their *W forms.
//
// One XLEN x XLEN carry-less product p (2*XLEN bits) is formed as the XOR of
// a shifted by every set bit of b. clmul returns p[XLEN-1:0], clmulh
// p[2*XLEN-1:XLEN], clmulr p[2*XLEN-2:XLEN-1], as in the bitmanip draft.
// The *W forms zero-extend the low 32 bits of both operands into the same
// product and pick p[31:0], p[63:32] or p[62:31], sign-extended; this reuse
// of one array for both widths is this design's choice.
//
// Interface: op/word from the decoder, a = rs1, b = rs2, y = result.
// Combinational.
module bmi_zbc
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

  logic [XLEN-1:0]   ma, mb;
  logic [2*XLEN-1:0] p;

  assign ma = word ? XLEN'(a[31:0]) : a;
  assign mb = word ? XLEN'(b[31:0]) : b;

  always_comb begin
    p = '0;
    for (int i = 0; i < XLEN; i++)
      if (mb[i]) p = p ^ ((2*XLEN)'(ma) << i);
  end

  always_comb begin
    logic [XLEN-1:0] r;
    unique case (op)
      OP_CLMUL:  r = word ? XLEN'($signed(p[31:0]))  : p[XLEN-1:0];
      OP_CLMULH: r = word ? XLEN'($signed(p[63:32])) : p[2*XLEN-1:XLEN];
      OP_CLMULR: r = word ? XLEN'($signed(p[62:31])) : p[2*XLEN-2:XLEN-1];
      default:   r = '0;
    endcase
    y = r;
  end

endmodule
