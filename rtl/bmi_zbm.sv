// bmi_zbm: 8x8 bit-matrix instructions bmatflip, bmator, bmatxor (RV64).
//
// A 64-bit register holds an 8x8 bit matrix, byte i being row i and bit j of
// that byte column j. bmatflip transposes it. bmator and bmatxor multiply
// rs1 by rs2: result bit (i, j) is the OR (bmator) or XOR (bmatxor) of
// rs1[i][k] & rs2[k][j] over k, as in the bitmanip draft. The product is
// one AND array with an OR and an XOR reduction per result bit.
// The instructions exist only for XLEN = 64; with XLEN = 32 the unit has
// no function and returns 0 (the decoder rejects the instructions).
//
// Interface: op from the decoder, a = rs1, b = rs2, y = result.
// Combinational.
module bmi_zbm
  import bmi_pkg::*;
#(
  parameter int XLEN = 64
) (
  input  bmi_op_e         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);

  if (XLEN == 64) begin : g_rv64
    logic [63:0] flip, mor, mxor;

    always_comb begin
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          flip[8*j+i] = a[8*i+j];
    end

    always_comb begin
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          logic [7:0] t;
          for (int k = 0; k < 8; k++) t[k] = a[8*i+k] & b[8*k+j];
          mor[8*i+j]  = |t;
          mxor[8*i+j] = ^t;
        end
    end

    always_comb begin
      unique case (op)
        OP_BMATFLIP: y = flip;
        OP_BMATOR:   y = mor;
        OP_BMATXOR:  y = mxor;
        default:     y = '0;
      endcase
    end
  end else begin : g_rv32
    assign y = '0;
  end

endmodule
