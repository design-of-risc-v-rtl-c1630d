// bmi_zbt: ternary instructions cmix and cmov.
//
// cmix: y = (a & b) | (c & ~b), a bitwise select of rs1 or rs3 under the
// mask rs2. cmov: y = (b != 0) ? a : c. The funnel shifts fsl/fsr/fsri of
// the same extension share the 2*XLEN rotator in bmi_shift_rotator, as the
// design's shifter diagram routes them, so they are not repeated here.
//
// Interface: op from the decoder, a = rs1, b = rs2, c = rs3, y = result.
// Combinational.
module bmi_zbt
  import bmi_pkg::*;
#(
  parameter int XLEN = 64
) (
  input  bmi_op_e         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [XLEN-1:0] c,
  output logic [XLEN-1:0] y
);

  always_comb begin
    unique case (op)
      OP_CMIX: y = (a & b) | (c & ~b);
      OP_CMOV: y = (|b) ? a : c;
      default: y = '0;
    endcase
  end

endmodule
