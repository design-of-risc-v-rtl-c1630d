// bmi_zba: address calculation sh1add, sh2add, sh3add and shNaddu.w.
//
// y = (a << N) + b with N = 1, 2 or 3. The .uw form (word = 1, RV64 only)
// zero-extends the low 32 bits of a before the shift, for indexing with an
// unsigned 32-bit index, as in the bitmanip draft.
//
// Interface: op/word from the decoder, a = rs1, b = rs2, y = result.
// Combinational.
module bmi_zba
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

  logic [XLEN-1:0] idx;

  assign idx = word ? XLEN'(a[31:0]) : a;

  always_comb begin
    unique case (op)
      OP_SH1ADD: y = (idx << 1) + b;
      OP_SH2ADD: y = (idx << 2) + b;
      OP_SH3ADD: y = (idx << 3) + b;
      default:   y = '0;
    endcase
  end

endmodule
