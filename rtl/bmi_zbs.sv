// bmi_zbs: single-bit instructions sbset, sbclr, sbinv, sbext.
//
// The bit index is b masked to XLEN-1 (to 31 for the *W forms). A one-hot
// decoder of the index gives the bit mask; set, clear and invert combine it
// with a, extract returns the addressed bit in bit 0. A *W form works on
// a[31:0] and sign-extends the 32-bit result, as in the bitmanip draft.
//
// Interface: op/word from the decoder, a = rs1, b = rs2 or immediate,
// y = result. Combinational.
module bmi_zbs
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

  localparam int IW = $clog2(XLEN);

  logic [IW-1:0]   idx;
  logic [XLEN-1:0] onehot, r;

  assign idx = word ? IW'(b[4:0]) : b[IW-1:0];

  always_comb begin
    for (int i = 0; i < XLEN; i++) onehot[i] = (idx == IW'(i));
  end

  always_comb begin
    unique case (op)
      OP_SBSET: r = a | onehot;
      OP_SBCLR: r = a & ~onehot;
      OP_SBINV: r = a ^ onehot;
      OP_SBEXT: r = XLEN'(|(a & onehot));
      default:  r = '0;
    endcase
    y = word ? XLEN'($signed(r[31:0])) : r;
  end

endmodule
