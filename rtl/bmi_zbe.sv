// bmi_zbe: bit extract bext and bit deposit bdep (and their *W forms).
//
// b is the mask. rank[i], the number of mask bits below bit i, is a prefix
// count of b. bext gathers: result bit rank[i] receives a[i] for every set
// mask bit i. bdep scatters: result bit i is a[rank[i]] where b[i] is set,
// 0 elsewhere. This is the function of the bitmanip draft; building it from
// prefix counts is this design's choice. A *W form uses the low 32 bits of
// both operands and sign-extends the 32-bit result.
//
// Interface: op/word from the decoder, a = rs1 (data), b = rs2 (mask),
// y = result. Combinational.
module bmi_zbe
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

  localparam int RK = $clog2(XLEN) + 1;

  logic [XLEN-1:0] da, mk, ext, dep;
  logic [RK-1:0]   rank [XLEN];

  assign da = word ? XLEN'(a[31:0]) : a;
  assign mk = word ? XLEN'(b[31:0]) : b;

  always_comb begin
    rank[0] = '0;
    for (int i = 1; i < XLEN; i++) rank[i] = rank[i-1] + RK'(mk[i-1]);
  end

  always_comb begin
    ext = '0;
    for (int j = 0; j < XLEN; j++)
      for (int i = j; i < XLEN; i++)
        if (mk[i] && da[i] && rank[i] == RK'(j)) ext[j] = 1'b1;
  end

  always_comb begin
    for (int i = 0; i < XLEN; i++)
      dep[i] = mk[i] && da[rank[i][RK-2:0]];
  end

  always_comb begin
    logic [XLEN-1:0] r;
    unique case (op)
      OP_BEXT: r = ext;
      OP_BDEP: r = dep;
      default: r = '0;
    endcase
    y = word ? XLEN'($signed(r[31:0])) : r;
  end

endmodule
