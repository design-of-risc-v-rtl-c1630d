// bmi_shift_rotator: every shift and rotate of the IP on one 2*XLEN-bit
// barrel right rotator.
//
// Operations: slo/sro (shift in ones), rol/ror, the funnel shifts fsl/fsr
// (rs3 supplies the bits shifted in), their immediate and *W forms, and
// slliu.w. The structure is the one the design proposes:
//   1. shift-amount twiddling: shamt = b masked to XLEN-1 (shift, rotate,
//      slliu.w), to 31 (*W) or to 2*XLEN-1 (funnel shifts; 63 for fslw/fsrw);
//   2. mask twiddling builds the 2*XLEN-bit rotator input from src1 and a
//      "mask" half: all ones for slo/sro, src1 for rotates, src3 for funnel
//      shifts. Left operations use {src1, mask}, right ones {mask, src1};
//      *W operations use the 64-bit pattern {mask32, src1_32} twice;
//   3. a two's complement block negates shamt, and right (instr[14] = 1)
//      selects shamt, left selects -shamt: rotating right by -s is rotating
//      left by s;
//   4. the result is the low half for right operations, the high half for
//      left ones, the low 32 bits of that half sign-extended for *W.
//      slliu.w is computed as ~slo(~zext32(src1)), the complement at the
//      output.
// The rotator itself is log2(2*XLEN) stages of 2:1 multiplexers.
// The routing of slliu.w through the ones-shifting path, and the exact
// *W input pattern, are read from the design's block diagram; the masking
// of the W funnel-shift amount to 63 follows the bitmanip draft.
//
// Interface: op/word/right from the decoder, a = rs1, b = rs2 or
// immediate, c = rs3; y = result. Combinational.
module bmi_shift_rotator
  import bmi_pkg::*;
#(
  parameter int XLEN = 64
) (
  input  bmi_op_e         op,
  input  logic            word,
  input  logic            right,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [XLEN-1:0] c,
  output logic [XLEN-1:0] y
);

  localparam int RW = 2 * XLEN;          // rotator width
  localparam int SW = $clog2(RW);        // rotate-amount width

  logic [SW-1:0] shamt, rot_amt;
  logic [XLEN-1:0] src, mask;
  logic [RW-1:0]   rot_in, rot_out;
  logic            funnel;

  assign funnel = (op == OP_FSL) || (op == OP_FSR);

  // 1. shift-amount twiddling
  always_comb begin
    if (funnel)
      shamt = word ? SW'(b[5:0]) : b[SW-1:0];
    else if (word)
      shamt = SW'(b[4:0]);
    else
      shamt = {1'b0, b[SW-2:0]};
  end

  // 2. mask twiddling
  always_comb begin
    src  = (op == OP_SLLIUW) ? ~XLEN'(a[31:0]) : a;
    unique case (op)
      OP_ROL, OP_ROR: mask = a;
      OP_FSL, OP_FSR: mask = c;
      default:        mask = '1;
    endcase
    if (word)
      rot_in = {(RW/64){mask[31:0], src[31:0]}};
    else if (right)
      rot_in = {mask, src};
    else
      rot_in = {src, mask};
  end

  // 3. two's complement block and direction mux (instr[14])
  assign rot_amt = right ? shamt : SW'(-shamt);

  // 2*XLEN-bit barrel right rotator
  always_comb begin
    logic [RW-1:0] x;
    x = rot_in;
    for (int k = 0; k < SW; k++)
      if (rot_amt[k]) x = (x >> (1 << k)) | (x << (RW - (1 << k)));
    rot_out = x;
  end

  // 4. result selection
  always_comb begin
    logic [XLEN-1:0] half;
    half = right ? rot_out[XLEN-1:0] : rot_out[RW-1:XLEN];
    if (word)
      y = XLEN'($signed(half[31:0]));
    else if (op == OP_SLLIUW)
      y = ~half;
    else
      y = half;
  end

endmodule
