// bitmanip_ip: RISC-V bit-manipulation execution IP with a result register.
//
// A black box for a coprocessor: each cycle it takes three source operands
// (src1..src3 = rs1..rs3) and a 32-bit instruction, executes the
// bit-manipulation instruction in a single cycle and loads an (XLEN+1)-bit
// result register: result[XLEN:1] holds rd, result[0] is the valid bit. An
// instruction that is not a bit-manipulation instruction clears the valid
// bit (and rd reads 0).
//
// Inside, bmi_decoder folds immediate and *W variants onto one operation,
// the second operand is muxed between src2 and the immediate, and one unit
// per Z-extension group computes its operations:
//   bmi_shift_rotator  slo, sro, rol, ror, fsl, fsr, slliu.w (2*XLEN rotator)
//   bmi_zbb            andn, orn, xnor, clz, ctz, pcnt, min/max, pack, addwu..
//   bmi_zbs / zba / zbt / zbc / zbf / zbe / zbp / zbr / zbm
// A final multiplexer picks the unit that owns the operation.
//
// Timing: combinational from the inputs to the register; result is valid
// the cycle after the inputs are presented (one instruction per cycle).
// Reset (synchronous, active low) clears the register. The clock, reset and
// always-loading register are this design's choices; the port set, the
// result format and XLEN in {32, 64} are the design's own.
module bitmanip_ip
  import bmi_pkg::*;
#(
  parameter int XLEN = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [XLEN-1:0] src1,
  input  logic [XLEN-1:0] src2,
  input  logic [XLEN-1:0] src3,
  input  logic [31:0]     instr,
  output logic [XLEN:0]   result
);

  initial begin
    assert (XLEN == 32 || XLEN == 64)
      else $error("bitmanip_ip: XLEN must be 32 or 64");
  end

  bmi_dec_t        dec;
  logic [XLEN-1:0] opb;
  logic [XLEN-1:0] y_shrot, y_zbb, y_zbs, y_zba, y_zbt, y_zbc, y_zbf,
                   y_zbe, y_zbp, y_zbr, y_zbm;
  logic [XLEN-1:0] rd;

  bmi_decoder #(.XLEN(XLEN)) u_dec (.instr(instr), .dec(dec));

  assign opb = dec.use_imm ? dec.imm[XLEN-1:0] : src2;

  bmi_shift_rotator #(.XLEN(XLEN)) u_shrot (
    .op(dec.op), .word(dec.word), .right(dec.right),
    .a(src1), .b(opb), .c(src3), .y(y_shrot));
  bmi_zbb #(.XLEN(XLEN)) u_zbb (
    .op(dec.op), .word(dec.word), .a(src1), .b(opb), .y(y_zbb));
  bmi_zbs #(.XLEN(XLEN)) u_zbs (
    .op(dec.op), .word(dec.word), .a(src1), .b(opb), .y(y_zbs));
  bmi_zba #(.XLEN(XLEN)) u_zba (
    .op(dec.op), .word(dec.word), .a(src1), .b(opb), .y(y_zba));
  bmi_zbt #(.XLEN(XLEN)) u_zbt (
    .op(dec.op), .a(src1), .b(opb), .c(src3), .y(y_zbt));
  bmi_zbc #(.XLEN(XLEN)) u_zbc (
    .op(dec.op), .word(dec.word), .a(src1), .b(opb), .y(y_zbc));
  bmi_zbf #(.XLEN(XLEN)) u_zbf (
    .op(dec.op), .word(dec.word), .a(src1), .b(opb), .y(y_zbf));
  bmi_zbe #(.XLEN(XLEN)) u_zbe (
    .op(dec.op), .word(dec.word), .a(src1), .b(opb), .y(y_zbe));
  bmi_zbp #(.XLEN(XLEN)) u_zbp (
    .op(dec.op), .word(dec.word), .a(src1), .b(opb), .y(y_zbp));
  bmi_zbr #(.XLEN(XLEN)) u_zbr (
    .op(dec.op), .size(dec.crc_size), .a(src1), .y(y_zbr));
  bmi_zbm #(.XLEN(XLEN)) u_zbm (
    .op(dec.op), .a(src1), .b(opb), .y(y_zbm));

  always_comb begin
    unique case (unit_of(dec.op))
      U_SHROT: rd = y_shrot;
      U_ZBB:   rd = y_zbb;
      U_ZBS:   rd = y_zbs;
      U_ZBA:   rd = y_zba;
      U_ZBT:   rd = y_zbt;
      U_ZBC:   rd = y_zbc;
      U_ZBF:   rd = y_zbf;
      U_ZBE:   rd = y_zbe;
      U_ZBP:   rd = y_zbp;
      U_ZBR:   rd = y_zbr;
      U_ZBM:   rd = y_zbm;
      default: rd = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) result <= '0;
    else        result <= {rd, dec.valid};
  end

endmodule
