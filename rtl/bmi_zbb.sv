// bmi_zbb: base bit-manipulation instructions other than shifts/rotates.
//
// andn, orn, xnor; clz, ctz, pcnt; min, max, minu, maxu; pack, packu,
// packh; the RV64 unsigned-word arithmetic addwu (addiwu), subwu, addu.w,
// subu.w; and the *W forms of clz, ctz, pcnt, pack and packu.
// Semantics follow the bitmanip draft:
//   pack  = {b[XLEN/2-1:0], a[XLEN/2-1:0]}, packu = {b[hi], a[hi]},
//   packh = zext({b[7:0], a[7:0]}),
//   addwu = zext32(a + b), subwu = zext32(a - b),
//   addu.w = a + zext32(b), subu.w = a - zext32(b).
// A *W form works on the low 32 bits of its operands and sign-extends the
// 32-bit result. The counters are a priority search (clz/ctz) and an adder
// tree (pcnt) written as loops; the count width is this design's choice.
//
// Interface: op/word from the decoder, a = rs1, b = rs2 or immediate,
// y = result. Combinational.
module bmi_zbb
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

  localparam int HX = XLEN / 2;
  localparam int CW = $clog2(XLEN) + 1;

  logic [XLEN-1:0] cnt_src;      // operand seen by clz/ctz/pcnt
  logic [CW-1:0]   n_bits;       // bits examined by clz/ctz
  logic [CW-1:0]   lz, tz, pc;

  assign n_bits  = word ? CW'(32) : CW'(XLEN);
  assign cnt_src = word ? XLEN'(a[31:0]) : a;

  // leading zeros of the low n_bits bits
  always_comb begin
    logic found;
    lz    = n_bits;
    found = 1'b0;
    for (int i = XLEN - 1; i >= 0; i--) begin
      if (!found && i < int'(n_bits) && cnt_src[i]) begin
        lz    = CW'(int'(n_bits) - 1 - i);
        found = 1'b1;
      end
    end
  end

  // trailing zeros
  always_comb begin
    logic found;
    tz    = n_bits;
    found = 1'b0;
    for (int i = 0; i < XLEN; i++) begin
      if (!found && cnt_src[i]) begin
        tz    = CW'(i);
        found = 1'b1;
      end
    end
  end

  // population count
  always_comb begin
    pc = '0;
    for (int i = 0; i < XLEN; i++) pc = pc + CW'(cnt_src[i]);
  end

  always_comb begin
    logic [XLEN-1:0] r;
    logic [31:0]     s32;
    r   = '0;
    s32 = '0;
    unique case (op)
      OP_ANDN:  r = a & ~b;
      OP_ORN:   r = a | ~b;
      OP_XNOR:  r = ~(a ^ b);
      OP_CLZ:   r = XLEN'(lz);
      OP_CTZ:   r = XLEN'(tz);
      OP_PCNT:  r = XLEN'(pc);
      OP_MIN:   r = ($signed(a) < $signed(b)) ? a : b;
      OP_MAX:   r = ($signed(a) < $signed(b)) ? b : a;
      OP_MINU:  r = (a < b) ? a : b;
      OP_MAXU:  r = (a < b) ? b : a;
      OP_PACK:  r = word ? XLEN'($signed({b[15:0], a[15:0]}))
                         : {b[HX-1:0], a[HX-1:0]};
      OP_PACKU: r = word ? XLEN'($signed({b[31:16], a[31:16]}))
                         : {b[XLEN-1:HX], a[XLEN-1:HX]};
      OP_PACKH: r = XLEN'({b[7:0], a[7:0]});
      OP_ADDWU: begin s32 = a[31:0] + b[31:0]; r = XLEN'(s32); end
      OP_SUBWU: begin s32 = a[31:0] - b[31:0]; r = XLEN'(s32); end
      OP_ADDUW: r = a + XLEN'(b[31:0]);
      OP_SUBUW: r = a - XLEN'(b[31:0]);
      default:  r = '0;
    endcase
    y = r;
  end

endmodule
