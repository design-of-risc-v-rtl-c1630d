// bmi_decoder: instruction decoder of the bit-manipulation IP.
//
// Purely combinational. It recognises the bit-manipulation instructions in
// the four integer major opcodes (OP, OP-IMM, OP-32, OP-IMM-32) and folds
// each one onto a single operation code: an immediate form decodes to the
// register form with use_imm set and the immediate in imm, a *W form decodes
// to the base operation with word set. Folding the variants in the decoder,
// so that each function exists once in the datapath, is the area-saving idea
// of the design. Any other encoding gives valid = 0.
//
// Encodings follow the RISC-V bitmanip draft of the instruction list this
// IP implements (funct7/funct3 per instruction; rs3 in instr[31:27] and
// instr[26:25] = 2'b11 / 2'b10 for the ternary cmix/cmov and fsl/fsr).
// For XLEN = 32 the RV64-only instructions (OP-32, OP-IMM-32, bmat*,
// crc32.d/crc32c.d) are invalid, and so is a shift immediate with
// instr[25] = 1.
//
// Interface: instr in, dec out (see bmi_pkg::bmi_dec_t). No clock.
module bmi_decoder
  import bmi_pkg::*;
#(
  parameter int XLEN = 64
) (
  input  logic [31:0] instr,
  output bmi_dec_t    dec
);

  logic [6:0] opc, f7;
  logic [5:0] f6;
  logic [2:0] f3;
  logic [4:0] rs2f;
  logic       rv64;

  assign opc  = instr[6:0];
  assign f7   = instr[31:25];
  assign f6   = instr[31:26];
  assign f3   = instr[14:12];
  assign rs2f = instr[24:20];
  assign rv64 = (XLEN == 64);

  always_comb begin
    bmi_op_e op;
    logic    word, use_imm, ok;
    logic [63:0] imm;

    op      = OP_NONE;
    word    = 1'b0;
    use_imm = 1'b0;
    ok      = 1'b1;
    imm     = {58'd0, instr[25:20]};

    unique case (opc)
      // ---------------------------------------------------------------- OP
      OPC_OP: begin
        if (instr[26]) begin
          // ternary: rs3 | 1x | rs2 | rs1 | f3 | rd
          unique case ({instr[25], f3})
            4'b1_001: op = OP_CMIX;
            4'b1_101: op = OP_CMOV;
            4'b0_001: op = OP_FSL;
            4'b0_101: op = OP_FSR;
            default:  op = OP_NONE;
          endcase
        end else begin
          unique case (f7)
            7'b0100000: unique case (f3)
              3'b111: op = OP_ANDN;
              3'b110: op = OP_ORN;
              3'b100: op = OP_XNOR;
              default: op = OP_NONE;
            endcase
            7'b0010000: unique case (f3)
              3'b001: op = OP_SLO;
              3'b101: op = OP_SRO;
              3'b010: op = OP_SH1ADD;
              3'b100: op = OP_SH2ADD;
              3'b110: op = OP_SH3ADD;
              default: op = OP_NONE;
            endcase
            7'b0110000: unique case (f3)
              3'b001: op = OP_ROL;
              3'b101: op = OP_ROR;
              default: op = OP_NONE;
            endcase
            7'b0100100: unique case (f3)
              3'b001: op = OP_SBCLR;
              3'b101: op = OP_SBEXT;
              3'b110: op = OP_BDEP;
              3'b100: op = OP_PACKU;
              3'b011: op = rv64 ? OP_BMATXOR : OP_NONE;
              3'b111: op = OP_BFP;
              default: op = OP_NONE;
            endcase
            7'b0010100: unique case (f3)
              3'b001: op = OP_SBSET;
              3'b101: op = OP_GORC;
              default: op = OP_NONE;
            endcase
            7'b0110100: unique case (f3)
              3'b001: op = OP_SBINV;
              3'b101: op = OP_GREV;
              default: op = OP_NONE;
            endcase
            7'b0000101: unique case (f3)
              3'b001: op = OP_CLMUL;
              3'b010: op = OP_CLMULR;
              3'b011: op = OP_CLMULH;
              3'b100: op = OP_MIN;
              3'b101: op = OP_MAX;
              3'b110: op = OP_MINU;
              3'b111: op = OP_MAXU;
              default: op = OP_NONE;
            endcase
            7'b0000100: unique case (f3)
              3'b001: op = OP_SHFL;
              3'b101: op = OP_UNSHFL;
              3'b110: op = OP_BEXT;
              3'b100: op = OP_PACK;
              3'b011: op = rv64 ? OP_BMATOR : OP_NONE;
              3'b111: op = OP_PACKH;
              default: op = OP_NONE;
            endcase
            default: op = OP_NONE;
          endcase
        end
      end
      // ------------------------------------------------------------ OP-IMM
      OPC_OP_IMM: begin
        use_imm = 1'b1;
        if (instr[26] && f3 == 3'b101) begin
          op = OP_FSR;                               // fsri, 6-bit immediate
        end else begin
          // shift-style immediates: RV32 has only a 5-bit shamt
          if (!rv64 && instr[25]) ok = 1'b0;
          unique case ({f6, f3})
            {6'b001000, 3'b001}: op = OP_SLO;
            {6'b001000, 3'b101}: op = OP_SRO;
            {6'b011000, 3'b101}: op = OP_ROR;
            {6'b010010, 3'b001}: op = OP_SBCLR;
            {6'b001010, 3'b001}: op = OP_SBSET;
            {6'b011010, 3'b001}: op = OP_SBINV;
            {6'b010010, 3'b101}: op = OP_SBEXT;
            {6'b001010, 3'b101}: op = OP_GORC;
            {6'b011010, 3'b101}: op = OP_GREV;
            {6'b000010, 3'b001}: op = OP_SHFL;
            {6'b000010, 3'b101}: op = OP_UNSHFL;
            {6'b011000, 3'b001}: begin
              // unary group: operation in the rs2 field
              use_imm = 1'b0;
              if (instr[25]) ok = 1'b0;
              unique case (rs2f)
                5'b00000: op = OP_CLZ;
                5'b00001: op = OP_CTZ;
                5'b00010: op = OP_PCNT;
                5'b00011: op = rv64 ? OP_BMATFLIP : OP_NONE;
                5'b10000, 5'b10001, 5'b10010: op = OP_CRC32;
                5'b10011: op = rv64 ? OP_CRC32 : OP_NONE;
                5'b11000, 5'b11001, 5'b11010: op = OP_CRC32C;
                5'b11011: op = rv64 ? OP_CRC32C : OP_NONE;
                default:  op = OP_NONE;
              endcase
            end
            default: op = OP_NONE;
          endcase
        end
      end
      // -------------------------------------------------------------- OP-32
      OPC_OP_32: begin
        word = 1'b1;
        if (instr[26]) begin
          unique case ({instr[25], f3})
            4'b0_001: op = OP_FSL;
            4'b0_101: op = OP_FSR;
            default:  op = OP_NONE;
          endcase
        end else begin
          unique case ({f7, f3})
            {7'b0000101, 3'b000}: begin op = OP_ADDWU; word = 1'b0; end
            {7'b0100101, 3'b000}: begin op = OP_SUBWU; word = 1'b0; end
            {7'b0000100, 3'b000}: begin op = OP_ADDUW; word = 1'b0; end
            {7'b0100100, 3'b000}: begin op = OP_SUBUW; word = 1'b0; end
            {7'b0010000, 3'b001}: op = OP_SLO;
            {7'b0010000, 3'b101}: op = OP_SRO;
            {7'b0010000, 3'b010}: op = OP_SH1ADD;
            {7'b0010000, 3'b100}: op = OP_SH2ADD;
            {7'b0010000, 3'b110}: op = OP_SH3ADD;
            {7'b0110000, 3'b001}: op = OP_ROL;
            {7'b0110000, 3'b101}: op = OP_ROR;
            {7'b0100100, 3'b001}: op = OP_SBCLR;
            {7'b0100100, 3'b101}: op = OP_SBEXT;
            {7'b0100100, 3'b110}: op = OP_BDEP;
            {7'b0100100, 3'b100}: op = OP_PACKU;
            {7'b0100100, 3'b111}: op = OP_BFP;
            {7'b0010100, 3'b001}: op = OP_SBSET;
            {7'b0010100, 3'b101}: op = OP_GORC;
            {7'b0110100, 3'b001}: op = OP_SBINV;
            {7'b0110100, 3'b101}: op = OP_GREV;
            {7'b0000101, 3'b001}: op = OP_CLMUL;
            {7'b0000101, 3'b010}: op = OP_CLMULR;
            {7'b0000101, 3'b011}: op = OP_CLMULH;
            {7'b0000100, 3'b001}: op = OP_SHFL;
            {7'b0000100, 3'b101}: op = OP_UNSHFL;
            {7'b0000100, 3'b110}: op = OP_BEXT;
            {7'b0000100, 3'b100}: op = OP_PACK;
            default: op = OP_NONE;
          endcase
        end
        if (!rv64) ok = 1'b0;
      end
      // ---------------------------------------------------------- OP-IMM-32
      OPC_OP_IMM_32: begin
        word    = 1'b1;
        use_imm = 1'b1;
        if (f3 == 3'b100) begin
          op   = OP_ADDWU;                            // addiwu
          word = 1'b0;
          imm  = {{52{instr[31]}}, instr[31:20]};
        end else if (instr[26] && f3 == 3'b101) begin
          op = OP_FSR;                                // fsriw
        end else if (f6 == 6'b000010 && f3 == 3'b001) begin
          op   = OP_SLLIUW;                           // slliu.w, 6-bit shamt
          word = 1'b0;
        end else begin
          imm = {59'd0, instr[24:20]};
          unique case ({f7, f3})
            {7'b0010000, 3'b001}: op = OP_SLO;
            {7'b0010000, 3'b101}: op = OP_SRO;
            {7'b0110000, 3'b101}: op = OP_ROR;
            {7'b0100100, 3'b001}: op = OP_SBCLR;
            {7'b0010100, 3'b001}: op = OP_SBSET;
            {7'b0110100, 3'b001}: op = OP_SBINV;
            {7'b0010100, 3'b101}: op = OP_GORC;
            {7'b0110100, 3'b101}: op = OP_GREV;
            {7'b0110000, 3'b001}: begin
              use_imm = 1'b0;
              unique case (rs2f)
                5'b00000: op = OP_CLZ;
                5'b00001: op = OP_CTZ;
                5'b00010: op = OP_PCNT;
                default:  op = OP_NONE;
              endcase
            end
            default: op = OP_NONE;
          endcase
        end
        if (!rv64) ok = 1'b0;
      end
      default: op = OP_NONE;
    endcase

    if (!ok) op = OP_NONE;

    dec.valid    = (op != OP_NONE);
    dec.op       = op;
    dec.word     = word && (op != OP_NONE);
    dec.use_imm  = use_imm && (op != OP_NONE);
    dec.imm      = imm;
    dec.right    = instr[14];
    dec.crc_size = instr[21:20];
  end

endmodule
