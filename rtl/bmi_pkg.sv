// bmi_pkg: types and constants shared by the bit-manipulation IP.
//
// The decoder folds every instruction onto one operation code (bmi_op_e).
// Immediate forms (slli-style "...i" instructions, addiwu) become the
// register form with use_imm set, and the RV64 "*W" forms become the base
// operation with word set. The execution units receive only the folded
// operation, so one function serves the register, immediate and word form.
// Grouping of operations into units follows the Z-extension split of the
// bitmanip draft (Zbb, Zbs, Zbr, Zbm, Zba, Zbt, Zbc, Zbf, Zbe, Zbp); the
// numeric values of the enum are this design's own.
package bmi_pkg;

  // Major opcodes (instr[6:0]) used by bit-manipulation instructions.
  localparam logic [6:0] OPC_OP        = 7'b0110011;
  localparam logic [6:0] OPC_OP_IMM    = 7'b0010011;
  localparam logic [6:0] OPC_OP_32     = 7'b0111011;
  localparam logic [6:0] OPC_OP_IMM_32 = 7'b0011011;

  typedef enum logic [5:0] {
    OP_NONE,
    // Zbb logic, counts, min/max, pack, unsigned-word arithmetic
    OP_ANDN, OP_ORN, OP_XNOR,
    OP_CLZ, OP_CTZ, OP_PCNT,
    OP_MIN, OP_MAX, OP_MINU, OP_MAXU,
    OP_PACK, OP_PACKU, OP_PACKH,
    OP_ADDWU, OP_SUBWU, OP_ADDUW, OP_SUBUW,
    // Shift rotator (Zbb shifts/rotates, Zbt funnel shifts, slliu.w)
    OP_SLO, OP_SRO, OP_ROL, OP_ROR, OP_FSL, OP_FSR, OP_SLLIUW,
    // Zbs
    OP_SBSET, OP_SBCLR, OP_SBINV, OP_SBEXT,
    // Zba
    OP_SH1ADD, OP_SH2ADD, OP_SH3ADD,
    // Zbt
    OP_CMIX, OP_CMOV,
    // Zbc
    OP_CLMUL, OP_CLMULH, OP_CLMULR,
    // Zbf
    OP_BFP,
    // Zbe
    OP_BEXT, OP_BDEP,
    // Zbp
    OP_GREV, OP_GORC, OP_SHFL, OP_UNSHFL,
    // Zbr
    OP_CRC32, OP_CRC32C,
    // Zbm
    OP_BMATFLIP, OP_BMATOR, OP_BMATXOR
  } bmi_op_e;

  // Execution unit that produces the result of an operation.
  typedef enum logic [3:0] {
    U_NONE, U_ZBB, U_SHROT, U_ZBS, U_ZBA, U_ZBT, U_ZBC, U_ZBF, U_ZBE, U_ZBP,
    U_ZBR, U_ZBM
  } bmi_unit_e;

  // Output of the decoder. imm is sign-extended instr[31:20] for addiwu and
  // the zero-extended shift/control immediate for every other "...i" form.
  typedef struct packed {
    logic       valid;     // instruction is a bit-manipulation instruction
    bmi_op_e    op;        // folded operation
    logic       word;      // *W form: 32-bit semantic, sign-extended result
    logic       use_imm;   // operand b is imm instead of src2
    logic [63:0] imm;      // immediate operand (low XLEN bits are used)
    logic       right;     // instr[14]: right-going shift/rotate
    logic [1:0] crc_size;  // instr[21:20]: CRC over 8 << crc_size bits
  } bmi_dec_t;

  function automatic bmi_unit_e unit_of(bmi_op_e op);
    unique case (op)
      OP_ANDN, OP_ORN, OP_XNOR, OP_CLZ, OP_CTZ, OP_PCNT, OP_MIN, OP_MAX,
      OP_MINU, OP_MAXU, OP_PACK, OP_PACKU, OP_PACKH, OP_ADDWU, OP_SUBWU,
      OP_ADDUW, OP_SUBUW:                               return U_ZBB;
      OP_SLO, OP_SRO, OP_ROL, OP_ROR, OP_FSL, OP_FSR, OP_SLLIUW:
                                                        return U_SHROT;
      OP_SBSET, OP_SBCLR, OP_SBINV, OP_SBEXT:           return U_ZBS;
      OP_SH1ADD, OP_SH2ADD, OP_SH3ADD:                  return U_ZBA;
      OP_CMIX, OP_CMOV:                                 return U_ZBT;
      OP_CLMUL, OP_CLMULH, OP_CLMULR:                   return U_ZBC;
      OP_BFP:                                           return U_ZBF;
      OP_BEXT, OP_BDEP:                                 return U_ZBE;
      OP_GREV, OP_GORC, OP_SHFL, OP_UNSHFL:             return U_ZBP;
      OP_CRC32, OP_CRC32C:                              return U_ZBR;
      OP_BMATFLIP, OP_BMATOR, OP_BMATXOR:               return U_ZBM;
      default:                                          return U_NONE;
    endcase
  endfunction

endpackage
