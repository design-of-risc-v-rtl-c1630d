// tb_bmi_decoder: self-checking test of bmi_decoder.
//
// Every instruction of the reference table is encoded with random register
// numbers and immediates and decoded by an XLEN = 64 and an XLEN = 32
// instance. The expected folded operation, word and immediate flags are
// derived here from the instruction's mnemonic (strip a trailing "w" for a
// *W form, then a trailing "i" for an immediate form), not from the
// decoder's tables. The test also checks the immediate value, the crc size
// field, that RV64-only instructions and RV32 shift immediates with
// instr[25] = 1 are invalid at XLEN = 32, and that encodings of other
// extensions are invalid.
module tb_bmi_decoder;
  import bmi_pkg::*;
  import bmi_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] instr;
  bmi_dec_t    d64, d32;

  bmi_decoder                dut64 (.instr(instr), .dec(d64));
  bmi_decoder #(.XLEN(32))   dut32 (.instr(instr), .dec(d32));

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bmi_op_e base_op(string n);
    case (n)
      "andn": return OP_ANDN;     "orn": return OP_ORN;     "xnor": return OP_XNOR;
      "clz": return OP_CLZ;       "ctz": return OP_CTZ;     "pcnt": return OP_PCNT;
      "min": return OP_MIN;       "max": return OP_MAX;
      "minu": return OP_MINU;     "maxu": return OP_MAXU;
      "pack": return OP_PACK;     "packu": return OP_PACKU; "packh": return OP_PACKH;
      "addwu": return OP_ADDWU;   "subwu": return OP_SUBWU;
      "addu.w": return OP_ADDUW;  "subu.w": return OP_SUBUW;
      "addiwu": return OP_ADDWU;  "slliu.w": return OP_SLLIUW;
      "slo": return OP_SLO;       "sro": return OP_SRO;
      "rol": return OP_ROL;       "ror": return OP_ROR;
      "fsl": return OP_FSL;       "fsr": return OP_FSR;
      "sbset": return OP_SBSET;   "sbclr": return OP_SBCLR;
      "sbinv": return OP_SBINV;   "sbext": return OP_SBEXT;
      "sh1add": return OP_SH1ADD; "sh2add": return OP_SH2ADD; "sh3add": return OP_SH3ADD;
      "sh1addu.": return OP_SH1ADD; "sh2addu.": return OP_SH2ADD; "sh3addu.": return OP_SH3ADD;
      "cmix": return OP_CMIX;     "cmov": return OP_CMOV;
      "clmul": return OP_CLMUL;   "clmulh": return OP_CLMULH; "clmulr": return OP_CLMULR;
      "bfp": return OP_BFP;       "bext": return OP_BEXT;   "bdep": return OP_BDEP;
      "grev": return OP_GREV;     "gorc": return OP_GORC;
      "shfl": return OP_SHFL;     "unshfl": return OP_UNSHFL;
      "bmatflip": return OP_BMATFLIP; "bmator": return OP_BMATOR; "bmatxor": return OP_BMATXOR;
      default: return OP_NONE;
    endcase
  endfunction

  // expected decode of a table entry
  task automatic expect_of(idesc_t e, output bmi_op_e op, output bit word,
                           output bit use_imm);
    string n = e.name;
    bit special = (n == "addwu" || n == "subwu" || n == "addu.w" || n == "subu.w"
                   || n == "addiwu" || n == "slliu.w" || n == "bmator"
                   || n == "bmatxor" || n == "bmatflip");
    use_imm = (e.kind != "R" && e.kind != "T" && e.kind != "U");
    word = 1'b0;
    if (n.substr(0, 4) == "crc32") begin
      op = (n.substr(0, 5) == "crc32c") ? OP_CRC32C : OP_CRC32;
      return;
    end
    if (special) begin
      op = base_op(n);
      return;
    end
    if (e.w) begin
      word = 1'b1;
      n = n.substr(0, n.len() - 2);          // drop the "w"
    end
    if (use_imm) n = n.substr(0, n.len() - 2);   // drop the "i"
    op = base_op(n);
  endtask

  idesc_t tab[$];

  localparam logic [31:0] OTHER [8] = '{32'h00b50533, 32'h40b50533, 32'h00a51513,
    32'h0000a083, 32'h02b50533, 32'h60451513, 32'h0005053b, 32'h00000073};

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s instr=%08h d64=%p d32=%p", what, instr, d64, d32);
    end
  endtask

  initial begin : main
    bmi_op_e op;
    bit word, use_imm;
    logic [63:0] imm;
    build_table(tab);
    foreach (tab[t]) begin
      expect_of(tab[t], op, word, use_imm);
      if (op == OP_NONE) begin
        failures++;
        $display("FAIL no expectation for %s", tab[t].name);
      end
      for (int v = 0; v < 20; v++) begin
        @(posedge clk);
        instr = tab[t].enc | {20'd0, 5'($urandom), 7'd0} | {12'd0, 5'($urandom), 15'd0};
        imm = '0;
        unique case (tab[t].kind)
          "R":  instr |= {7'd0, 5'($urandom), 20'd0};
          "T":  instr |= {5'($urandom), 2'd0, 5'($urandom), 20'd0};
          "U":  ;
          "I6": begin imm = 64'($urandom_range(0, 31)); instr |= {6'd0, imm[5:0], 20'd0}; end
          "I5": begin imm = 64'($urandom_range(0, 31)); instr |= {7'd0, imm[4:0], 20'd0}; end
          "FI": begin
            imm = 64'($urandom_range(0, 63));
            instr |= {5'($urandom), 1'b0, imm[5:0], 20'd0};
          end
          "I12": begin
            automatic logic [11:0] i12 = 12'($urandom);
            imm = {{52{i12[11]}}, i12};
            instr |= {i12, 20'd0};
          end
          default: ;
        endcase
        #1;
        chk(d64.valid && d64.op == op && d64.word == word && d64.use_imm == use_imm,
            tab[t].name);
        if (use_imm) chk(d64.imm == imm, {tab[t].name, " imm"});
        chk(d64.right == instr[14], "right");
        if (tab[t].name.substr(0, 4) == "crc32")
          chk(d64.crc_size == instr[21:20], "crc size");
        if (tab[t].w)
          chk(!d32.valid && d32.op == OP_NONE, {tab[t].name, " invalid on RV32"});
        else
          chk(d32.valid && d32.op == op && d32.word == word && d32.use_imm == use_imm,
              {tab[t].name, " RV32"});
        // RV32: a shift immediate with bit 25 set is not a valid encoding
        if (!tab[t].w && tab[t].kind == "I6") begin
          instr[25] = 1'b1;
          #1;
          chk(!d32.valid, {tab[t].name, " RV32 shamt[5]"});
          chk(d64.valid, {tab[t].name, " RV64 shamt[5]"});
        end
      end
    end
    // other extensions and base instructions
    // add, sub, slli, lw, mul, unused unary slot 4, addw, ecall
    for (int k = 0; k < 8; k++) begin
      @(posedge clk);
      instr = OTHER[k];
      #1;
      chk(!d64.valid && !d32.valid, "non-bitmanip encoding");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
