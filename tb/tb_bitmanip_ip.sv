// tb_bitmanip_ip: end-to-end test of bitmanip_ip at its default XLEN = 64.
//
// Every instruction of the reference table (all RV32 and RV64 forms) is
// encoded from its template with random register numbers and immediates,
// and issued with random and corner-case operands, one instruction per
// clock. The result register must show {expected rd, valid = 1} exactly one
// cycle later, which checks the single-cycle latency and the one-per-cycle
// rate. Expected values come from bmi_ref_pkg, bit-serial models written
// independently of the RTL. Non-bit-manipulation encodings must clear the
// valid bit, and reset must clear the register.
//
// The testbench also counts, from inside the design, how often each
// mechanism was exercised: every execution unit, immediate folding, *W
// folding, left (negated amount) and right rotation, funnel shifts whose
// amount swaps the two halves, the slliu.w complement path, invalid
// instructions and reset. A mechanism that never happened is a failure.
module tb_bitmanip_ip;
  import bmi_ref_pkg::*;
  import bmi_pkg::*;

  localparam int XLEN   = 64;   // bitmanip_ip default
  localparam int NVEC   = 40;   // vectors per instruction
  localparam int NUNITS = 12;

  logic            clk = 1'b0;
  logic            rst_n;
  logic [XLEN-1:0] src1, src2, src3;
  logic [31:0]     instr;
  logic [XLEN:0]   result;

  bitmanip_ip dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ coverage
  int n_unit [NUNITS];
  int n_word, n_imm, n_invalid, n_left, n_right, n_swap, n_slliuw, n_reset;

  always @(posedge clk) begin
    cycles++;
    if (!rst_n) n_reset++;
    else begin
      n_unit[int'(unit_of(dut.dec.op))]++;
      if (dut.dec.word)    n_word++;
      if (dut.dec.use_imm) n_imm++;
      if (!dut.dec.valid)  n_invalid++;
      if (unit_of(dut.dec.op) == U_SHROT) begin
        if (dut.dec.right) n_right++; else n_left++;
        if ((dut.dec.op == OP_FSL || dut.dec.op == OP_FSR) && !dut.dec.word
            && int'(dut.u_shrot.shamt) >= XLEN) n_swap++;
        if (dut.dec.op == OP_SLLIUW) n_slliuw++;
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  function automatic u64 rnd_val();
    u64 r = {$urandom, $urandom};
    unique case ($urandom_range(0, 9))
      0: return '0;
      1: return '1;
      2: return u64'($urandom_range(0, 130));
      3: return u64'(1) << $urandom_range(0, 63);
      4: return r >> $urandom_range(0, 63);
      5: return {32'd0, r[31:0]};
      6: return {32'hffffffff, r[31:0]};
      default: return r;
    endcase
  endfunction

  // apply one instruction, check the register one clock later
  task automatic issue(logic [31:0] ins, u64 a, u64 b, u64 c,
                       u64 exp_rd, bit exp_valid, string what);
    logic [XLEN:0] exp;
    @(negedge clk);
    instr = ins; src1 = a[XLEN-1:0]; src2 = b[XLEN-1:0]; src3 = c[XLEN-1:0];
    exp = {exp_rd[XLEN-1:0], exp_valid};
    @(posedge clk);
    #1;
    checks++;
    if (result !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s instr=%08h a=%h b=%h c=%h got=%h exp=%h",
                 what, ins, a, b, c, result, exp);
    end
  endtask

  idesc_t tab[$];

  initial begin : main
    logic [31:0] ins;
    u64 a, b, c, imm;
    int ntested;
    rst_n = 1'b0; instr = '0; src1 = '0; src2 = '0; src3 = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (result !== '0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;

    build_table(tab);
    ntested = 0;
    foreach (tab[t]) begin
      if (tab[t].w && XLEN == 32) continue;
      ntested++;
      for (int v = 0; v < NVEC; v++) begin
        a = rnd_val(); b = rnd_val(); c = rnd_val(); imm = '0;
        ins = tab[t].enc | {20'd0, 5'($urandom), 7'd0}     // rd
                         | {12'd0, 5'($urandom), 15'd0};   // rs1
        unique case (tab[t].kind)
          "R":  ins |= {7'd0, 5'($urandom), 20'd0};
          "T":  ins |= {5'($urandom), 2'd0, 5'($urandom), 20'd0};
          "U":  ;
          "I6": begin
            imm = u64'($urandom_range(0, XLEN - 1));
            ins |= {6'd0, imm[5:0], 20'd0};
          end
          "I5": begin
            imm = u64'($urandom_range(0, 31));
            ins |= {7'd0, imm[4:0], 20'd0};
          end
          "FI": begin
            imm = u64'($urandom_range(0, 63));
            ins |= {5'($urandom), 1'b0, imm[5:0], 20'd0};
          end
          "I12": begin
            automatic logic [11:0] i12 = 12'($urandom);
            imm = {{52{i12[11]}}, i12};
            ins |= {i12, 20'd0};
          end
          default: $fatal(1, "bad kind");
        endcase
        issue(ins, a, b, c, msk(ref_exec(tab[t].name, a, b, c, imm, XLEN), XLEN),
              1'b1, tab[t].name);
      end
    end

    // encodings that are not bit-manipulation instructions
    issue(32'h00b50533, 1, 2, 3, '0, 1'b0, "add");       // add  a0,a0,a1
    issue(32'h40b50533, 1, 2, 3, '0, 1'b0, "sub");       // sub
    issue(32'h00a51513, 1, 2, 3, '0, 1'b0, "slli");      // slli
    issue(32'h0000a083, 1, 2, 3, '0, 1'b0, "lw");        // load
    issue(32'h02b50533, 1, 2, 3, '0, 1'b0, "mul");       // M extension
    issue(32'h60451513, 1, 2, 3, '0, 1'b0, "unary-4");   // unused unary slot
    for (int k = 0; k < 50; k++) begin
      ins = $urandom;
      ins[6:0] = 7'b0100011;                             // store opcode
      issue(ins, rnd_val(), rnd_val(), rnd_val(), '0, 1'b0, "store");
    end

    // reset in the middle of a stream
    @(negedge clk);
    instr = tab[0].enc; src1 = '1; src2 = '0; rst_n = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (result !== '0) begin failures++; $display("FAIL mid-stream reset"); end
    rst_n = 1'b1;

    // mechanism coverage
    $display("instructions tested: %0d, cycles: %0d", ntested, cycles);
    for (int u = 1; u < NUNITS; u++) begin
      $display("unit %s used %0d times", bmi_unit_e'(u), n_unit[u]);
      checks++;
      if (n_unit[u] == 0) begin failures++; $display("FAIL unit never used"); end
    end
    $display("word=%0d imm=%0d invalid=%0d left=%0d right=%0d swap=%0d slliu.w=%0d reset=%0d",
             n_word, n_imm, n_invalid, n_left, n_right, n_swap, n_slliuw, n_reset);
    checks++;
    if (n_word == 0 || n_imm == 0 || n_invalid == 0 || n_left == 0 || n_right == 0
        || n_swap == 0 || n_slliuw == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
