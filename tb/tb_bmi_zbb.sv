// tb_bmi_zbb: self-checking test of bmi_zbb, the Zbb unit.
//
// Drives every operation of the unit (register and *W forms) with random
// and corner-case operands on an XLEN = 64 instance and, for the operations
// RV32 has, on an XLEN = 32 instance, and compares each result with the
// bit-serial reference model in bmi_ref_pkg. The unit is combinational; a
// free-running clock paces the vectors and drives the watchdog.
module tb_bmi_zbb;
  import bmi_pkg::*;
  import bmi_ref_pkg::*;

  localparam int NVEC = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  bmi_op_e     op;
  logic        word, right;
  logic [1:0]  size;
  logic [63:0] a, b, c;
  logic [63:0] y64;
  logic [31:0] y32;

  bmi_zbb dut64 (.op(op), .word(word), .a(a[63:0]), .b(b[63:0]), .y(y64));
  bmi_zbb #(.XLEN(32)) dut32 (.op(op), .word(word), .a(a[31:0]), .b(b[31:0]), .y(y32));

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic u64 rnd_val();
    u64 r = {$urandom, $urandom};
    unique case ($urandom_range(0, 9))
      0: return '0;
      1: return '1;
      2: return u64'($urandom_range(0, 130));
      3: return u64'(1) << $urandom_range(0, 63);
      4: return r >> $urandom_range(0, 63);
      5: return {32'd0, r[31:0]};
      default: return r;
    endcase
  endfunction

  task automatic check(string name, bit rv64only);
    u64 e;
    @(posedge clk);
    a = rnd_val(); b = rnd_val(); c = rnd_val();
    #1;
    e = ref_exec(name, a, b, c, b, 64);
    checks++;
    if (y64 !== e) begin
      failures++;
      if (failures < 20) $display("FAIL %s XLEN=64 a=%h b=%h c=%h got=%h exp=%h", name, a, b, c, y64, e);
    end
    if (!rv64only) begin
      e = ref_exec(name, a, b, c, b, 32);
      checks++;
      if (y32 !== e[31:0]) begin
        failures++;
        if (failures < 20) $display("FAIL %s XLEN=32 a=%h b=%h c=%h got=%h exp=%h", name, a, b, c, y32, e[31:0]);
      end
    end
  endtask

  initial begin : main
    op = OP_NONE; word = 1'b0; right = 1'b0; size = 2'd0;
    a = '0; b = '0; c = '0;
    for (int v = 0; v < NVEC; v++) begin
      op = OP_ANDN; word = 1'b0;
      check("andn", 1'b0);
      op = OP_ORN; word = 1'b0;
      check("orn", 1'b0);
      op = OP_XNOR; word = 1'b0;
      check("xnor", 1'b0);
      op = OP_CLZ; word = 1'b0;
      check("clz", 1'b0);
      op = OP_CTZ; word = 1'b0;
      check("ctz", 1'b0);
      op = OP_PCNT; word = 1'b0;
      check("pcnt", 1'b0);
      op = OP_MIN; word = 1'b0;
      check("min", 1'b0);
      op = OP_MAX; word = 1'b0;
      check("max", 1'b0);
      op = OP_MINU; word = 1'b0;
      check("minu", 1'b0);
      op = OP_MAXU; word = 1'b0;
      check("maxu", 1'b0);
      op = OP_PACK; word = 1'b0;
      check("pack", 1'b0);
      op = OP_PACKU; word = 1'b0;
      check("packu", 1'b0);
      op = OP_PACKH; word = 1'b0;
      check("packh", 1'b0);
      op = OP_ADDWU; word = 1'b0;
      check("addwu", 1'b1);
      op = OP_SUBWU; word = 1'b0;
      check("subwu", 1'b1);
      op = OP_ADDUW; word = 1'b0;
      check("addu.w", 1'b1);
      op = OP_SUBUW; word = 1'b0;
      check("subu.w", 1'b1);
      op = OP_CLZ; word = 1'b1;
      check("clzw", 1'b1);
      op = OP_CTZ; word = 1'b1;
      check("ctzw", 1'b1);
      op = OP_PCNT; word = 1'b1;
      check("pcntw", 1'b1);
      op = OP_PACK; word = 1'b1;
      check("packw", 1'b1);
      op = OP_PACKU; word = 1'b1;
      check("packuw", 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
