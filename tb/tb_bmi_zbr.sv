// tb_bmi_zbr: self-checking test of bmi_zbr, the Zbr unit.
//
// Drives every operation of the unit (register and *W forms) with random
// and corner-case operands on an XLEN = 64 instance and, for the operations
// RV32 has, on an XLEN = 32 instance, and compares each result with the
// bit-serial reference model in bmi_ref_pkg. The unit is combinational; a
// free-running clock paces the vectors and drives the watchdog.
// It also runs the unit as a software CRC would, over the nine bytes
// "123456789", and compares with the published check values of CRC-32
// (CBF43926) and CRC-32C (E3069283).
module tb_bmi_zbr;
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

  bmi_zbr dut64 (.op(op), .size(size), .a(a[63:0]), .y(y64));
  bmi_zbr #(.XLEN(32)) dut32 (.op(op), .size(size), .a(a[31:0]), .y(y32));

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
      op = OP_CRC32; word = 1'b0; size = 2'd0;
      check("crc32.b", 1'b0);
      op = OP_CRC32; word = 1'b0; size = 2'd1;
      check("crc32.h", 1'b0);
      op = OP_CRC32; word = 1'b0; size = 2'd2;
      check("crc32.w", 1'b0);
      op = OP_CRC32; word = 1'b0; size = 2'd3;
      check("crc32.d", 1'b1);
      op = OP_CRC32C; word = 1'b0; size = 2'd0;
      check("crc32c.b", 1'b0);
      op = OP_CRC32C; word = 1'b0; size = 2'd1;
      check("crc32c.h", 1'b0);
      op = OP_CRC32C; word = 1'b0; size = 2'd2;
      check("crc32c.w", 1'b0);
      op = OP_CRC32C; word = 1'b0; size = 2'd3;
      check("crc32c.d", 1'b1);
    end

    // standard check values: CRC over "123456789", one crc32[c].b per byte
    for (int poly = 0; poly < 2; poly++) begin
      u64 crc;
      string msg;
      msg = "123456789";
      crc = 64'h00000000ffffffff;
      op = poly ? OP_CRC32C : OP_CRC32; size = 2'd0; word = 1'b0;
      for (int i = 0; i < msg.len(); i++) begin
        @(posedge clk);
        a = crc ^ u64'(msg[i]);
        #1;
        crc = y64;
      end
      crc = ~crc & 64'h00000000ffffffff;
      checks++;
      if (crc !== (poly ? 64'hE3069283 : 64'hCBF43926)) begin
        failures++;
        $display("FAIL CRC check value poly=%0d got=%h", poly, crc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
