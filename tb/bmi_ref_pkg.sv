// bmi_ref_pkg: bit-serial reference models of the bit-manipulation
// instructions, used by the testbenches to compute expected results.
//
// Each function follows the plain loop definition of the instruction in the
// RISC-V bitmanip draft, not the structure of the RTL (no rotator, no prefix
// counts, no butterfly masks generated by index arithmetic). Values are
// carried in 64 bits; xlen (32 or 64) selects the register width, and a
// 32-bit result is kept zero-extended in the upper half unless sign-extended
// on purpose. The instruction table at the bottom gives an encoding template
// and an operand kind for every instruction, so a testbench can build the
// encoding without the design's decoder.
package bmi_ref_pkg;

  typedef logic [63:0] u64;

  function automatic u64 msk(u64 x, int xlen);
    return (xlen == 64) ? x : {32'd0, x[31:0]};
  endfunction

  function automatic u64 sx32(u64 x);
    return {{32{x[31]}}, x[31:0]};
  endfunction

  function automatic u64 ref_slo(u64 x, int s, int xlen);
    u64 r = x;
    for (int i = 0; i < s; i++) r = (r << 1) | 64'd1;
    return msk(r, xlen);
  endfunction

  function automatic u64 ref_sro(u64 x, int s, int xlen);
    u64 r = msk(x, xlen);
    for (int i = 0; i < s; i++) r = (r >> 1) | (u64'(1) << (xlen - 1));
    return r;
  endfunction

  function automatic u64 ref_rol(u64 x, int s, int xlen);
    u64 r = msk(x, xlen);
    for (int i = 0; i < s; i++) r = msk((r << 1) | u64'(r[xlen-1]), xlen);
    return r;
  endfunction

  function automatic u64 ref_ror(u64 x, int s, int xlen);
    u64 r = msk(x, xlen);
    for (int i = 0; i < s; i++) r = (r >> 1) | (u64'(r[0]) << (xlen - 1));
    return r;
  endfunction

  // funnel shifts: shamt in 0 .. 2*xlen-1
  function automatic u64 ref_fsl(u64 a, u64 b, u64 c, int xlen);
    int s = int'(b % u64'(2 * xlen));
    u64 hi = msk(a, xlen), lo = msk(c, xlen), t;
    if (s >= xlen) begin t = hi; hi = lo; lo = t; s -= xlen; end
    for (int i = 0; i < s; i++) begin
      hi = msk((hi << 1) | u64'(lo[xlen-1]), xlen);
      lo = msk(lo << 1, xlen);
    end
    return hi;
  endfunction

  function automatic u64 ref_fsr(u64 a, u64 b, u64 c, int xlen);
    int s = int'(b % u64'(2 * xlen));
    u64 lo = msk(a, xlen), hi = msk(c, xlen), t;
    if (s >= xlen) begin t = hi; hi = lo; lo = t; s -= xlen; end
    for (int i = 0; i < s; i++) begin
      lo = (lo >> 1) | (u64'(hi[0]) << (xlen - 1));
      hi = hi >> 1;
    end
    return lo;
  endfunction

  function automatic u64 ref_clz(u64 x, int xlen);
    int n = 0;
    for (int i = xlen - 1; i >= 0; i--) begin
      if (x[i]) break;
      n++;
    end
    return u64'(n);
  endfunction

  function automatic u64 ref_ctz(u64 x, int xlen);
    int n = 0;
    for (int i = 0; i < xlen; i++) begin
      if (x[i]) break;
      n++;
    end
    return u64'(n);
  endfunction

  function automatic u64 ref_pcnt(u64 x, int xlen);
    int n = 0;
    for (int i = 0; i < xlen; i++) n += int'(x[i]);
    return u64'(n);
  endfunction

  // grev: result bit i is source bit i ^ k
  function automatic u64 ref_grev(u64 x, int k, int xlen);
    u64 r = '0;
    for (int i = 0; i < xlen; i++) r[i] = x[i ^ k];
    return r;
  endfunction

  // gorc: result bit i is the OR of source bits i ^ m for every m within k
  function automatic u64 ref_gorc(u64 x, int k, int xlen);
    u64 r = '0;
    for (int i = 0; i < xlen; i++)
      for (int j = 0; j < xlen; j++)
        if (((i ^ j) & ~k) == 0 && x[j]) r[i] = 1'b1;
    return r;
  endfunction

  function automatic u64 shfl_stage(u64 src, u64 ml, u64 mr, int n);
    u64 x = src & ~(ml | mr);
    x |= ((src << n) & ml) | ((src >> n) & mr);
    return x;
  endfunction

  function automatic u64 ref_shfl(u64 x, int k, int xlen);
    u64 r = msk(x, xlen);
    if (xlen == 64 && k[4])
      r = shfl_stage(r, 64'h0000ffff00000000, 64'h00000000ffff0000, 16);
    if (k[3]) r = shfl_stage(r, 64'h00ff000000ff0000, 64'h0000ff000000ff00, 8);
    if (k[2]) r = shfl_stage(r, 64'h0f000f000f000f00, 64'h00f000f000f000f0, 4);
    if (k[1]) r = shfl_stage(r, 64'h3030303030303030, 64'h0c0c0c0c0c0c0c0c, 2);
    if (k[0]) r = shfl_stage(r, 64'h4444444444444444, 64'h2222222222222222, 1);
    return r;
  endfunction

  function automatic u64 ref_unshfl(u64 x, int k, int xlen);
    u64 r = msk(x, xlen);
    if (k[0]) r = shfl_stage(r, 64'h4444444444444444, 64'h2222222222222222, 1);
    if (k[1]) r = shfl_stage(r, 64'h3030303030303030, 64'h0c0c0c0c0c0c0c0c, 2);
    if (k[2]) r = shfl_stage(r, 64'h0f000f000f000f00, 64'h00f000f000f000f0, 4);
    if (k[3]) r = shfl_stage(r, 64'h00ff000000ff0000, 64'h0000ff000000ff00, 8);
    if (xlen == 64 && k[4])
      r = shfl_stage(r, 64'h0000ffff00000000, 64'h00000000ffff0000, 16);
    return r;
  endfunction

  function automatic u64 ref_bext(u64 a, u64 m, int xlen);
    u64 r = '0;
    int j = 0;
    for (int i = 0; i < xlen; i++)
      if (m[i]) begin
        if (a[i]) r[j] = 1'b1;
        j++;
      end
    return r;
  endfunction

  function automatic u64 ref_bdep(u64 a, u64 m, int xlen);
    u64 r = '0;
    int j = 0;
    for (int i = 0; i < xlen; i++)
      if (m[i]) begin
        if (a[j]) r[i] = 1'b1;
        j++;
      end
    return r;
  endfunction

  function automatic u64 ref_clmul(u64 a, u64 b, int xlen);
    u64 x = '0;
    for (int i = 0; i < xlen; i++) if (b[i]) x ^= a << i;
    return msk(x, xlen);
  endfunction

  function automatic u64 ref_clmulh(u64 a, u64 b, int xlen);
    u64 x = '0;
    a = msk(a, xlen);
    for (int i = 1; i < xlen; i++) if (b[i]) x ^= a >> (xlen - i);
    return x;
  endfunction

  function automatic u64 ref_clmulr(u64 a, u64 b, int xlen);
    u64 x = '0;
    a = msk(a, xlen);
    for (int i = 0; i < xlen; i++) if (b[i]) x ^= a >> (xlen - i - 1);
    return x;
  endfunction

  function automatic u64 ref_crc(u64 x, int nbits, bit castagnoli, int xlen);
    u64 p = castagnoli ? 64'h82F63B78 : 64'hEDB88320;
    x = msk(x, xlen);
    for (int i = 0; i < nbits; i++) x = (x >> 1) ^ (p & ~(u64'(x[0]) - 1));
    return x;
  endfunction

  function automatic u64 ref_bmatflip(u64 x);
    u64 r = '0;
    for (int i = 0; i < 64; i++) r[(i % 8) * 8 + i / 8] = x[i];
    return r;
  endfunction

  function automatic u64 ref_bmat(u64 a, u64 b, bit use_xor);
    u64 bt = ref_bmatflip(b), r = '0;
    for (int i = 0; i < 64; i++) begin
      logic [7:0] u, v, t;
      u = a[8*(i/8) +: 8];
      v = bt[8*(i%8) +: 8];
      t = u & v;
      r[i] = use_xor ? ^t : |t;
    end
    return r;
  endfunction

  function automatic u64 ref_bfp(u64 a, u64 b, int xlen);
    u64 cfg = msk(b, xlen) >> (xlen / 2), mask, data;
    int len, off;
    if ((cfg >> 30) == 2) cfg = cfg >> 16;
    len = int'((cfg >> 8) & u64'(xlen / 2 - 1));
    off = int'(cfg & u64'(xlen - 1));
    if (len == 0) len = xlen / 2;
    mask = msk(ref_slo(0, len, xlen) << off, xlen);
    data = msk(b << off, xlen);
    return (data & mask) | (msk(a, xlen) & ~mask);
  endfunction

  // ------------------------------------------------------------------
  // Instruction table. kind: "R" rs1,rs2 | "T" rs1,rs2,rs3 (rs3 in [31:27])
  // | "I6" 6-bit immediate in [25:20] | "I5" 5-bit immediate in [24:20]
  // | "FI" rs3 plus 6-bit immediate | "U" rs1 only | "I12" addiwu.
  // w = 1 marks RV64-only instructions.
  typedef struct {
    string       name;
    logic [31:0] enc;
    string       kind;
    bit          w;
  } idesc_t;

  function automatic logic [31:0] r_enc(logic [6:0] f7, logic [2:0] f3,
                                        logic [6:0] opc);
    return {f7, 5'd0, 5'd0, f3, 5'd0, opc};
  endfunction

  localparam logic [6:0] OP = 7'b0110011, OPI = 7'b0010011,
                         OP32 = 7'b0111011, OPI32 = 7'b0011011;

  function automatic void build_table(ref idesc_t t[$]);
    t.delete();
    t.push_back('{"andn",   r_enc(7'b0100000, 3'b111, OP), "R", 0});
    t.push_back('{"orn",    r_enc(7'b0100000, 3'b110, OP), "R", 0});
    t.push_back('{"xnor",   r_enc(7'b0100000, 3'b100, OP), "R", 0});
    t.push_back('{"slo",    r_enc(7'b0010000, 3'b001, OP), "R", 0});
    t.push_back('{"sro",    r_enc(7'b0010000, 3'b101, OP), "R", 0});
    t.push_back('{"rol",    r_enc(7'b0110000, 3'b001, OP), "R", 0});
    t.push_back('{"ror",    r_enc(7'b0110000, 3'b101, OP), "R", 0});
    t.push_back('{"sh1add", r_enc(7'b0010000, 3'b010, OP), "R", 0});
    t.push_back('{"sh2add", r_enc(7'b0010000, 3'b100, OP), "R", 0});
    t.push_back('{"sh3add", r_enc(7'b0010000, 3'b110, OP), "R", 0});
    t.push_back('{"sbclr",  r_enc(7'b0100100, 3'b001, OP), "R", 0});
    t.push_back('{"sbset",  r_enc(7'b0010100, 3'b001, OP), "R", 0});
    t.push_back('{"sbinv",  r_enc(7'b0110100, 3'b001, OP), "R", 0});
    t.push_back('{"sbext",  r_enc(7'b0100100, 3'b101, OP), "R", 0});
    t.push_back('{"gorc",   r_enc(7'b0010100, 3'b101, OP), "R", 0});
    t.push_back('{"grev",   r_enc(7'b0110100, 3'b101, OP), "R", 0});
    t.push_back('{"clmul",  r_enc(7'b0000101, 3'b001, OP), "R", 0});
    t.push_back('{"clmulr", r_enc(7'b0000101, 3'b010, OP), "R", 0});
    t.push_back('{"clmulh", r_enc(7'b0000101, 3'b011, OP), "R", 0});
    t.push_back('{"min",    r_enc(7'b0000101, 3'b100, OP), "R", 0});
    t.push_back('{"max",    r_enc(7'b0000101, 3'b101, OP), "R", 0});
    t.push_back('{"minu",   r_enc(7'b0000101, 3'b110, OP), "R", 0});
    t.push_back('{"maxu",   r_enc(7'b0000101, 3'b111, OP), "R", 0});
    t.push_back('{"shfl",   r_enc(7'b0000100, 3'b001, OP), "R", 0});
    t.push_back('{"unshfl", r_enc(7'b0000100, 3'b101, OP), "R", 0});
    t.push_back('{"bext",   r_enc(7'b0000100, 3'b110, OP), "R", 0});
    t.push_back('{"bdep",   r_enc(7'b0100100, 3'b110, OP), "R", 0});
    t.push_back('{"pack",   r_enc(7'b0000100, 3'b100, OP), "R", 0});
    t.push_back('{"packu",  r_enc(7'b0100100, 3'b100, OP), "R", 0});
    t.push_back('{"packh",  r_enc(7'b0000100, 3'b111, OP), "R", 0});
    t.push_back('{"bfp",    r_enc(7'b0100100, 3'b111, OP), "R", 0});
    t.push_back('{"bmator", r_enc(7'b0000100, 3'b011, OP), "R", 1});
    t.push_back('{"bmatxor",r_enc(7'b0100100, 3'b011, OP), "R", 1});
    t.push_back('{"cmix",   r_enc(7'b0000011, 3'b001, OP), "T", 0});
    t.push_back('{"cmov",   r_enc(7'b0000011, 3'b101, OP), "T", 0});
    t.push_back('{"fsl",    r_enc(7'b0000010, 3'b001, OP), "T", 0});
    t.push_back('{"fsr",    r_enc(7'b0000010, 3'b101, OP), "T", 0});
    t.push_back('{"fsri",   r_enc(7'b0000010, 3'b101, OPI), "FI", 0});
    t.push_back('{"sloi",   r_enc(7'b0010000, 3'b001, OPI), "I6", 0});
    t.push_back('{"sroi",   r_enc(7'b0010000, 3'b101, OPI), "I6", 0});
    t.push_back('{"rori",   r_enc(7'b0110000, 3'b101, OPI), "I6", 0});
    t.push_back('{"sbclri", r_enc(7'b0100100, 3'b001, OPI), "I6", 0});
    t.push_back('{"sbseti", r_enc(7'b0010100, 3'b001, OPI), "I6", 0});
    t.push_back('{"sbinvi", r_enc(7'b0110100, 3'b001, OPI), "I6", 0});
    t.push_back('{"sbexti", r_enc(7'b0100100, 3'b101, OPI), "I6", 0});
    t.push_back('{"gorci",  r_enc(7'b0010100, 3'b101, OPI), "I6", 0});
    t.push_back('{"grevi",  r_enc(7'b0110100, 3'b101, OPI), "I6", 0});
    t.push_back('{"shfli",  r_enc(7'b0000100, 3'b001, OPI), "I5", 0});
    t.push_back('{"unshfli",r_enc(7'b0000100, 3'b101, OPI), "I5", 0});
    t.push_back('{"clz",    r_enc(7'b0110000, 3'b001, OPI) | (32'd0  << 20), "U", 0});
    t.push_back('{"ctz",    r_enc(7'b0110000, 3'b001, OPI) | (32'd1  << 20), "U", 0});
    t.push_back('{"pcnt",   r_enc(7'b0110000, 3'b001, OPI) | (32'd2  << 20), "U", 0});
    t.push_back('{"bmatflip",r_enc(7'b0110000, 3'b001, OPI) | (32'd3 << 20), "U", 1});
    t.push_back('{"crc32.b", r_enc(7'b0110000, 3'b001, OPI) | (32'd16 << 20), "U", 0});
    t.push_back('{"crc32.h", r_enc(7'b0110000, 3'b001, OPI) | (32'd17 << 20), "U", 0});
    t.push_back('{"crc32.w", r_enc(7'b0110000, 3'b001, OPI) | (32'd18 << 20), "U", 0});
    t.push_back('{"crc32.d", r_enc(7'b0110000, 3'b001, OPI) | (32'd19 << 20), "U", 1});
    t.push_back('{"crc32c.b",r_enc(7'b0110000, 3'b001, OPI) | (32'd24 << 20), "U", 0});
    t.push_back('{"crc32c.h",r_enc(7'b0110000, 3'b001, OPI) | (32'd25 << 20), "U", 0});
    t.push_back('{"crc32c.w",r_enc(7'b0110000, 3'b001, OPI) | (32'd26 << 20), "U", 0});
    t.push_back('{"crc32c.d",r_enc(7'b0110000, 3'b001, OPI) | (32'd27 << 20), "U", 1});
    // RV64 only
    t.push_back('{"addwu",  r_enc(7'b0000101, 3'b000, OP32), "R", 1});
    t.push_back('{"subwu",  r_enc(7'b0100101, 3'b000, OP32), "R", 1});
    t.push_back('{"addu.w", r_enc(7'b0000100, 3'b000, OP32), "R", 1});
    t.push_back('{"subu.w", r_enc(7'b0100100, 3'b000, OP32), "R", 1});
    t.push_back('{"addiwu", r_enc(7'b0000000, 3'b100, OPI32), "I12", 1});
    t.push_back('{"slliu.w",r_enc(7'b0000100, 3'b001, OPI32), "I6", 1});
    t.push_back('{"slow",   r_enc(7'b0010000, 3'b001, OP32), "R", 1});
    t.push_back('{"srow",   r_enc(7'b0010000, 3'b101, OP32), "R", 1});
    t.push_back('{"rolw",   r_enc(7'b0110000, 3'b001, OP32), "R", 1});
    t.push_back('{"rorw",   r_enc(7'b0110000, 3'b101, OP32), "R", 1});
    t.push_back('{"sh1addu.w", r_enc(7'b0010000, 3'b010, OP32), "R", 1});
    t.push_back('{"sh2addu.w", r_enc(7'b0010000, 3'b100, OP32), "R", 1});
    t.push_back('{"sh3addu.w", r_enc(7'b0010000, 3'b110, OP32), "R", 1});
    t.push_back('{"sbclrw", r_enc(7'b0100100, 3'b001, OP32), "R", 1});
    t.push_back('{"sbsetw", r_enc(7'b0010100, 3'b001, OP32), "R", 1});
    t.push_back('{"sbinvw", r_enc(7'b0110100, 3'b001, OP32), "R", 1});
    t.push_back('{"sbextw", r_enc(7'b0100100, 3'b101, OP32), "R", 1});
    t.push_back('{"gorcw",  r_enc(7'b0010100, 3'b101, OP32), "R", 1});
    t.push_back('{"grevw",  r_enc(7'b0110100, 3'b101, OP32), "R", 1});
    t.push_back('{"clmulw", r_enc(7'b0000101, 3'b001, OP32), "R", 1});
    t.push_back('{"clmulrw",r_enc(7'b0000101, 3'b010, OP32), "R", 1});
    t.push_back('{"clmulhw",r_enc(7'b0000101, 3'b011, OP32), "R", 1});
    t.push_back('{"shflw",  r_enc(7'b0000100, 3'b001, OP32), "R", 1});
    t.push_back('{"unshflw",r_enc(7'b0000100, 3'b101, OP32), "R", 1});
    t.push_back('{"bextw",  r_enc(7'b0000100, 3'b110, OP32), "R", 1});
    t.push_back('{"bdepw",  r_enc(7'b0100100, 3'b110, OP32), "R", 1});
    t.push_back('{"packw",  r_enc(7'b0000100, 3'b100, OP32), "R", 1});
    t.push_back('{"packuw", r_enc(7'b0100100, 3'b100, OP32), "R", 1});
    t.push_back('{"bfpw",   r_enc(7'b0100100, 3'b111, OP32), "R", 1});
    t.push_back('{"fslw",   r_enc(7'b0000010, 3'b001, OP32), "T", 1});
    t.push_back('{"fsrw",   r_enc(7'b0000010, 3'b101, OP32), "T", 1});
    t.push_back('{"fsriw",  r_enc(7'b0000010, 3'b101, OPI32), "FI", 1});
    t.push_back('{"sloiw",  r_enc(7'b0010000, 3'b001, OPI32), "I5", 1});
    t.push_back('{"sroiw",  r_enc(7'b0010000, 3'b101, OPI32), "I5", 1});
    t.push_back('{"roriw",  r_enc(7'b0110000, 3'b101, OPI32), "I5", 1});
    t.push_back('{"sbclriw",r_enc(7'b0100100, 3'b001, OPI32), "I5", 1});
    t.push_back('{"sbsetiw",r_enc(7'b0010100, 3'b001, OPI32), "I5", 1});
    t.push_back('{"sbinviw",r_enc(7'b0110100, 3'b001, OPI32), "I5", 1});
    t.push_back('{"gorciw", r_enc(7'b0010100, 3'b101, OPI32), "I5", 1});
    t.push_back('{"greviw", r_enc(7'b0110100, 3'b101, OPI32), "I5", 1});
    t.push_back('{"clzw",   r_enc(7'b0110000, 3'b001, OPI32) | (32'd0 << 20), "U", 1});
    t.push_back('{"ctzw",   r_enc(7'b0110000, 3'b001, OPI32) | (32'd1 << 20), "U", 1});
    t.push_back('{"pcntw",  r_enc(7'b0110000, 3'b001, OPI32) | (32'd2 << 20), "U", 1});
  endfunction

  // Expected rd of instruction `name` for rs1 = a, rs2 = b, rs3 = c and
  // immediate imm (already zero- or sign-extended as the encoding implies).
  function automatic u64 ref_exec(string name, u64 a, u64 b, u64 c, u64 imm,
                                  int xlen);
    u64 lo32a = {32'd0, a[31:0]};
    u64 lo32b = {32'd0, b[31:0]};
    int hx = xlen / 2;
    int sh = int'(b & u64'(xlen - 1));
    int si = int'(imm & u64'(xlen - 1));
    int s5 = int'(b[4:0]);
    int i5 = int'(imm[4:0]);
    a = msk(a, xlen); b = msk(b, xlen); c = msk(c, xlen);
    case (name)
      "andn":   return a & ~b & msk('1, xlen);
      "orn":    return msk(a | ~b, xlen);
      "xnor":   return msk(~(a ^ b), xlen);
      "slo":    return ref_slo(a, sh, xlen);
      "sro":    return ref_sro(a, sh, xlen);
      "rol":    return ref_rol(a, sh, xlen);
      "ror":    return ref_ror(a, sh, xlen);
      "sloi":   return ref_slo(a, si, xlen);
      "sroi":   return ref_sro(a, si, xlen);
      "rori":   return ref_ror(a, si, xlen);
      "sh1add": return msk((a << 1) + b, xlen);
      "sh2add": return msk((a << 2) + b, xlen);
      "sh3add": return msk((a << 3) + b, xlen);
      "sbclr":  return a & ~(u64'(1) << sh);
      "sbset":  return a | (u64'(1) << sh);
      "sbinv":  return a ^ (u64'(1) << sh);
      "sbext":  return (a >> sh) & 1;
      "sbclri": return a & ~(u64'(1) << si);
      "sbseti": return a | (u64'(1) << si);
      "sbinvi": return a ^ (u64'(1) << si);
      "sbexti": return (a >> si) & 1;
      "grev":   return ref_grev(a, sh, xlen);
      "gorc":   return ref_gorc(a, sh, xlen);
      "grevi":  return ref_grev(a, si, xlen);
      "gorci":  return ref_gorc(a, si, xlen);
      "shfl":   return ref_shfl(a, int'(b) & (hx - 1), xlen);
      "unshfl": return ref_unshfl(a, int'(b) & (hx - 1), xlen);
      "shfli":  return ref_shfl(a, int'(imm) & (hx - 1), xlen);
      "unshfli":return ref_unshfl(a, int'(imm) & (hx - 1), xlen);
      "clmul":  return ref_clmul(a, b, xlen);
      "clmulh": return ref_clmulh(a, b, xlen);
      "clmulr": return ref_clmulr(a, b, xlen);
      "min":    return (xlen == 64 ? $signed(a) < $signed(b)
                                   : $signed(a[31:0]) < $signed(b[31:0])) ? a : b;
      "max":    return (xlen == 64 ? $signed(a) < $signed(b)
                                   : $signed(a[31:0]) < $signed(b[31:0])) ? b : a;
      "minu":   return (a < b) ? a : b;
      "maxu":   return (a < b) ? b : a;
      "bext":   return ref_bext(a, b, xlen);
      "bdep":   return ref_bdep(a, b, xlen);
      "pack":   return msk(((b << hx) | (a & ((u64'(1) << hx) - 1))), xlen);
      "packu":  return msk(((b >> hx) << hx) | (a >> hx), xlen);
      "packh":  return {48'd0, b[7:0], a[7:0]};
      "bfp":    return ref_bfp(a, b, xlen);
      "bmator": return ref_bmat(a, b, 0);
      "bmatxor":return ref_bmat(a, b, 1);
      "bmatflip": return ref_bmatflip(a);
      "cmix":   return (a & b) | (c & ~b);
      "cmov":   return (b != 0) ? a : c;
      "fsl":    return ref_fsl(a, b, c, xlen);
      "fsr":    return ref_fsr(a, b, c, xlen);
      "fsri":   return ref_fsr(a, imm, c, xlen);
      "clz":    return ref_clz(a, xlen);
      "ctz":    return ref_ctz(a, xlen);
      "pcnt":   return ref_pcnt(a, xlen);
      "crc32.b":  return ref_crc(a, 8, 0, xlen);
      "crc32.h":  return ref_crc(a, 16, 0, xlen);
      "crc32.w":  return ref_crc(a, 32, 0, xlen);
      "crc32.d":  return ref_crc(a, 64, 0, xlen);
      "crc32c.b": return ref_crc(a, 8, 1, xlen);
      "crc32c.h": return ref_crc(a, 16, 1, xlen);
      "crc32c.w": return ref_crc(a, 32, 1, xlen);
      "crc32c.d": return ref_crc(a, 64, 1, xlen);
      // RV64-only word instructions
      "addwu":  return {32'd0, a[31:0] + b[31:0]};
      "subwu":  return {32'd0, a[31:0] - b[31:0]};
      "addiwu": return {32'd0, a[31:0] + imm[31:0]};
      "addu.w": return a + lo32b;
      "subu.w": return a - lo32b;
      "slliu.w":return lo32a << si;
      "slow":   return sx32(ref_slo(lo32a, s5, 32));
      "srow":   return sx32(ref_sro(lo32a, s5, 32));
      "rolw":   return sx32(ref_rol(lo32a, s5, 32));
      "rorw":   return sx32(ref_ror(lo32a, s5, 32));
      "sloiw":  return sx32(ref_slo(lo32a, i5, 32));
      "sroiw":  return sx32(ref_sro(lo32a, i5, 32));
      "roriw":  return sx32(ref_ror(lo32a, i5, 32));
      "sh1addu.w": return (lo32a << 1) + b;
      "sh2addu.w": return (lo32a << 2) + b;
      "sh3addu.w": return (lo32a << 3) + b;
      "sbclrw": return sx32(lo32a & ~(u64'(1) << s5));
      "sbsetw": return sx32(lo32a | (u64'(1) << s5));
      "sbinvw": return sx32(lo32a ^ (u64'(1) << s5));
      "sbextw": return (lo32a >> s5) & 1;
      "sbclriw":return sx32(lo32a & ~(u64'(1) << i5));
      "sbsetiw":return sx32(lo32a | (u64'(1) << i5));
      "sbinviw":return sx32(lo32a ^ (u64'(1) << i5));
      "grevw":  return sx32(ref_grev(lo32a, s5, 32));
      "gorcw":  return sx32(ref_gorc(lo32a, s5, 32));
      "greviw": return sx32(ref_grev(lo32a, i5, 32));
      "gorciw": return sx32(ref_gorc(lo32a, i5, 32));
      "clmulw": return sx32(ref_clmul(lo32a, lo32b, 32));
      "clmulhw":return sx32(ref_clmulh(lo32a, lo32b, 32));
      "clmulrw":return sx32(ref_clmulr(lo32a, lo32b, 32));
      "shflw":  return sx32(ref_shfl(lo32a, int'(b[3:0]), 32));
      "unshflw":return sx32(ref_unshfl(lo32a, int'(b[3:0]), 32));
      "bextw":  return sx32(ref_bext(lo32a, lo32b, 32));
      "bdepw":  return sx32(ref_bdep(lo32a, lo32b, 32));
      "packw":  return sx32({32'd0, b[15:0], a[15:0]});
      "packuw": return sx32({32'd0, b[31:16], a[31:16]});
      "bfpw":   return sx32(ref_bfp(lo32a, lo32b, 32));
      "fslw":   return sx32(ref_fsl(lo32a, b & 63, c, 32));
      "fsrw":   return sx32(ref_fsr(lo32a, b & 63, c, 32));
      "fsriw":  return sx32(ref_fsr(lo32a, imm & 63, c, 32));
      "clzw":   return ref_clz(lo32a, 32);
      "ctzw":   return ref_ctz(lo32a, 32);
      "pcntw":  return ref_pcnt(lo32a, 32);
      default:  return '0;
    endcase
  endfunction

endpackage
