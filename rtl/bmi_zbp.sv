// bmi_zbp: permutations grev, gorc, shfl, unshfl (and immediate/*W forms).
//
// grev (generalized reverse) runs log2(XLEN) butterfly stages; stage k,
// enabled by shamt bit k, swaps neighbouring blocks of 2^k bits. gorc uses
// the same stages but ORs each block with its neighbour instead of swapping.
// rev8 (grevi XLEN-8), rev (grevi XLEN-1) and orc.b (gorci 7) are these
// operations with fixed immediates. shfl (zip) runs log2(XLEN)-1 stages from
// the widest down; stage N swaps the two middle N-bit quarters of every
// 4N-bit block. unshfl runs the same stages from the narrowest up.
// Amounts: grev/gorc use b & (XLEN-1), shfl/unshfl b & (XLEN/2-1), as in the
// bitmanip draft. A *W form places a[31:0] in both halves, masks the amount
// to 31 (15 for shfl), so that no stage crosses bit 31, and sign-extends the
// low word of the result.
//
// Interface: op/word from the decoder, a = rs1, b = rs2 or immediate,
// y = result. Combinational.
module bmi_zbp
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

  localparam int LG = $clog2(XLEN);

  // butterfly-stage mask: bits whose index has bit k clear
  function automatic logic [XLEN-1:0] lo_mask(int k);
    logic [XLEN-1:0] m;
    for (int i = 0; i < XLEN; i++) m[i] = ((i >> k) & 1) == 0;
    return m;
  endfunction

  // shuffle-stage masks for stage width n = 2^k: the upper (L) and lower (R)
  // middle quarters of each 4n-bit block
  function automatic logic [XLEN-1:0] shfl_mask(int k, bit upper);
    logic [XLEN-1:0] m;
    for (int i = 0; i < XLEN; i++)
      m[i] = ((i >> k) & 3) == (upper ? 2 : 1);
    return m;
  endfunction

  logic [XLEN-1:0] src;
  logic [LG-1:0]   amt;
  logic [XLEN-1:0] rev_r, orc_r, shf_r, uns_r;

  assign src = word ? {(XLEN/32){a[31:0]}} : a;

  always_comb begin
    amt = b[LG-1:0];
    for (int k = 5; k < LG; k++) if (word) amt[k] = 1'b0;
    if (op == OP_SHFL || op == OP_UNSHFL) amt[LG-1] = 1'b0;
    if (word && (op == OP_SHFL || op == OP_UNSHFL)) amt[4] = 1'b0;
  end

  always_comb begin
    logic [XLEN-1:0] g, o, m;
    g = src;
    o = src;
    for (int k = 0; k < LG; k++) begin
      m = lo_mask(k);
      if (amt[k]) begin
        g = ((g & m) << (1 << k)) | ((g & ~m) >> (1 << k));
        o = o | ((o & m) << (1 << k)) | ((o & ~m) >> (1 << k));
      end
    end
    rev_r = g;
    orc_r = o;
  end

  always_comb begin
    logic [XLEN-1:0] s, u, ml, mr;
    s = src;
    for (int k = LG - 2; k >= 0; k--) begin
      ml = shfl_mask(k, 1'b1);
      mr = shfl_mask(k, 1'b0);
      if (amt[k])
        s = (s & ~(ml | mr)) | ((s << (1 << k)) & ml) | ((s >> (1 << k)) & mr);
    end
    shf_r = s;
    u = src;
    for (int k = 0; k <= LG - 2; k++) begin
      ml = shfl_mask(k, 1'b1);
      mr = shfl_mask(k, 1'b0);
      if (amt[k])
        u = (u & ~(ml | mr)) | ((u << (1 << k)) & ml) | ((u >> (1 << k)) & mr);
    end
    uns_r = u;
  end

  always_comb begin
    logic [XLEN-1:0] r;
    unique case (op)
      OP_GREV:   r = rev_r;
      OP_GORC:   r = orc_r;
      OP_SHFL:   r = shf_r;
      OP_UNSHFL: r = uns_r;
      default:   r = '0;
    endcase
    y = word ? XLEN'($signed(r[31:0])) : r;
  end

endmodule
