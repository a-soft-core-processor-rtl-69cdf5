// tb_asm_pkg: instruction encoders used by the testbenches, plus a generator
// of straight-line reduction programs for the accelerator.
//
// The generator builds the word-level reduction of a polynomial g(x) of
// degree <= 2m-2 modulo f(x) = x^m + x^a + x^b + x^c + 1 (b = c = 0 for a
// trinomial) on w-bit words. g is held in ECC registers e1.. (word i in
// e(1+i)). For every word i lying wholly above x^m, from the top down, and
// for each term k of r(x) = x^a + x^b + x^c + 1, the word is moved down by
// d = m - k bits: word i - d/w gets it shifted right by d mod w and the word
// below gets it shifted left by w - (d mod w). Parts that land in word i
// itself are kept for the next pass. The word holding x^m is then split: its
// bits at and above x^m (t = word >> (m mod w), u = t << (m mod w)) are
// cleared and u is folded in the same way. A pass lowers the degree bound D
// to D - m + a; passes repeat until D < m. Only XOR and shifts by the
// amounts (m-k) mod w and w - ((m-k) mod w) are used.
package tb_asm_pkg;
  import ecc_pkg::*;

  function automatic logic [31:0] r_type(logic [5:0] fn, logic [4:0] rs, logic [4:0] rt,
                                         logic [4:0] rd, logic [4:0] sh = 5'd0);
    return {6'h00, rs, rt, rd, sh, fn};
  endfunction

  function automatic logic [31:0] i_type(logic [5:0] op, logic [4:0] rs, logic [4:0] rt,
                                         logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic logic [31:0] j_type(logic [5:0] op, logic [25:0] idx);
    return {op, idx};
  endfunction

  function automatic logic [31:0] e_xor(logic [4:0] rd, logic [4:0] rs, logic [4:0] rt);
    return {OP_COP2, rs, rt, rd, 2'b00, 3'd0, EFN_XOR};
  endfunction

  function automatic logic [31:0] e_sll(logic [4:0] rd, logic [4:0] rs, logic [2:0] sel);
    return {OP_COP2, rs, 5'd0, rd, 2'b00, sel, EFN_SLL};
  endfunction

  function automatic logic [31:0] e_srl(logic [4:0] rd, logic [4:0] rs, logic [2:0] sel);
    return {OP_COP2, rs, 5'd0, rd, 2'b00, sel, EFN_SRL};
  endfunction

  function automatic logic [31:0] e_ld(logic [4:0] et, logic [4:0] base, logic [15:0] off);
    return {OP_LWC2, base, et, off};
  endfunction

  function automatic logic [31:0] e_st(logic [4:0] et, logic [4:0] base, logic [15:0] off);
    return {OP_SWC2, base, et, off};
  endfunction

  // ---------------------------------------------------------------- generator
  localparam logic [4:0] ET = 5'd29, EX = 5'd30, EU = 5'd31;
  localparam logic [4:0] RB_IN = 5'd24, RB_OUT = 5'd25, RFLAG = 5'd26;

  // emitters for either target
  typedef struct { bit sw; int w, m, a, b, c; } tgt_t;

  function automatic logic [4:0] rg(tgt_t t, logic [4:0] r);
    if (!t.sw) return r;
    return (r == ET) ? 5'd19 : (r == EX) ? 5'd20 : (r == EU) ? 5'd21 : r;
  endfunction

  function automatic logic [31:0] x_xor(tgt_t t, logic [4:0] d, logic [4:0] s, logic [4:0] r);
    return t.sw ? r_type(FN_XOR, rg(t, s), rg(t, r), rg(t, d)) : e_xor(d, s, r);
  endfunction

  function automatic logic [31:0] x_sll(tgt_t t, logic [4:0] d, logic [4:0] s, logic [2:0] sel);
    return t.sw ? r_type(FN_SLL, 5'd0, rg(t, s), rg(t, d), 5'(shift_amount(t.w, t.m, t.a, t.b, t.c, sel)))
                : e_sll(d, s, sel);
  endfunction

  function automatic logic [31:0] x_srl(tgt_t t, logic [4:0] d, logic [4:0] s, logic [2:0] sel);
    return t.sw ? r_type(FN_SRL, 5'd0, rg(t, s), rg(t, d), 5'(shift_amount(t.w, t.m, t.a, t.b, t.c, sel)))
                : e_srl(d, s, sel);
  endfunction

  typedef logic [31:0] prog_t[$];

  // terms of r(x) as (exponent, shift-selector index)
  function automatic void terms(int a, int b, int c, ref int k[$], ref int idx[$]);
    k = {a}; idx = {0};
    if (b != 0) begin k.push_back(b); idx.push_back(1); end
    if (c != 0) begin k.push_back(c); idx.push_back(2); end
    k.push_back(0); idx.push_back(3);
  endfunction

  // move the value in register 'src', lying in word i, down by x^m -> r(x)
  function automatic void fold(ref prog_t p, input tgt_t tg, int i,
                               logic [4:0] src, bit keep_self);
    int k[$], idx[$];
    int w = tg.w, m = tg.m;
    terms(tg.a, tg.b, tg.c, k, idx);
    foreach (k[j]) begin
      int d   = m - k[j];
      int q   = d / w;
      int r   = d % w;
      int tgt = i - q;
      if (r == 0) begin
        p.push_back(x_xor(tg, 5'(1 + tgt), 5'(1 + tgt), src));
      end else begin
        if (tgt != i || keep_self) begin
          p.push_back(x_srl(tg, EX, src, 3'(idx[j])));
          p.push_back(x_xor(tg, 5'(1 + tgt), 5'(1 + tgt), EX));
        end
        if (tgt - 1 >= 0) begin
          p.push_back(x_sll(tg, EX, src, 3'(4 + idx[j])));
          p.push_back(x_xor(tg, 5'(tgt), 5'(tgt), EX));
        end
      end
    end
  endfunction

  // complete reduction program: reads ceil((2m-1)/w) lines from byte address
  // in_base, writes ceil(m/w) lines to out_base, then stores 1 to done_addr
  // and spins. line_bytes is the data-memory line size in bytes.
  function automatic prog_t reduction_program(int w, m, a, b, c, int line_bytes,
                                              int in_base, int out_base, int done_addr,
                                              bit sw = 1'b0);
    prog_t p;
    tgt_t tg = '{sw, w, m, a, b, c};
    int n2 = (2 * m - 1 + w - 1) / w;
    int n  = (m + w - 1) / w;
    int s  = m % w;
    int dd = 2 * m - 2;
    p.push_back(i_type(OP_ADDIU, 5'd0, RB_IN, 16'(in_base)));
    p.push_back(i_type(OP_ADDIU, 5'd0, RB_OUT, 16'(out_base)));
    for (int i = 0; i < n2; i++)
      p.push_back(sw ? i_type(OP_LW, RB_IN, 5'(1 + i), 16'(i * line_bytes))
                     : e_ld(5'(1 + i), RB_IN, 16'(i * line_bytes)));
    while (dd >= m) begin
      int top = dd / w;
      int nd  = dd - m + a;
      for (int i = top; i >= n; i--) begin
        // parts that stay in word i itself, collected in ET
        int k[$], idx[$];
        bit have_self = 0;
        terms(a, b, c, k, idx);
        foreach (k[j]) if ((m - k[j]) < w && (m - k[j]) % w != 0) begin
          if (!have_self) p.push_back(x_srl(tg, ET, 5'(1 + i), 3'(idx[j])));
          else begin
            p.push_back(x_srl(tg, EX, 5'(1 + i), 3'(idx[j])));
            p.push_back(x_xor(tg, ET, ET, EX));
          end
          have_self = 1;
        end
        fold(p, tg, i, 5'(1 + i), 1'b0);
        if (have_self) p.push_back(x_xor(tg, 5'(1 + i), ET, 5'd0));
        else if (i * w <= nd) p.push_back(x_xor(tg, 5'(1 + i), 5'd0, 5'd0));
      end
      if (s != 0) begin
        int pw = n - 1;
        p.push_back(x_srl(tg, ET, 5'(1 + pw), 3'd3));
        p.push_back(x_sll(tg, EU, ET, 3'd3));
        p.push_back(x_xor(tg, 5'(1 + pw), 5'(1 + pw), EU));
        fold(p, tg, pw, EU, 1'b1);
      end
      dd = nd;
    end
    for (int i = 0; i < n; i++)
      p.push_back(sw ? i_type(OP_SW, RB_OUT, 5'(1 + i), 16'(i * line_bytes))
                     : e_st(5'(1 + i), RB_OUT, 16'(i * line_bytes)));
    p.push_back(i_type(OP_ADDIU, 5'd0, RFLAG, 16'd1));
    p.push_back(i_type(OP_SW, 5'd0, RFLAG, 16'(done_addr)));
    p.push_back(i_type(OP_BEQ, 5'd0, 5'd0, 16'hFFFF));
    p.push_back(NOP);
    return p;
  endfunction

  // bit-serial reference: g mod f, MSB first (shift-and-xor of r(x))
  function automatic logic [1023:0] poly_mod(logic [1023:0] g, int m, a, b, c);
    for (int i = 1023; i >= m; i--)
      if (g[i]) begin
        g[i] = 1'b0;
        g[i - m + a] ^= 1'b1;
        if (b != 0) g[i - m + b] ^= 1'b1;
        if (c != 0) g[i - m + c] ^= 1'b1;
        g[i - m] ^= 1'b1;
      end
    return g;
  endfunction
endpackage
