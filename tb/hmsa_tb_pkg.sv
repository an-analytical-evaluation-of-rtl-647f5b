// hmsa_tb_pkg: helpers shared by the HMSA testbenches: instruction builders
// and the two matrix-multiplication programs.
//
// Data layout used by the programs, for an N x N product on a DIM x DIM
// array with s = N/DIM blocks per side (s a power of two):
//   element (g_r, g_c) of a matrix lives in PE(g_r mod DIM, g_c mod DIM) at
//   word base + (g_r / DIM) * s + (g_c / DIM);
//   bases: A at 0, B at s*s, C at 2*s*s.
// Index registers: X1 = k' (step inside a block product, also the broadcast
// offset), X2 = k, X3 = j, X4 = i (block loops).
package hmsa_tb_pkg;
  import hmsa_pkg::*;

  function automatic instr_t i_nop();
    instr_t t;
    t = '0;
    t.op = PE_NOP;
    t.dir = DIR_N;
    t.flow = FL_NEXT;
    return t;
  endfunction

  function automatic instr_t i_pe(pe_op_e op, int rd, int rs, int rt, int imm);
    instr_t t;
    t = i_nop();
    t.op  = op;
    t.rd  = 3'(rd);
    t.rs  = src_t'(rs);
    t.rt  = src_t'(rt);
    t.imm = 16'(imm);
    return t;
  endfunction

  // Effective address/offset imm + (X[xp] << xsh) + X[xq].
  function automatic instr_t with_ea(instr_t t, int imm, int xp, int xsh, int xq);
    t.imm = 16'(imm);
    t.xp  = xidx_t'(xp);
    t.xsh = 4'(xsh);
    t.xq  = xidx_t'(xq);
    return t;
  endfunction

  function automatic instr_t with_loop(instr_t t, int ax, int acnt, int atgt);
    t.flow   = FL_LOOP;
    t.la_x   = xidx_t'(ax);
    t.la_cnt = CNT_W'(acnt);
    t.la_tgt = CM_AW'(atgt);
    return t;
  endfunction

  function automatic instr_t with_loop2(instr_t t, int ax, int acnt, int atgt,
                                        int bx, int bcnt, int btgt);
    t = with_loop(t, ax, acnt, atgt);
    t.flow   = FL_LOOP2;
    t.lb_x   = xidx_t'(bx);
    t.lb_cnt = CNT_W'(bcnt);
    t.lb_tgt = CM_AW'(btgt);
    return t;
  endfunction

  function automatic instr_t i_mode(bit cc);
    instr_t t;
    t = i_nop();
    t.flow = FL_MODE;
    t.mode_cc = cc;
    return t;
  endfunction

  function automatic instr_t i_halt();
    instr_t t;
    t = i_nop();
    t.flow = FL_HALT;
    return t;
  endfunction

  function automatic int log2i(int v);
    int r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // Build the product program into prog[0..len-1].
  //   cc = 0: C = A x B in RC-mode: each row broadcasts a from column
  //           (row + k') mod DIM, b shifts north.
  //   cc = 1: C = B x A in CC-mode: each column broadcasts a from row
  //           (column + k') mod DIM, b shifts west. The program switches to
  //           CC-mode first and back to RC-mode at the end.
  function automatic void matmul_prog(bit cc, int dim, int s,
                                      ref instr_t prog [64], output int len);
    int sh, o, ab, bb, cb;
    sh = log2i(s);
    ab = 0; bb = s * s; cb = 2 * s * s;
    o  = cc ? 1 : 0;
    len = 0;
    if (cc) prog[len++] = i_mode(1'b1);
    prog[len++] = i_pe(PE_MOVI, 2, 0, 0, 0);
    if (!cc) begin
      prog[len++] = with_ea(i_pe(PE_LD, 0, 0, 0, 0), ab, 4, sh, 2);  // A(i,k)
      prog[len++] = with_ea(i_pe(PE_LD, 1, 0, 0, 0), bb, 2, sh, 3);  // B(k,j)
    end else begin
      prog[len++] = with_ea(i_pe(PE_LD, 0, 0, 0, 0), ab, 2, sh, 3);  // A(k,j)
      prog[len++] = with_ea(i_pe(PE_LD, 1, 0, 0, 0), bb, 4, sh, 2);  // B(i,k)
    end
    prog[len++] = with_ea(i_pe(PE_BCAST, 0, 0, 0, 0), 0, 0, 0, 1);
    prog[len++] = i_pe(PE_MUL, 3, SRC_BR, 1, 0);
    prog[len++] = i_pe(PE_ADD, 2, 2, 3, 0);
    prog[len]   = with_loop2(i_pe(PE_SEND, 1, 1, 0, 0), 1, dim, o + 3, 2, s, o + 1);
    prog[len].dir = cc ? DIR_W : DIR_N;
    len++;
    prog[len++] = with_loop2(with_ea(i_pe(PE_ST, 0, 2, 0, 0), cb, 4, sh, 3),
                             3, s, o, 4, s, o);
    if (cc) prog[len++] = i_mode(1'b0);
    prog[len++] = i_halt();
  endfunction

  // Clocks the programs take: the architecture's step count
  // s^2 * (s * (2 + 4*DIM) + 1), plus one accumulator clear per C element
  // block, plus the HALT, plus two mode changes for the CC program.
  function automatic longint matmul_cycles(bit cc, int dim, int s);
    longint steps;
    steps = longint'(s) * s * (longint'(s) * (2 + 4 * dim) + 1);
    return steps + longint'(s) * s + 1 + (cc ? 2 : 0);
  endfunction

endpackage
