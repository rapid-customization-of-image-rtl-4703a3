// tta_asm_pkg: helpers for writing processor programs in testbenches.
// mv() builds a register/port-to-port move, im() an immediate move, and
// ins() packs up to three moves into one instruction (unused slots empty).
package tta_asm_pkg;
  import tta_pkg::*;

  function automatic move_t nopm();
    return '{guard: G_NEVER, src: SOCK_W'(S_IMM), dst: SOCK_W'(D_NONE), imm: '0};
  endfunction

  function automatic move_t mv(input int src, input int dst, input guard_e g = G_ALWAYS);
    return '{guard: g, src: SOCK_W'(src), dst: SOCK_W'(dst), imm: '0};
  endfunction

  function automatic move_t im(input int value, input int dst, input guard_e g = G_ALWAYS);
    return '{guard: g, src: SOCK_W'(S_IMM), dst: SOCK_W'(dst), imm: IMM_W'(value)};
  endfunction

  function automatic instr_t ins(input move_t m0, input move_t m1 = nopm(),
                                 input move_t m2 = nopm());
    instr_t i;
    i[0] = m0;
    i[1] = m1;
    i[2] = m2;
    return i;
  endfunction
endpackage
