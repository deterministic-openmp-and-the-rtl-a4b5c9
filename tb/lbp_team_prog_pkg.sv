// lbp_team_prog_pkg: the Deterministic-OpenMP-style test program run by the top-level
// testbenches, and its expected results.
//
// main (hart 0 of core 0) builds a team of NMEM = 4*ncores members, one per hart, with the
// fork protocol: allocate a hart (p_fc inside a core, p_fn on the last hart of a core),
// send ra, t0, a0, a1, a2 to its continuation-value area (p_swcv), merge the identities
// (p_merge), wait for the writes (p_syncm), call the thread body locally and start the
// continuation remotely (p_jalr). The continuation restores its registers (p_lwcv) and
// loops. The last member calls the body directly and, after its return, joins back to
// main with p_ret (ra != 0). Member i stores i*i+1 (a multiplication) to word i of shared
// bank i mod ncores (mostly a distant access through the routers). Member 1 sends 1 to
// result buffer 2 of main (same core), member 5 sends 5 to result buffer 1 of main
// (backward line); main's own body waits for both with p_lwre and stores them to bank 0
// words 500 and 501. After the join, main reads back all member words, stores their sum
// to bank 0 word 502, and exits with p_ret (ra = 0, t0 = -1).
package lbp_team_prog_pkg;
  import lbp_asm_pkg::*;

  localparam int L_LOOP = 0, L_FN = 1, L_FORKED = 2, L_LAST = 3, L_THREAD = 4, L_SKIP1 = 5,
                 L_SKIP2 = 6, L_SKIP3 = 7, L_RP = 8, L_SUM = 9, L_START = 10, L_RP2 = 11;

  function automatic void build(input int ncores, input int sh_shift, ref logic [31:0] prog[$]);
    int lab[16];
    int pc;
    int nmem;
    nmem = 4 * ncores;
    for (int pass = 0; pass < 2; pass++) begin
      pc = 0;
      prog.delete();
      // ---- main ----
      `define E(x) begin prog.push_back(x); pc += 4; end
      `define L(n) begin if (pass == 0) lab[n] = pc; end
      `define OFF(n) (lab[n] - pc)
      `E(addi(T0, ZERO, -1))
      `E(addi(SP, SP, -8))
      `E(sw(RA, SP, 0))
      `E(sw(T0, SP, 4))
      `E(p_set(T0, T0))
      `E(addi(A0, ZERO, 0))            // a0 = thread address (patched below)
      `E(addi(A1, ZERO, nmem))
      `E(addi(A2, ZERO, 0))
      `E(jal(RA, `OFF(L_START)))
      `L(L_RP)
      // sum the members' words
      `E(addi(A3, ZERO, 0))
      `E(addi(A4, ZERO, 0))
      `L(L_SUM)
      `E(andi(T2, A4, ncores - 1))
      `E(slli(T2, T2, sh_shift))
      `E(lui(T4, 32'h20000))
      `E(add(T2, T2, T4))
      `E(slli(T5, A4, 2))
      `E(add(T2, T2, T5))
      `E(lw(T1, T2, 0))
      `E(add(A3, A3, T1))
      `E(addi(A4, A4, 1))
      `E(blt(A4, A1, `OFF(L_SUM)))
      `E(lui(T4, 32'h20000))
      `E(sw(A3, T4, 502 * 4))
      `E(lw(RA, SP, 0))
      `E(lw(T0, SP, 4))
      `E(addi(SP, SP, 8))
      `E(p_ret())
      // ---- team creation ----
      `L(L_START)
      `L(L_LOOP)
      `E(addi(T1, A1, -1))
      `E(beq(A2, T1, `OFF(L_LAST)))
      `E(andi(T2, A2, 3))
      `E(addi(T3, ZERO, 3))
      `E(beq(T2, T3, `OFF(L_FN)))
      `E(p_fc(T6))
      `E(jal(ZERO, `OFF(L_FORKED)))
      `L(L_FN)
      `E(p_fn(T6))
      `L(L_FORKED)
      `E(p_swcv(T6, RA, 0))
      `E(p_swcv(T6, T0, 4))
      `E(p_swcv(T6, A0, 8))
      `E(p_swcv(T6, A1, 12))
      `E(addi(T5, A2, 1))
      `E(p_swcv(T6, T5, 16))
      `E(p_merge(T0, T0, T6))
      `E(p_syncm())
      `E(p_jalr(RA, A0, T0))
      // continuation (runs on the allocated hart)
      `E(p_lwcv(RA, 0))
      `E(p_lwcv(T0, 4))
      `E(p_lwcv(A0, 8))
      `E(p_lwcv(A1, 12))
      `E(p_lwcv(A2, 16))
      `E(jal(ZERO, `OFF(L_LOOP)))
      `L(L_LAST)
      `E(addi(SP, SP, -8))
      `E(sw(RA, SP, 0))
      `E(sw(T0, SP, 4))
      `E(p_set(T0, T0))
      `E(jalr(RA, A0, 0))
      `L(L_RP2)
      `E(lw(RA, SP, 0))
      `E(lw(T0, SP, 4))
      `E(addi(SP, SP, 8))
      `E(p_ret())
      // ---- thread body: a2 = member index ----
      `L(L_THREAD)
      `E(mul(T1, A2, A2))
      `E(addi(T1, T1, 1))
      `E(andi(T2, A2, ncores - 1))
      `E(slli(T2, T2, sh_shift))
      `E(lui(T4, 32'h20000))
      `E(add(T2, T2, T4))
      `E(slli(T5, A2, 2))
      `E(add(T2, T2, T5))
      `E(sw(T1, T2, 0))
      `E(addi(T3, ZERO, 5))
      `E(bne(A2, T3, `OFF(L_SKIP1)))
      `E(p_swre(ZERO, A2, 1))
      `L(L_SKIP1)
      `E(addi(T3, ZERO, 1))
      `E(bne(A2, T3, `OFF(L_SKIP3)))
      `E(p_swre(ZERO, A2, 2))
      `L(L_SKIP3)
      `E(bne(A2, ZERO, `OFF(L_SKIP2)))
      `E(p_lwre(T1, 1))
      `E(p_lwre(T3, 2))
      `E(lui(T4, 32'h20000))
      `E(sw(T1, T4, 500 * 4))
      `E(sw(T3, T4, 501 * 4))
      `L(L_SKIP2)
      `E(p_ret())
      `undef E
      `undef L
      `undef OFF
      prog[5] = addi(A0, ZERO, lab[L_THREAD]);
    end
  endfunction

  function automatic int expected_sum(input int ncores);
    int s;
    s = 0;
    for (int i = 0; i < 4 * ncores; i++) s += i * i + 1;
    return s;
  endfunction
endpackage
