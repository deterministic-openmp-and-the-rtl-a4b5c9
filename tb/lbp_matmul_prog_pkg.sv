// lbp_matmul_prog_pkg: integer matrix multiplication Z = X * Y in the fork/join style, for a
// machine of h = 4*ncores harts. X has h lines and h/2 columns, Y h/2 lines and h columns,
// Z is h x h, all 32-bit integers stored line by line from the start of shared memory
// (base and copy versions: X at byte 0, Y at byte 2*h*h, Z at byte 4*h*h; the matrices
// are not spread over the banks on purpose, they fill banks from bank 0 upwards).
// main fills X[n] = n mod 16 and Y[n] = 3n mod 16 (n the element index), then builds a
// team of h members with the same fork protocol as lbp_team_prog_pkg (p_fc / p_fn,
// p_swcv, p_merge, p_syncm, p_jalr, p_lwcv). Member i computes line i of Z with the usual
// inner loop (two loads, a multiplication, an addition, two pointer increments, a count
// and a branch). With copy set (the "copy" version), each member first copies its line of
// X into its local stack and reads it from there. The "distributed" version spreads the
// matrices over the banks: line i of X and of Z in bank i mod ncores, line k of Y in bank
// k mod ncores (four lines of X, two of Y and four of Z per bank), and computes each Y
// address in the inner loop. The members end in order and the last one joins back to main, which exits.
package lbp_matmul_prog_pkg;
  import lbp_asm_pkg::*;

  localparam int L_LOOP = 0, L_FN = 1, L_FORKED = 2, L_LAST = 3, L_THREAD = 4, L_RP = 5,
                 L_START = 6, L_RP2 = 7, L_INIT = 8, L_J = 9, L_K = 10, L_C = 11, L_A0 = 12;
  localparam int V_BASE = 0, V_COPY = 1, V_DIST = 2;
  localparam int BSH = 14;                 // log2 of the shared bank size in bytes
  localparam int BASE = 32'h2000_0000;

  function automatic void build(input int ncores, input int version, ref logic [31:0] prog[$]);
    int lab[16];
    int pc, h, lh, lnc;
    bit copy, spread;
    h = 4 * ncores;
    lh = $clog2(h);
    lnc = $clog2(ncores);
    copy = version == V_COPY;
    spread = version == V_DIST;
    for (int pass = 0; pass < 2; pass++) begin
      pc = 0;
      prog.delete();
      `define E(x) begin prog.push_back(x); pc += 4; end
      `define L(n) begin if (pass == 0) lab[n] = pc; end
      `define OFF(n) (lab[n] - pc)
      `define LI(rd, v) begin `E(lui(rd, ((v) + 32'h800) >>> 12)) `E(addi(rd, rd, (v) - ((((v) + 32'h800) >>> 12) << 12))) end
      // ---- main ----
      `E(addi(T0, ZERO, -1))
      `E(addi(SP, SP, -8))
      `E(sw(RA, SP, 0))
      `E(sw(T0, SP, 4))
      `E(p_set(T0, T0))
      // fill X and Y
      `LI(T2, h * h / 2)
      `E(addi(T1, ZERO, 0))
      `LI(T4, BASE)
      `LI(T3, BASE + 2 * h * h)
      if (!spread) begin
        `L(L_INIT)
        `E(andi(T5, T1, 15))
        `E(sw(T5, T4, 0))
        `E(slli(T6, T1, 1))
        `E(add(T6, T6, T1))
        `E(andi(T6, T6, 15))
        `E(sw(T6, T3, 0))
        `E(addi(T4, T4, 4))
        `E(addi(T3, T3, 4))
        `E(addi(T1, T1, 1))
        `E(blt(T1, T2, `OFF(L_INIT)))
      end else begin                   // element n: X line n/(h/2), Y line n/h
        `LI(S0, BASE)
        `L(L_INIT)
        `E(srli(T3, T1, lh - 1))
        `E(andi(T4, T3, ncores - 1))
        `E(slli(T4, T4, BSH))
        `E(srli(T3, T3, lnc))
        `E(slli(T3, T3, lh + 1))
        `E(add(T4, T4, T3))
        `E(andi(T3, T1, h / 2 - 1))
        `E(slli(T3, T3, 2))
        `E(add(T4, T4, T3))
        `E(add(T4, T4, S0))
        `E(andi(T5, T1, 15))
        `E(sw(T5, T4, 0))
        `E(srli(T3, T1, lh))
        `E(andi(T4, T3, ncores - 1))
        `E(slli(T4, T4, BSH))
        `E(srli(T3, T3, lnc))
        `E(slli(T3, T3, lh + 2))
        `E(add(T4, T4, T3))
        `E(andi(T3, T1, h - 1))
        `E(slli(T3, T3, 2))
        `E(add(T4, T4, T3))
        `E(add(T4, T4, S0))
        `E(addi(T4, T4, 8 * h))
        `E(slli(T6, T1, 1))
        `E(add(T6, T6, T1))
        `E(andi(T6, T6, 15))
        `E(sw(T6, T4, 0))
        `E(addi(T1, T1, 1))
        `E(blt(T1, T2, `OFF(L_INIT)))
      end
      `L(L_A0)
      `E(addi(A0, ZERO, 0))            // a0 = thread address (patched below)
      `E(addi(A1, ZERO, h))
      `E(addi(A2, ZERO, 0))
      `E(jal(RA, `OFF(L_START)))
      `L(L_RP)
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
      // ---- thread body: line a2 of Z ----
      `L(L_THREAD)
      if (!spread) begin
        `LI(S0, BASE)
        `E(slli(T1, A2, lh + 1))         // i * (h/2) * 4
        `E(add(S0, S0, T1))              // s0 = &X[i][0]
        if (copy) begin                  // copy version: line i of X into the local stack
          `E(addi(SP, SP, -2 * h))
          `E(addi(T1, S0, 0))
          `E(addi(T2, SP, 0))
          `E(addi(A4, ZERO, h / 2))
          `L(L_C)
          `E(lw(T3, T1, 0))
          `E(sw(T3, T2, 0))
          `E(addi(T1, T1, 4))
          `E(addi(T2, T2, 4))
          `E(addi(A4, A4, -1))
          `E(bne(A4, ZERO, `OFF(L_C)))
          `E(addi(S0, SP, 0))
        end
        `LI(S1, BASE + 2 * h * h)        // s1 = &Y[0][0]
        `LI(T6, BASE + 4 * h * h)
        `E(slli(T1, A2, lh + 2))         // i * h * 4
        `E(add(T6, T6, T1))              // t6 = &Z[i][0]
        `E(addi(A3, ZERO, 0))            // j
        `L(L_J)
        `E(addi(A5, ZERO, 0))
        `E(addi(T1, S0, 0))
        `E(slli(T2, A3, 2))
        `E(add(T2, T2, S1))
        `E(addi(A4, ZERO, h / 2))
        `L(L_K)
        `E(lw(T3, T1, 0))
        `E(lw(T4, T2, 0))
        `E(mul(T3, T3, T4))
        `E(add(A5, A5, T3))
        `E(addi(T1, T1, 4))
        `E(addi(T2, T2, 4 * h))
        `E(addi(A4, A4, -1))
        `E(bne(A4, ZERO, `OFF(L_K)))
        `E(sw(A5, T6, 0))
        `E(addi(T6, T6, 4))
        `E(addi(A3, A3, 1))
        `E(blt(A3, A1, `OFF(L_J)))
        if (copy) `E(addi(SP, SP, 2 * h))
        `E(p_ret())
      end else begin
        // distributed: X line i and Z line i in bank i mod ncores, Y line k in bank k mod ncores
        `LI(S0, BASE)
        `E(andi(T1, A2, ncores - 1))
        `E(slli(T1, T1, BSH))
        `E(add(S0, S0, T1))              // s0 = base of bank i mod ncores
        `E(srli(T2, A2, lnc))
        `E(slli(T1, T2, lh + 2))
        `E(add(T6, S0, T1))
        `E(addi(T6, T6, 16 * h))         // t6 = &Z[i][0]
        `E(slli(T1, T2, lh + 1))
        `E(add(S0, S0, T1))              // s0 = &X[i][0]
        `LI(S1, BASE + 8 * h)            // Y area of bank 0
        `E(addi(T5, ZERO, h / 2))
        `E(addi(A3, ZERO, 0))
        `L(L_J)
        `E(addi(A5, ZERO, 0))
        `E(addi(T1, S0, 0))
        `E(addi(A4, ZERO, 0))
        `L(L_K)
        `E(lw(T3, T1, 0))
        `E(andi(T2, A4, ncores - 1))
        `E(slli(T2, T2, BSH))
        `E(srli(T4, A4, lnc))
        `E(slli(T4, T4, lh + 2))
        `E(add(T2, T2, T4))
        `E(slli(T4, A3, 2))
        `E(add(T2, T2, T4))
        `E(add(T2, T2, S1))
        `E(lw(T4, T2, 0))
        `E(mul(T3, T3, T4))
        `E(add(A5, A5, T3))
        `E(addi(T1, T1, 4))
        `E(addi(A4, A4, 1))
        `E(blt(A4, T5, `OFF(L_K)))
        `E(sw(A5, T6, 0))
        `E(addi(T6, T6, 4))
        `E(addi(A3, A3, 1))
        `E(blt(A3, A1, `OFF(L_J)))
        `E(p_ret())
      end
      `undef E
      `undef L
      `undef OFF
      `undef LI
      prog[lab[L_A0] / 4] = addi(A0, ZERO, lab[L_THREAD]);
    end
  endfunction

  // reference result
  function automatic int z_ref(input int h, input int i, input int j);
    int s;
    s = 0;
    for (int k = 0; k < h / 2; k++) s += ((i * (h / 2) + k) % 16) * ((3 * (k * h + j)) % 16);
    return s;
  endfunction
endpackage
