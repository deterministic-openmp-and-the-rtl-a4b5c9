// tb_lbp_core: test of one LBP core on its own (core number 3, no neighbours).
//
// Runs a program on hart 0 that exercises the ALU, multiply/divide, shared-bank and stack
// loads/stores with bytes, a counted loop (branches), p_set/p_merge, then a local fork:
// p_fc, p_swcv, p_syncm and p_jalr start hart 1, which reads the value back with p_lwcv,
// adds 100 and sends it to hart 0 with p_swre; hart 0 waits for it with p_lwre, stores it
// and exits with p_ret. Hart 1's p_ret must wait for hart 0's ending-hart signal.
// Results are read from the shared bank and compared with values computed here.
// Also checks the fetch rule of a lone hart: it is suspended after each fetch until decode,
// so straight-line code of a single hart retires at most one instruction every 2 cycles.
module tb_lbp_core;
  import lbp_pkg::*;
  import lbp_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we = 1'b0;
  logic [11:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  logic fwd_out_v, fwd_end_v, fn_req_v, bwd_up_rdy, bwd_down_v, prev_fn_gnt;
  fwd_msg_t fwd_out;
  logic [1:0] fwd_end_hart, prev_fn_hart;
  bwd_msg_t bwd_down;
  logic sh_en, sh_we, mreq_v, exit_o, retire;
  logic [3:0] sh_be, busy;
  logic [11:0] sh_addr;
  logic [31:0] sh_wdata, sh_rdata;
  mreq_t mreq;
  mrsp_t b_rsp;
  logic b_rsp_v, b_req_rdy;
  logic [15:0] ev;
  int checks = 0, failures = 0, cycles = 0, retired = 0, seq_start = 0, seq_end = 0;
  int pret_h1_cycle = -1, exit_cycle = -1;
  logic [31:0] prog [$];

  lbp_core dut (
    .clk, .rst_n, .core_id(14'd3), .boot(1'b1), .prog_we, .prog_addr, .prog_wdata,
    .fwd_out_v, .fwd_out, .fwd_end_v, .fwd_end_hart, .fn_req_v, .fn_gnt(1'b0), .fn_gnt_hart(2'd0),
    .fwd_in_v(1'b0), .fwd_in('0), .fwd_end_in_v(1'b0), .fwd_end_in_hart(2'd0),
    .prev_fn_req(1'b0), .prev_fn_gnt, .prev_fn_hart,
    .bwd_up_v(1'b0), .bwd_up('0), .bwd_up_rdy, .bwd_down_v, .bwd_down, .bwd_down_rdy(1'b1),
    .sh_en, .sh_we, .sh_be, .sh_addr, .sh_wdata, .sh_rdata,
    .mreq_v, .mreq, .mreq_rdy(1'b1), .mrsp_v(1'b0), .mrsp('0),
    .exit_o, .retire_o(retire), .hart_busy_o(busy), .ev_o(ev));

  lbp_shared_bank u_sh (
    .clk, .rst_n, .a_en(sh_en), .a_we(sh_we), .a_be(sh_be), .a_addr(sh_addr), .a_wdata(sh_wdata),
    .a_rdata(sh_rdata), .b_req_v(1'b0), .b_req('0), .b_req_rdy, .b_rsp_v, .b_rsp, .b_rsp_rdy(1'b1));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycles++;
    retired += int'(retire);
    if (dut.c_any && dut.c_h == 2'd1 && dut.c_dec.cls == C_PRET) pret_h1_cycle = cycles;
    if (dut.c_any && dut.c_h == 2'd0 && dut.c_dec.cls == C_PRET) exit_cycle = cycles;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program
  int lab_loop, lab_th;
  task automatic build(input int pass);
    int pc;
    pc = 0;
    prog.delete();
    `define E(x) begin prog.push_back(x); pc += 4; end
    `E(lui(T4, 32'h2000C))            // shared bank of core 3
    `E(addi(T1, ZERO, 7))
    `E(addi(T2, ZERO, -3))
    `E(mul(A3, T1, T2))
    `E(div(A4, A3, T1))
    `E(sub(A5, T1, T2))
    `E(slli(A5, A5, 2))
    `E(sw(A3, T4, 0))
    `E(sw(A4, T4, 4))
    `E(sw(A5, T4, 8))
    `E(sw(A5, SP, -4))
    `E(lw(S0, SP, -4))
    `E(addi(S0, S0, 1))
    `E(sw(S0, T4, 12))
    `E(addi(T1, ZERO, -2))
    `E(sb(T1, T4, 16))
    `E(lb(S1, T4, 16))
    `E(sw(S1, T4, 20))
    `E(addi(A0, ZERO, 0))
    `E(addi(A1, ZERO, 1))
    `E(addi(A2, ZERO, 11))
    if (pass == 0) lab_loop = pc;
    `E(add(A0, A0, A1))
    `E(addi(A1, A1, 1))
    `E(blt(A1, A2, lab_loop - pc))
    `E(sw(A0, T4, 24))
    `E(addi(T1, ZERO, 32'h123))
    `E(p_set(T3, T1))
    `E(sw(T3, T4, 32))
    // straight-line block, timed
    for (int k = 0; k < 8; k++) `E(addi(S1, S1, 1))
    // fork
    `E(p_fc(T6))
    `E(p_merge(T5, T3, T6))
    `E(sw(T5, T4, 36))
    `E(p_swcv(T6, A0, 0))
    `E(addi(T0, ZERO, 0))
    `E(p_syncm())
    `E(addi(S0, ZERO, lab_th))
    `E(p_jalr(RA, S0, T6))
    // continuation on hart 1
    `E(p_lwcv(A0, 0))
    `E(addi(A0, A0, 100))
    `E(addi(S1, ZERO, 12))            // hart 0 of core 3
    `E(p_swre(S1, A0, 0))
    `E(p_ret())
    // body on hart 0
    if (pass == 0) lab_th = pc;
    `E(p_lwre(S0, 0))
    `E(lui(T4, 32'h2000C))
    `E(sw(S0, T4, 28))
    `E(addi(T0, ZERO, -1))
    `E(p_ret())
    `undef E
  endtask

  initial begin
    build(0);
    build(1);
    repeat (3) @(posedge clk);
    foreach (prog[i]) begin
      prog_we <= 1'b1; prog_addr <= 12'(i); prog_wdata <= prog[i];
      @(posedge clk);
    end
    prog_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    // time the straight-line block: from the fetch of its first to the commit of its last
    wait (dut.f_any && dut.pc[dut.f_h] == 32'(4 * 28));
    seq_start = cycles;
    wait (exit_o);
    repeat (5) @(posedge clk);
    check(u_sh.mem[0] == 32'(-21), "mul");
    check(u_sh.mem[1] == 32'(-3), "div");
    check(u_sh.mem[2] == 32'd40, "sub/shift");
    check(u_sh.mem[3] == 32'd41, "stack store/load");
    check(u_sh.mem[4][7:0] == 8'hfe, "byte store");
    check(u_sh.mem[5] == 32'hffff_fffe, "byte load sign extension");
    check(u_sh.mem[6] == 32'd55, "loop sum");
    check(u_sh.mem[8] == 32'h800C_0123, "p_set");
    check(u_sh.mem[9] == 32'h000C_000D, "p_merge with p_fc result");
    check(u_sh.mem[7] == 32'd155, "p_swcv/p_lwcv then p_swre/p_lwre");
    check(busy == 4'b0000, "all harts free after exit");
    check(pret_h1_cycle > exit_cycle && exit_cycle > 0, "hart 1 ends after hart 0 (ending signal)");
    check(retired == prog.size() + 3 * 9, $sformatf("retired count %0d", retired));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // single-hart fetch pacing: 8 independent instructions cannot be fetched faster than
  // one every 2 cycles
  int first_f = -1, last_f = -1;
  always @(posedge clk) if (rst_n && dut.f_any && dut.f_h == 2'd0) begin
    if (dut.pc[0] == 32'(4 * 28)) first_f = cycles;
    if (dut.pc[0] == 32'(4 * 35)) begin
      last_f = cycles;
      check(last_f - first_f == 14, $sformatf("fetch pacing %0d cycles for 7 gaps", last_f - first_f));
    end
  end
endmodule
