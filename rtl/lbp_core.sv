// lbp_core: one LBP core, four harts sharing a five-stage out-of-order pipeline.
//
// Stages: fetch, decode/rename, issue, write back, commit. Each stage picks one eligible
// hart per cycle with its own round-robin selector (lbp_hart_select), independently of
// the other stages, so the core can finish one instruction per cycle when enough harts
// are active. There is no branch prediction and no speculation:
//  - fetch: a hart is eligible if it runs, its next pc is known, its instruction buffer (ib)
//    is empty and it is not held by p_syncm. After fetch the hart is suspended until decode
//    (pc+4, jal, p_jal) or issue (branch, jalr, p_jalr) produces the next pc. Instruction
//    words come from the core's code bank one cycle after the request and can be renamed in
//    that very cycle, so one hart alone fetches at best every other cycle.
//  - decode/rename: needs an ib holding an instruction and a free reorder-buffer entry.
//    Renaming is reorder-buffer based: the renaming table (rt) maps an architectural
//    register to the entry of its last in-flight writer, and the entry's result field plays
//    the role of the renaming register file. The entry is the instruction's place in both
//    the hart's instruction table (until issued) and its reorder buffer (until committed).
//  - issue: a hart is eligible when its result buffer (rb) is empty and not reserved by a
//    multi-cycle operation, and one of its waiting instructions has its sources ready; the
//    oldest such instruction issues (out of order inside the hart). Single-cycle work
//    fills rb at the end of the cycle; loads, multiplications/divisions and p_fn hold rb
//    reserved until their result arrives, which blocks the hart for issue meanwhile.
//  - write back: a hart with a full rb writes its result into the entry and marks it done.
//  - commit: a hart whose oldest entry is done retires it into the architectural registers.
//    A hart-ending p_ret commits only after the ending-hart signal of its predecessor.
// X_PAR: p_fc/p_fn allocate a hart (here or in the next core); p_swcv writes a word into
// the continuation-value area of an allocated hart (local bank port, or forward link);
// p_jal/p_jalr start the allocated hart at pc+4; p_lwcv reads the own area; p_swre sends a
// value into a numbered result buffer of a prior hart (directly or on the backward line)
// and p_lwre waits in the instruction table until that buffer is full; p_ret ends a hart
// in one of the four ways of the X_PAR definition (end, wait for join, exit, end and send
// the join address to the join hart) and then passes the ending-hart signal to its
// successor; p_syncm stops fetch until the hart has no memory access in flight.
// Choices of this design, where the architecture leaves them open: ROB_DEPTH entries per
// hart; a started hart begins with all registers zero except sp; the continuation-value
// area is the CV_WORDS words at the initial sp of the hart; the commit buffer of the
// original pipeline is folded into the reorder-buffer done bit; stores complete when the
// bank (or, distant, the router response) accepts them.
// Address map: 0x1xxx_xxxx local stack bank, anything else shared memory where the bank
// number (= core) is the address bits above the bank size.
module lbp_core
  import lbp_pkg::*;
#(
  parameter int ROB_DEPTH    = 8,
  parameter int CODE_WORDS   = 4096,
  parameter int LOCAL_WORDS  = 1024,
  parameter int SHARED_WORDS = 4096,
  parameter int MUL_LAT      = 3,
  parameter int DIV_LAT      = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [IDW-3:0] core_id,
  input  logic          boot,          // start hart 0 at pc 0 after reset
  // program load (code bank write port)
  input  logic          prog_we,
  input  logic [$clog2(CODE_WORDS)-1:0] prog_addr,
  input  logic [31:0]   prog_wdata,
  // forward link towards the next core
  output logic          fwd_out_v,
  output fwd_msg_t      fwd_out,
  output logic          fwd_end_v,
  output logic [HW-1:0] fwd_end_hart,
  output logic          fn_req_v,
  input  logic          fn_gnt,
  input  logic [HW-1:0] fn_gnt_hart,
  // forward link from the previous core
  input  logic          fwd_in_v,
  input  fwd_msg_t      fwd_in,
  input  logic          fwd_end_in_v,
  input  logic [HW-1:0] fwd_end_in_hart,
  input  logic          prev_fn_req,
  output logic          prev_fn_gnt,
  output logic [HW-1:0] prev_fn_hart,
  // backward line
  input  logic          bwd_up_v,
  input  bwd_msg_t      bwd_up,
  output logic          bwd_up_rdy,
  output logic          bwd_down_v,
  output bwd_msg_t      bwd_down,
  input  logic          bwd_down_rdy,
  // local port of the shared bank
  output logic          sh_en,
  output logic          sh_we,
  output logic [3:0]    sh_be,
  output logic [$clog2(SHARED_WORDS)-1:0] sh_addr,
  output logic [31:0]   sh_wdata,
  input  logic [31:0]   sh_rdata,
  // distant shared-memory accesses (to the r1 router)
  output logic          mreq_v,
  output mreq_t         mreq,
  input  logic          mreq_rdy,
  input  logic          mrsp_v,
  input  mrsp_t         mrsp,
  // status
  output logic          exit_o,
  output logic          retire_o,
  output logic [NHARTS-1:0] hart_busy_o,
  output logic [15:0]   ev_o         // event pulses, see EV_* below
);
  localparam int RW  = $clog2(ROB_DEPTH);
  localparam int CAW = $clog2(CODE_WORDS);
  localparam int LAW = $clog2(LOCAL_WORDS);
  localparam int SAW = $clog2(SHARED_WORDS);
  localparam int CW  = IDW - 2;
  localparam int REGION = LOCAL_WORDS / NHARTS;

  // event bit positions
  localparam int EV_FORK_LOCAL = 0, EV_FORK_NEXT = 1, EV_CV_LOCAL = 2, EV_CV_NEXT = 3,
                 EV_START = 4, EV_SWRE_LOCAL = 5, EV_SWRE_LINE = 6, EV_LWRE = 7,
                 EV_JOIN = 8, EV_END_SIG = 9, EV_WAIT = 10, EV_SYNCM_HOLD = 11,
                 EV_REMOTE = 12, EV_MULDIV = 13, EV_END_WAIT = 14, EV_LWRE_WAIT = 15;

  typedef enum logic [1:0] {H_FREE, H_RSVD, H_RUN, H_WAIT} hst_e;

  // ---------------- per-hart state ----------------
  hst_e        hst    [NHARTS];
  logic [31:0] pc     [NHARTS];
  logic        pc_ok  [NHARTS];
  logic        fpend  [NHARTS];
  logic        ib_v   [NHARTS];
  logic [31:0] ib     [NHARTS];
  logic [31:0] ib_pc  [NHARTS];
  logic        syncm  [NHARTS];
  logic        pred_v [NHARTS];
  logic        end_rcv[NHARTS];
  logic        succ_v [NHARTS];
  logic [IDW-1:0] succ_id [NHARTS];
  logic [31:0] arf    [NHARTS][32];
  logic        rt_v   [NHARTS][32];
  logic [RW-1:0] rt_tag [NHARTS][32];
  logic        rb_busy[NHARTS];
  logic        rb_full[NHARTS];
  logic [RW-1:0] rb_tag [NHARTS];
  logic [31:0] rb_val [NHARTS];
  logic        rs_v   [NHARTS][RSLOTS];
  logic [31:0] rs_d   [NHARTS][RSLOTS];
  // reorder buffer / instruction table
  logic        rob_v   [NHARTS][ROB_DEPTH];
  logic        rob_done[NHARTS][ROB_DEPTH];
  logic        rob_iss [NHARTS][ROB_DEPTH];
  dec_t        rob_dec [NHARTS][ROB_DEPTH];
  logic [31:0] rob_pc  [NHARTS][ROB_DEPTH];
  logic        rob_t1v [NHARTS][ROB_DEPTH];
  logic [RW-1:0] rob_t1 [NHARTS][ROB_DEPTH];
  logic        rob_t2v [NHARTS][ROB_DEPTH];
  logic [RW-1:0] rob_t2 [NHARTS][ROB_DEPTH];
  logic [31:0] rob_res [NHARTS][ROB_DEPTH];
  logic [31:0] rob_aux [NHARTS][ROB_DEPTH];
  logic [RW-1:0] head  [NHARTS];
  logic [RW-1:0] tail  [NHARTS];
  logic [RW:0]   cnt   [NHARTS];
  // pending local-bank load (at most one per cycle)
  logic        lm_v, lm_sh;
  logic [HW-1:0] lm_h;
  logic [2:0]  lm_f3;
  logic [1:0]  lm_bo;
  // pending distant access per hart
  logic [2:0]  rm_f3 [NHARTS];
  logic [1:0]  rm_bo [NHARTS];
  logic        rm_ld [NHARTS];
  // p_fn request owner
  logic [HW-1:0] fn_h;
  // muldiv owner
  logic [HW-1:0] md_h;
  logic        md_busy, md_done;
  logic [31:0] md_y;
  logic        exit_r;

  function automatic logic [IDW-1:0] hid(input logic [IDW-3:0] c, input int h);
    return {c, h[HW-1:0]};
  endfunction
  function automatic logic [31:0] init_sp(input int h);
    return 32'h1000_0000 + 32'(4 * ((h + 1) * REGION - CV_WORDS));
  endfunction
  function automatic logic is_mem(input cls_e c);
    return c == C_LOAD || c == C_STORE || c == C_LWCV || c == C_SWCV;
  endfunction
  function automatic logic [31:0] load_ext(input logic [31:0] w, input logic [2:0] f3,
                                           input logic [1:0] bo);
    logic [31:0] s;
    s = w >> (8 * bo);
    unique case (f3)
      3'd0: return {{24{s[7]}}, s[7:0]};
      3'd1: return {{16{s[15]}}, s[15:0]};
      3'd4: return {24'b0, s[7:0]};
      3'd5: return {16'b0, s[15:0]};
      default: return w;
    endcase
  endfunction

  // ---------------- fetch ----------------
  logic [NHARTS-1:0] memfl;
  logic [NHARTS-1:0] f_req;
  logic f_any;
  logic [HW-1:0] f_h;
  logic [31:0] code_rdata;

  always_comb begin
    for (int h = 0; h < NHARTS; h++) begin
      memfl[h] = 1'b0;
      for (int e = 0; e < ROB_DEPTH; e++)
        if (rob_v[h][e] && !rob_done[h][e] && is_mem(rob_dec[h][e].cls)) memfl[h] = 1'b1;
      f_req[h] = hst[h] == H_RUN && pc_ok[h] && !fpend[h] && !ib_v[h] && !(syncm[h] && memfl[h]);
    end
  end

  lbp_hart_select #(.N(NHARTS)) u_fsel (.clk, .rst_n, .req(f_req), .adv(1'b1), .any(f_any), .sel(f_h));

  lbp_code_bank #(.WORDS(CODE_WORDS)) u_code (
    .clk, .re(f_any), .raddr(pc[f_h][CAW+1:2]), .rdata(code_rdata),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_wdata));

  // ---------------- decode / rename ----------------
  logic [NHARTS-1:0] r_req;
  logic r_any;
  logic [HW-1:0] r_h;
  logic [31:0] r_instr;
  dec_t r_dec;

  always_comb
    for (int h = 0; h < NHARTS; h++)
      r_req[h] = (ib_v[h] || fpend[h]) && (cnt[h] < (RW+1)'(ROB_DEPTH));

  lbp_hart_select #(.N(NHARTS)) u_rsel (.clk, .rst_n, .req(r_req), .adv(1'b1), .any(r_any), .sel(r_h));

  assign r_instr = fpend[r_h] ? code_rdata : ib[r_h];
  lbp_decoder u_dec (.instr(r_instr), .pc(ib_pc[r_h]), .dec(r_dec));

  // ---------------- issue ----------------
  logic [31:0] s1val [NHARTS][ROB_DEPTH];
  logic [31:0] s2val [NHARTS][ROB_DEPTH];
  logic        e_rdy [NHARTS][ROB_DEPTH];
  logic [NHARTS-1:0] i_req;
  logic [RW-1:0] i_ent [NHARTS];
  logic i_any;
  logic [HW-1:0] i_h;
  logic [RW-1:0] i_e;
  dec_t i_dec;
  logic [31:0] i_a, i_b, i_s1, i_s2, i_pc, i_y, i_addr;
  logic i_taken;
  logic alloc_local_avail;
  logic [HW-1:0] alloc_local_hart;
  logic [NHARTS-1:0] alloc_vec;
  logic [NHARTS-1:0] free_vec;
  logic inj_rdy, bwd_deliver_v, bwd_deliver_rdy;
  bwd_msg_t bwd_deliver;
  logic c_inj;            // commit injects a join this cycle
  logic i_inj;            // issue injects a result this cycle
  bwd_msg_t c_inj_msg, i_inj_msg;

  function automatic logic addr_local(input logic [31:0] a);
    return a[31:28] == REG_LOCAL;
  endfunction
  function automatic logic [CW-1:0] addr_bank(input logic [31:0] a);
    return CW'(a >> (SAW + 2));
  endfunction

  always_comb begin
    for (int h = 0; h < NHARTS; h++) begin
      i_req[h] = 1'b0;
      i_ent[h] = '0;
      for (int e = 0; e < ROB_DEPTH; e++) begin
        dec_t d;
        logic r1, r2, cond;
        logic [31:0] ad;
        d = rob_dec[h][e];
        s1val[h][e] = rob_t1v[h][e] ? rob_res[h][rob_t1[h][e]] : arf[h][d.rs1];
        s2val[h][e] = rob_t2v[h][e] ? rob_res[h][rob_t2[h][e]] : arf[h][d.rs2];
        if (!d.use_rs1) s1val[h][e] = '0;
        if (!d.use_rs2) s2val[h][e] = '0;
        r1 = !rob_t1v[h][e] || rob_done[h][rob_t1[h][e]];
        r2 = !rob_t2v[h][e] || rob_done[h][rob_t2[h][e]];
        ad = s1val[h][e] + d.imm;
        cond = 1'b1;
        unique case (d.cls)
          C_LOAD, C_STORE:
            if (!addr_local(ad) && addr_bank(ad) != core_id) cond = !mreq_v;
          C_LWRE: cond = rs_v[h][d.imm[1:0]];
          C_SWRE:
            if (s1val[h][e][IDW-1:2] == core_id)
              cond = !rs_v[s1val[h][e][HW-1:0]][d.imm[1:0]] &&
                     !(bwd_deliver_v && bwd_deliver.kind == B_RES &&
                       bwd_deliver.dst[HW-1:0] == s1val[h][e][HW-1:0] &&
                       bwd_deliver.slot == d.imm[1:0]);
            else cond = inj_rdy && !c_inj;
          C_PFC:    cond = alloc_local_avail;
          C_PFN:    cond = !fn_req_v;
          C_MULDIV: cond = !md_busy;
          default:  cond = 1'b1;
        endcase
        e_rdy[h][e] = rob_v[h][e] && !rob_iss[h][e] && r1 && r2 && cond;
      end
      // oldest ready entry
      for (int k = ROB_DEPTH - 1; k >= 0; k--) begin
        logic [RW-1:0] e2;
        e2 = head[h] + RW'(k);
        if (e_rdy[h][e2]) begin i_req[h] = 1'b1; i_ent[h] = e2; end
      end
      if (rb_busy[h] || rb_full[h]) i_req[h] = 1'b0;
    end
  end

  lbp_hart_select #(.N(NHARTS)) u_isel (.clk, .rst_n, .req(i_req), .adv(1'b1), .any(i_any), .sel(i_h));

  assign i_e   = i_ent[i_h];
  assign i_dec = rob_dec[i_h][i_e];
  assign i_s1  = s1val[i_h][i_e];
  assign i_s2  = s2val[i_h][i_e];
  assign i_pc  = rob_pc[i_h][i_e];
  assign i_a   = i_dec.a_pc ? i_pc : i_s1;
  assign i_b   = i_dec.b_imm ? i_dec.imm : i_s2;
  assign i_addr = i_s1 + i_dec.imm;

  lbp_alu u_alu (.op(i_dec.aluop), .a(i_a), .b(i_b), .hart_id(hid(core_id, int'(i_h))),
                 .br_f3(i_dec.funct3), .br_a(i_s1), .br_b(i_s2), .y(i_y), .taken(i_taken));

  lbp_muldiv #(.MUL_LAT(MUL_LAT), .DIV_LAT(DIV_LAT)) u_md (
    .clk, .rst_n, .start(i_any && i_dec.cls == C_MULDIV), .f3(i_dec.funct3), .a(i_s1), .b(i_s2),
    .busy(md_busy), .done(md_done), .y(md_y));

  always_comb
    for (int h = 0; h < NHARTS; h++) free_vec[h] = hst[h] == H_FREE;

  lbp_hart_alloc #(.N(NHARTS)) u_alloc (
    .free_vec, .prev_req(prev_fn_req), .prev_gnt(prev_fn_gnt), .prev_hart(prev_fn_hart),
    .local_req(i_any && i_dec.cls == C_PFC), .local_avail(alloc_local_avail),
    .local_hart(alloc_local_hart), .alloc_vec);

  // local bank and shared-bank local port: driven by the issue stage
  logic        lb_en, lb_we;
  logic [3:0]  st_be;
  logic [31:0] st_wd, lb_rdata;
  logic [LAW-1:0] lb_addr;
  logic        i_is_local, i_is_shl, i_cv_here;
  logic [31:0] cv_addr;

  assign st_be = (i_dec.funct3[1:0] == 2'd0) ? (4'b0001 << i_addr[1:0]) :
                 (i_dec.funct3[1:0] == 2'd1) ? (4'b0011 << i_addr[1:0]) : 4'b1111;
  assign st_wd = i_s2 << (8 * i_addr[1:0]);
  assign i_is_local = addr_local(i_addr);
  assign i_is_shl   = !i_is_local && addr_bank(i_addr) == core_id;
  assign i_cv_here  = i_s1[IDW-1:2] == core_id;
  assign cv_addr    = (i_dec.cls == C_SWCV) ? init_sp(int'(i_s1[HW-1:0])) + i_dec.imm
                                            : init_sp(int'(i_h)) + i_dec.imm;

  always_comb begin
    lb_en = 1'b0; lb_we = 1'b0; lb_addr = i_addr[LAW+1:2];
    sh_en = 1'b0; sh_we = 1'b0; sh_be = st_be; sh_addr = i_addr[SAW+1:2]; sh_wdata = st_wd;
    if (i_any) begin
      unique case (i_dec.cls)
        C_LOAD, C_STORE: begin
          if (i_is_local) begin lb_en = 1'b1; lb_we = i_dec.cls == C_STORE; end
          else if (i_is_shl) begin sh_en = 1'b1; sh_we = i_dec.cls == C_STORE; end
        end
        C_LWCV: begin lb_en = 1'b1; lb_addr = cv_addr[LAW+1:2]; end
        C_SWCV: if (i_cv_here) begin lb_en = 1'b1; lb_we = 1'b1; lb_addr = cv_addr[LAW+1:2]; end
        default: ;
      endcase
    end
  end

  lbp_local_bank #(.WORDS(LOCAL_WORDS)) u_local (
    .clk, .a_en(lb_en), .a_we(lb_we),
    .a_be((i_dec.cls == C_SWCV) ? 4'b1111 : st_be),
    .a_addr(lb_addr), .a_wdata((i_dec.cls == C_SWCV) ? i_s2 : st_wd), .a_rdata(lb_rdata),
    .b_we(fwd_in_v && fwd_in.kind == F_CVW),
    .b_addr(LAW'((int'(fwd_in.hart) + 1) * REGION - CV_WORDS) + LAW'(fwd_in.woff)),
    .b_wdata(fwd_in.data));

  // ---------------- write back ----------------
  logic [NHARTS-1:0] w_req;
  logic w_any;
  logic [HW-1:0] w_h;
  always_comb for (int h = 0; h < NHARTS; h++) w_req[h] = rb_full[h];
  lbp_hart_select #(.N(NHARTS)) u_wsel (.clk, .rst_n, .req(w_req), .adv(1'b1), .any(w_any), .sel(w_h));

  // ---------------- commit ----------------
  logic [NHARTS-1:0] c_req;
  logic c_any;
  logic [HW-1:0] c_h;
  logic [RW-1:0] c_e;
  dec_t c_dec;
  logic [31:0] c_ra, c_t0;
  logic c_exit, c_waitj, c_join;
  logic [IDW-1:0] c_jdst;

  always_comb begin
    for (int h = 0; h < NHARTS; h++) begin
      dec_t d;
      logic [31:0] ra, t0;
      d  = rob_dec[h][head[h]];
      ra = rob_res[h][head[h]];
      t0 = rob_aux[h][head[h]];
      c_req[h] = cnt[h] != '0 && rob_done[h][head[h]];
      if (d.cls == C_PRET) begin
        if (pred_v[h] && !end_rcv[h]) c_req[h] = 1'b0;
        if (ra != 0 && CW'(t0[30:18]) != core_id && !inj_rdy) c_req[h] = 1'b0;
      end
    end
  end

  lbp_hart_select #(.N(NHARTS)) u_csel (.clk, .rst_n, .req(c_req), .adv(1'b1), .any(c_any), .sel(c_h));

  assign c_e   = head[c_h];
  assign c_dec = rob_dec[c_h][c_e];
  assign c_ra  = rob_res[c_h][c_e];
  assign c_t0  = rob_aux[c_h][c_e];
  assign c_exit  = c_ra == 0 && c_t0 == 32'hffff_ffff;
  assign c_waitj = c_ra == 0 && !c_exit && c_t0[30:16] == 15'(hid(core_id, int'(c_h)));
  assign c_join  = c_ra != 0;
  assign c_jdst  = IDW'(c_t0[30:16]);
  assign c_inj   = c_any && c_dec.cls == C_PRET && c_join && c_jdst[IDW-1:2] != core_id;
  always_comb begin
    c_inj_msg = '0;
    c_inj_msg.kind = B_JOIN; c_inj_msg.dst = c_jdst; c_inj_msg.data = c_ra;
    i_inj_msg = '0;
    i_inj_msg.kind = B_RES; i_inj_msg.dst = i_s1[IDW-1:0]; i_inj_msg.slot = i_dec.imm[1:0];
    i_inj_msg.data = i_s2;
  end
  assign i_inj = i_any && i_dec.cls == C_SWRE && !i_cv_here;

  // ---------------- backward line stage ----------------
  assign bwd_deliver_rdy = !(bwd_deliver.kind == B_RES &&
                             rs_v[bwd_deliver.dst[HW-1:0]][bwd_deliver.slot]);

  lbp_bwd_stage u_bwd (
    .clk, .rst_n, .core_id,
    .up_v(bwd_up_v), .up_msg(bwd_up), .up_rdy(bwd_up_rdy),
    .inj_v(c_inj || i_inj), .inj_msg(c_inj ? c_inj_msg : i_inj_msg), .inj_rdy(inj_rdy),
    .deliver_v(bwd_deliver_v), .deliver_msg(bwd_deliver), .deliver_rdy(bwd_deliver_rdy),
    .down_v(bwd_down_v), .down_msg(bwd_down), .down_rdy(bwd_down_rdy));

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int h = 0; h < NHARTS; h++) begin
        hst[h] <= (boot && h == 0) ? H_RUN : H_FREE;
        pc[h] <= '0; pc_ok[h] <= boot && h == 0;
        fpend[h] <= 1'b0; ib_v[h] <= 1'b0; ib[h] <= '0; ib_pc[h] <= '0; syncm[h] <= 1'b0;
        pred_v[h] <= 1'b0; end_rcv[h] <= 1'b0; succ_v[h] <= 1'b0; succ_id[h] <= '0;
        rb_busy[h] <= 1'b0; rb_full[h] <= 1'b0; rb_tag[h] <= '0; rb_val[h] <= '0;
        head[h] <= '0; tail[h] <= '0; cnt[h] <= '0;
        rm_f3[h] <= '0; rm_bo[h] <= '0; rm_ld[h] <= 1'b0;
        for (int r = 0; r < 32; r++) begin
          arf[h][r] <= (r == 2) ? init_sp(h) : 32'd0;
          rt_v[h][r] <= 1'b0; rt_tag[h][r] <= '0;
        end
        for (int s = 0; s < RSLOTS; s++) begin rs_v[h][s] <= 1'b0; rs_d[h][s] <= '0; end
        for (int e = 0; e < ROB_DEPTH; e++) begin
          rob_v[h][e] <= 1'b0; rob_done[h][e] <= 1'b0; rob_iss[h][e] <= 1'b0;
          rob_dec[h][e] <= '0; rob_pc[h][e] <= '0; rob_t1v[h][e] <= 1'b0; rob_t1[h][e] <= '0;
          rob_t2v[h][e] <= 1'b0; rob_t2[h][e] <= '0; rob_res[h][e] <= '0; rob_aux[h][e] <= '0;
        end
      end
      lm_v <= 1'b0; lm_sh <= 1'b0; lm_h <= '0; lm_f3 <= '0; lm_bo <= '0;
      fn_req_v <= 1'b0; fn_h <= '0; md_h <= '0;
      mreq_v <= 1'b0; mreq <= '0;
      fwd_out_v <= 1'b0; fwd_out <= '0; fwd_end_v <= 1'b0; fwd_end_hart <= '0;
      exit_r <= 1'b0; retire_o <= 1'b0; ev_o <= '0;
    end else begin
      fwd_out_v <= 1'b0;
      fwd_end_v <= 1'b0;
      retire_o  <= 1'b0;
      ev_o      <= '0;
      if (mreq_v && mreq_rdy) mreq_v <= 1'b0;

      // ---- fetch ----
      for (int h = 0; h < NHARTS; h++) begin
        fpend[h] <= 1'b0;
        if (fpend[h] && !(r_any && r_h == HW'(h))) begin
          ib_v[h] <= 1'b1; ib[h] <= code_rdata;
        end
        if (syncm[h] && !memfl[h]) syncm[h] <= 1'b0;
        if (hst[h] == H_RUN && syncm[h] && memfl[h] && pc_ok[h]) ev_o[EV_SYNCM_HOLD] <= 1'b1;
      end
      if (f_any) begin
        fpend[f_h] <= 1'b1; pc_ok[f_h] <= 1'b0; ib_pc[f_h] <= pc[f_h];
      end

      // ---- decode / rename ----
      if (r_any) begin
        logic [RW-1:0] t;
        t = tail[r_h];
        ib_v[r_h] <= 1'b0;
        rob_v[r_h][t]    <= 1'b1;
        rob_done[r_h][t] <= r_dec.cls == C_NOP || r_dec.cls == C_SYNCM;
        rob_iss[r_h][t]  <= r_dec.cls == C_NOP || r_dec.cls == C_SYNCM;
        rob_dec[r_h][t]  <= r_dec;
        rob_pc[r_h][t]   <= ib_pc[r_h];
        rob_t1v[r_h][t]  <= r_dec.use_rs1 && rt_v[r_h][r_dec.rs1] &&
                            !(c_any && c_h == r_h && rt_tag[r_h][r_dec.rs1] == c_e);
        rob_t1[r_h][t]   <= rt_tag[r_h][r_dec.rs1];
        rob_t2v[r_h][t]  <= r_dec.use_rs2 && rt_v[r_h][r_dec.rs2] &&
                            !(c_any && c_h == r_h && rt_tag[r_h][r_dec.rs2] == c_e);
        rob_t2[r_h][t]   <= rt_tag[r_h][r_dec.rs2];
        rob_res[r_h][t]  <= '0;
        tail[r_h] <= t + 1'b1;
        if (r_dec.next_known && r_dec.cls != C_PRET) begin
          pc[r_h] <= r_dec.next_pc; pc_ok[r_h] <= 1'b1;
        end
        if (r_dec.cls == C_SYNCM) syncm[r_h] <= 1'b1;
        if (r_dec.wr_rd) begin
          rt_v[r_h][r_dec.rd] <= 1'b1; rt_tag[r_h][r_dec.rd] <= t;
        end
      end

      // ---- issue ----
      lm_v <= 1'b0;                      // a local load completes next cycle (set again below)
      if (i_any) begin
        rob_iss[i_h][i_e] <= 1'b1;
        rb_tag[i_h] <= i_e;
        rb_val[i_h] <= '0;
        rb_full[i_h] <= 1'b1;
        unique case (i_dec.cls)
          C_ALU: rb_val[i_h] <= i_y;
          C_BRANCH: begin
            pc[i_h] <= i_taken ? i_pc + i_dec.imm : i_pc + 32'd4; pc_ok[i_h] <= 1'b1;
          end
          C_JAL: rb_val[i_h] <= i_pc + 32'd4;
          C_JALR: begin
            rb_val[i_h] <= i_pc + 32'd4;
            pc[i_h] <= (i_s1 + i_dec.imm) & ~32'd1; pc_ok[i_h] <= 1'b1;
          end
          C_LOAD, C_LWCV: begin
            rb_full[i_h] <= 1'b0; rb_busy[i_h] <= 1'b1;
            if (i_dec.cls == C_LWCV || i_is_local || i_is_shl) begin
              lm_v <= 1'b1; lm_h <= i_h; lm_sh <= i_dec.cls == C_LOAD && i_is_shl;
              lm_f3 <= (i_dec.cls == C_LWCV) ? 3'd2 : i_dec.funct3;
              lm_bo <= (i_dec.cls == C_LWCV) ? 2'd0 : i_addr[1:0];
            end else begin
              mreq_v <= 1'b1;
              mreq <= '{src: hid(core_id, int'(i_h)), dst: addr_bank(i_addr), we: 1'b0,
                        be: 4'b1111, waddr: 30'(i_addr[SAW+1:2]), wdata: 32'd0};
              rm_f3[i_h] <= i_dec.funct3; rm_bo[i_h] <= i_addr[1:0]; rm_ld[i_h] <= 1'b1;
              ev_o[EV_REMOTE] <= 1'b1;
            end
          end
          C_STORE: begin
            if (!i_is_local && !i_is_shl) begin
              rb_full[i_h] <= 1'b0; rb_busy[i_h] <= 1'b1;
              mreq_v <= 1'b1;
              mreq <= '{src: hid(core_id, int'(i_h)), dst: addr_bank(i_addr), we: 1'b1,
                        be: st_be, waddr: 30'(i_addr[SAW+1:2]), wdata: st_wd};
              rm_ld[i_h] <= 1'b0;
              ev_o[EV_REMOTE] <= 1'b1;
            end
          end
          C_SWCV: begin
            if (i_cv_here) ev_o[EV_CV_LOCAL] <= 1'b1;
            else begin
              fwd_out_v <= 1'b1;
              fwd_out <= '{kind: F_CVW, hart: i_s1[HW-1:0], woff: i_dec.imm[7:2], data: i_s2};
              ev_o[EV_CV_NEXT] <= 1'b1;
            end
          end
          C_LWRE: begin
            rb_val[i_h] <= rs_d[i_h][i_dec.imm[1:0]];
            rs_v[i_h][i_dec.imm[1:0]] <= 1'b0;
            ev_o[EV_LWRE] <= 1'b1;
          end
          C_SWRE: begin
            if (i_cv_here) begin
              rs_v[i_s1[HW-1:0]][i_dec.imm[1:0]] <= 1'b1;
              rs_d[i_s1[HW-1:0]][i_dec.imm[1:0]] <= i_s2;
              ev_o[EV_SWRE_LOCAL] <= 1'b1;
            end else ev_o[EV_SWRE_LINE] <= 1'b1;
          end
          C_PJAL, C_PJALR: begin
            logic [IDW-1:0] tgt;
            tgt = (i_dec.cls == C_PJAL) ? i_s1[IDW-1:0] : i_s2[IDW-1:0];
            succ_v[i_h] <= 1'b1; succ_id[i_h] <= tgt;
            if (i_dec.cls == C_PJALR) begin pc[i_h] <= i_s1; pc_ok[i_h] <= 1'b1; end
            if (tgt[IDW-1:2] != core_id) begin
              fwd_out_v <= 1'b1;
              fwd_out <= '{kind: F_START, hart: tgt[HW-1:0], woff: '0, data: i_pc + 32'd4};
            end
            ev_o[EV_START] <= 1'b1;
          end
          C_PRET: begin
            rb_val[i_h] <= i_s1;
            rob_aux[i_h][i_e] <= i_s2;
          end
          C_PFC: begin
            rb_val[i_h] <= 32'(hid(core_id, int'(alloc_local_hart)));
            ev_o[EV_FORK_LOCAL] <= 1'b1;
          end
          C_PFN: begin
            rb_full[i_h] <= 1'b0; rb_busy[i_h] <= 1'b1;
            fn_req_v <= 1'b1; fn_h <= i_h;
            ev_o[EV_FORK_NEXT] <= 1'b1;
          end
          C_MULDIV: begin
            rb_full[i_h] <= 1'b0; rb_busy[i_h] <= 1'b1; md_h <= i_h;
            ev_o[EV_MULDIV] <= 1'b1;
          end
          default: ;
        endcase
      end

      // ---- completion of multi-cycle operations into rb ----
      if (lm_v) begin
        rb_busy[lm_h] <= 1'b0; rb_full[lm_h] <= 1'b1;
        rb_val[lm_h] <= load_ext(lm_sh ? sh_rdata : lb_rdata, lm_f3, lm_bo);
      end
      if (mrsp_v) begin
        rb_busy[mrsp.src[HW-1:0]] <= 1'b0; rb_full[mrsp.src[HW-1:0]] <= 1'b1;
        rb_val[mrsp.src[HW-1:0]] <= rm_ld[mrsp.src[HW-1:0]] ?
          load_ext(mrsp.rdata, rm_f3[mrsp.src[HW-1:0]], rm_bo[mrsp.src[HW-1:0]]) : 32'd0;
      end
      if (md_done) begin
        rb_busy[md_h] <= 1'b0; rb_full[md_h] <= 1'b1; rb_val[md_h] <= md_y;
      end
      if (fn_req_v && fn_gnt) begin
        fn_req_v <= 1'b0;
        rb_busy[fn_h] <= 1'b0; rb_full[fn_h] <= 1'b1;
        rb_val[fn_h] <= 32'({core_id + 1'b1, fn_gnt_hart});
      end

      // ---- write back ----
      if (w_any) begin
        rob_res[w_h][rb_tag[w_h]] <= rb_val[w_h];
        rob_done[w_h][rb_tag[w_h]] <= 1'b1;
        if (!(i_any && i_h == w_h)) rb_full[w_h] <= 1'b0;
      end

      // ---- result buffers filled from the backward line ----
      if (bwd_deliver_v && bwd_deliver_rdy && bwd_deliver.kind == B_RES) begin
        rs_v[bwd_deliver.dst[HW-1:0]][bwd_deliver.slot] <= 1'b1;
        rs_d[bwd_deliver.dst[HW-1:0]][bwd_deliver.slot] <= bwd_deliver.data;
      end
      for (int h = 0; h < NHARTS; h++)
        for (int e = 0; e < ROB_DEPTH; e++)
          if (rob_v[h][e] && !rob_iss[h][e] && rob_dec[h][e].cls == C_LWRE &&
              !rs_v[h][rob_dec[h][e].imm[1:0]]) ev_o[EV_LWRE_WAIT] <= 1'b1;

      // ---- commit ----
      if (c_any) begin
        retire_o <= 1'b1;
        rob_v[c_h][c_e] <= 1'b0;
        rob_done[c_h][c_e] <= 1'b0;
        head[c_h] <= c_e + 1'b1;
        if (c_dec.wr_rd) begin
          arf[c_h][c_dec.rd] <= c_ra;
          if (rt_tag[c_h][c_dec.rd] == c_e && !(r_any && r_h == c_h && r_dec.wr_rd &&
                                                r_dec.rd == c_dec.rd))
            rt_v[c_h][c_dec.rd] <= 1'b0;
        end
        for (int e = 0; e < ROB_DEPTH; e++) begin
          if (!(r_any && r_h == c_h && RW'(e) == tail[c_h])) begin
            if (rob_t1[c_h][e] == c_e) rob_t1v[c_h][e] <= 1'b0;
            if (rob_t2[c_h][e] == c_e) rob_t2v[c_h][e] <= 1'b0;
          end
        end
        if (c_dec.cls == C_PRET) begin
          if (c_exit) begin exit_r <= 1'b1; hst[c_h] <= H_FREE; end
          else if (c_waitj) begin hst[c_h] <= H_WAIT; ev_o[EV_WAIT] <= 1'b1; end
          else hst[c_h] <= H_FREE;
          if (c_join) begin
            ev_o[EV_JOIN] <= 1'b1;
            if (c_jdst[IDW-1:2] == core_id) begin
              hst[c_jdst[HW-1:0]] <= H_RUN; pc[c_jdst[HW-1:0]] <= c_ra;
              pc_ok[c_jdst[HW-1:0]] <= 1'b1;
              pred_v[c_jdst[HW-1:0]] <= 1'b0; succ_v[c_jdst[HW-1:0]] <= 1'b0;
            end
          end
          pred_v[c_h] <= 1'b0; end_rcv[c_h] <= 1'b0; succ_v[c_h] <= 1'b0;
          if (succ_v[c_h]) begin
            ev_o[EV_END_SIG] <= 1'b1;
            if (succ_id[c_h][IDW-1:2] == core_id) end_rcv[succ_id[c_h][HW-1:0]] <= 1'b1;
            else begin fwd_end_v <= 1'b1; fwd_end_hart <= succ_id[c_h][HW-1:0]; end
          end
        end
      end
      for (int h = 0; h < NHARTS; h++) begin
        dec_t d;
        d = rob_dec[h][head[h]];
        if (cnt[h] != '0 && rob_done[h][head[h]] && d.cls == C_PRET && pred_v[h] && !end_rcv[h])
          ev_o[EV_END_WAIT] <= 1'b1;
      end

      // ---- occupancy ----
      for (int h = 0; h < NHARTS; h++)
        cnt[h] <= cnt[h] + ((r_any && r_h == HW'(h)) ? (RW+1)'(1) : '0)
                         - ((c_any && c_h == HW'(h)) ? (RW+1)'(1) : '0);

      // ---- hart allocation ----
      for (int h = 0; h < NHARTS; h++)
        if (alloc_vec[h]) hst[h] <= H_RSVD;

      // ---- incoming ending-hart signal, hart starts and joins ----
      if (fwd_end_in_v) end_rcv[fwd_end_in_hart] <= 1'b1;
      for (int h = 0; h < NHARTS; h++) begin
        logic st;
        logic [31:0] spc;
        st = 1'b0; spc = '0;
        if (fwd_in_v && fwd_in.kind == F_START && fwd_in.hart == HW'(h)) begin
          st = 1'b1; spc = fwd_in.data;
        end
        if (i_any && (i_dec.cls == C_PJAL || i_dec.cls == C_PJALR)) begin
          logic [IDW-1:0] tgt;
          tgt = (i_dec.cls == C_PJAL) ? i_s1[IDW-1:0] : i_s2[IDW-1:0];
          if (tgt[IDW-1:2] == core_id && tgt[HW-1:0] == HW'(h)) begin st = 1'b1; spc = i_pc + 32'd4; end
        end
        if (st) begin
          hst[h] <= H_RUN; pc[h] <= spc; pc_ok[h] <= 1'b1;
          pred_v[h] <= 1'b1; end_rcv[h] <= 1'b0; succ_v[h] <= 1'b0; syncm[h] <= 1'b0;
          for (int r = 0; r < 32; r++) begin
            arf[h][r] <= (r == 2) ? init_sp(h) : 32'd0;
            rt_v[h][r] <= 1'b0;
          end
        end
        if (bwd_deliver_v && bwd_deliver.kind == B_JOIN && bwd_deliver.dst[HW-1:0] == HW'(h)) begin
          hst[h] <= H_RUN; pc[h] <= bwd_deliver.data; pc_ok[h] <= 1'b1;
          pred_v[h] <= 1'b0; end_rcv[h] <= 1'b0; succ_v[h] <= 1'b0;
        end
      end
    end
  end

  assign exit_o = exit_r;
  always_comb for (int h = 0; h < NHARTS; h++) hart_busy_o[h] = hst[h] != H_FREE;
endmodule
