// lbp_top: the LBP parallelizing manycore processor.
//
// NCORES cores form an ordered line (core 0 first). Each core is linked to its successor by
// the forward link (hart allocation for p_fn, continuation values for p_swcv, hart starts
// for p_jal/p_jalr, ending-hart signals) and to all its predecessors by the backward line
// (p_swre results, join addresses). The last core is not linked back to the first, so teams
// of harts only grow towards higher core numbers. The serpentine placement of the line on
// the die is a floorplan matter and does not show in the netlist.
// Each core owns three banks: a code bank and a local (stack) bank inside lbp_core, and a
// shared bank, instantiated here, whose first port serves the core and whose second port
// serves distant accesses through the router tree: r1 nodes each joining 4 cores and their
// banks, r2 nodes joining 4 r1, one r3 joining 4 r2 (for 64 cores). The tree has
// log4(NCORES) levels, so NCORES must be 1, 4, 16 or 64 (a 4-core LBP has only r1, a
// 1-core LBP no router at all).
// After reset, hart 0 of core 0 starts fetching at address 0; the program is written into
// all code banks at once through the prog_* port while reset is held. exit_o rises when a
// hart commits p_ret with ra = 0 and t0 = -1. retire_cnt_o counts committed instructions,
// ev_o gives each core's event pulses (see lbp_core) for observation.
module lbp_top
  import lbp_pkg::*;
#(
  parameter int NCORES       = 64,
  parameter int ROB_DEPTH    = 8,
  parameter int CODE_WORDS   = 4096,
  parameter int LOCAL_WORDS  = 1024,
  parameter int SHARED_WORDS = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        prog_we,
  input  logic [$clog2(CODE_WORDS)-1:0] prog_addr,
  input  logic [31:0] prog_wdata,
  output logic        exit_o,
  output logic [63:0] retire_cnt_o,
  output logic [NHARTS*NCORES-1:0] hart_busy_o,
  output logic [15:0] ev_o [NCORES]
);
  localparam int CW   = IDW - 2;
  localparam int NLEV = (NCORES <= 1) ? 0 : (NCORES <= 4) ? 1 : (NCORES <= 16) ? 2 : 3;
  localparam int SAW  = $clog2(SHARED_WORDS);

  // line links
  logic     fwd_v [NCORES];
  fwd_msg_t fwd   [NCORES];
  logic     end_v [NCORES];
  logic [HW-1:0] end_h [NCORES];
  logic     fn_req [NCORES];
  logic     fn_gnt [NCORES];      // grant given by core c to core c-1
  logic [HW-1:0] fn_hart [NCORES];
  logic     bwd_v [NCORES];
  bwd_msg_t bwd   [NCORES];
  logic     bwd_rdy [NCORES];     // up_rdy of core c (accepts from core c+1)
  // memory
  logic     mq_v [NCORES], mq_rdy [NCORES], ms_v [NCORES];
  mreq_t    mq   [NCORES];
  mrsp_t    ms   [NCORES];
  logic     bq_v [NCORES], bq_rdy [NCORES], bs_v [NCORES], bs_rdy [NCORES];
  mreq_t    bq   [NCORES];
  mrsp_t    bs   [NCORES];
  logic     sh_en [NCORES], sh_we [NCORES];
  logic [3:0] sh_be [NCORES];
  logic [SAW-1:0] sh_addr [NCORES];
  logic [31:0] sh_wdata [NCORES], sh_rdata [NCORES];
  logic     core_exit [NCORES], core_ret [NCORES];

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    lbp_core #(
      .ROB_DEPTH(ROB_DEPTH), .CODE_WORDS(CODE_WORDS), .LOCAL_WORDS(LOCAL_WORDS),
      .SHARED_WORDS(SHARED_WORDS)
    ) u_core (
      .clk, .rst_n, .core_id(CW'(c)), .boot(c == 0),
      .prog_we, .prog_addr, .prog_wdata,
      .fwd_out_v(fwd_v[c]), .fwd_out(fwd[c]), .fwd_end_v(end_v[c]), .fwd_end_hart(end_h[c]),
      .fn_req_v(fn_req[c]),
      .fn_gnt((c == NCORES - 1) ? 1'b0 : fn_gnt[(c + 1) % NCORES]),
      .fn_gnt_hart(fn_hart[(c + 1) % NCORES]),
      .fwd_in_v((c == 0) ? 1'b0 : fwd_v[(c + NCORES - 1) % NCORES]),
      .fwd_in(fwd[(c + NCORES - 1) % NCORES]),
      .fwd_end_in_v((c == 0) ? 1'b0 : end_v[(c + NCORES - 1) % NCORES]),
      .fwd_end_in_hart(end_h[(c + NCORES - 1) % NCORES]),
      .prev_fn_req((c == 0) ? 1'b0 : fn_req[(c + NCORES - 1) % NCORES]),
      .prev_fn_gnt(fn_gnt[c]), .prev_fn_hart(fn_hart[c]),
      .bwd_up_v((c == NCORES - 1) ? 1'b0 : bwd_v[(c + 1) % NCORES]),
      .bwd_up(bwd[(c + 1) % NCORES]), .bwd_up_rdy(bwd_rdy[c]),
      .bwd_down_v(bwd_v[c]), .bwd_down(bwd[c]),
      .bwd_down_rdy((c == 0) ? 1'b1 : bwd_rdy[(c + NCORES - 1) % NCORES]),
      .sh_en(sh_en[c]), .sh_we(sh_we[c]), .sh_be(sh_be[c]), .sh_addr(sh_addr[c]),
      .sh_wdata(sh_wdata[c]), .sh_rdata(sh_rdata[c]),
      .mreq_v(mq_v[c]), .mreq(mq[c]), .mreq_rdy(mq_rdy[c]), .mrsp_v(ms_v[c]), .mrsp(ms[c]),
      .exit_o(core_exit[c]), .retire_o(core_ret[c]),
      .hart_busy_o(hart_busy_o[NHARTS*c +: NHARTS]), .ev_o(ev_o[c]));

    lbp_shared_bank #(.WORDS(SHARED_WORDS)) u_shared (
      .clk, .rst_n, .a_en(sh_en[c]), .a_we(sh_we[c]), .a_be(sh_be[c]), .a_addr(sh_addr[c]),
      .a_wdata(sh_wdata[c]), .a_rdata(sh_rdata[c]),
      .b_req_v(bq_v[c]), .b_req(bq[c]), .b_req_rdy(bq_rdy[c]),
      .b_rsp_v(bs_v[c]), .b_rsp(bs[c]), .b_rsp_rdy(bs_rdy[c]));
  end

  // ---------------- router tree ----------------
  // node (L, n) for level L = 1..NLEV and n < NCORES / 4^L; up-side signals per node
  // node (L, n) for level L = 1..NLEV and n < NCORES / 4^L; each node declares its own
  // parent-side channels (up_*), which the node of the level above connects to.
  if (NLEV == 0) begin : g_norouter
    for (genvar c = 0; c < NCORES; c++) begin : g_tie
      assign mq_rdy[c] = 1'b0;
      assign ms_v[c] = 1'b0;
      assign ms[c] = '0;
      assign bq_v[c] = 1'b0;
      assign bq[c] = '0;
      assign bs_rdy[c] = 1'b1;
    end
  end else begin : g_tree
    for (genvar L = 1; L <= NLEV; L++) begin : g_lev
      for (genvar n = 0; n < NCORES / (4 ** L); n++) begin : g_node
        logic  cqi_v [4], cqi_rdy [4], cqo_v [4], cqo_rdy [4];
        mreq_t cqi [4], cqo [4];
        logic  csi_v [4], csi_rdy [4], cso_v [4], cso_rdy [4];
        mrsp_t csi [4], cso [4];
        logic  up_qo_v, up_qo_rdy, up_qi_v, up_qi_rdy, up_so_v, up_so_rdy, up_si_v, up_si_rdy;
        mreq_t up_qo, up_qi;
        mrsp_t up_so, up_si;
        for (genvar i = 0; i < 4; i++) begin : g_child
          if (L == 1) begin : g_leaf
            localparam int C = 4 * n + i;
            assign cqi_v[i] = mq_v[C];
            assign cqi[i] = mq[C];
            assign mq_rdy[C] = cqi_rdy[i];
            assign ms_v[C] = cso_v[i];
            assign ms[C] = cso[i];
            assign cso_rdy[i] = 1'b1;
            assign bq_v[C] = cqo_v[i];
            assign bq[C] = cqo[i];
            assign cqo_rdy[i] = bq_rdy[C];
            assign csi_v[i] = bs_v[C];
            assign csi[i] = bs[C];
            assign bs_rdy[C] = csi_rdy[i];
          end else begin : g_inner
            localparam int K = 4 * n + i;
            assign cqi_v[i] = g_lev[L-1].g_node[K].up_qo_v;
            assign cqi[i] = g_lev[L-1].g_node[K].up_qo;
            assign g_lev[L-1].g_node[K].up_qo_rdy = cqi_rdy[i];
            assign g_lev[L-1].g_node[K].up_si_v = cso_v[i];
            assign g_lev[L-1].g_node[K].up_si = cso[i];
            assign cso_rdy[i] = g_lev[L-1].g_node[K].up_si_rdy;
            assign g_lev[L-1].g_node[K].up_qi_v = cqo_v[i];
            assign g_lev[L-1].g_node[K].up_qi = cqo[i];
            assign cqo_rdy[i] = g_lev[L-1].g_node[K].up_qi_rdy;
            assign csi_v[i] = g_lev[L-1].g_node[K].up_so_v;
            assign csi[i] = g_lev[L-1].g_node[K].up_so;
            assign g_lev[L-1].g_node[K].up_so_rdy = csi_rdy[i];
          end
        end
        if (L == NLEV) begin : g_root
          assign up_qo_rdy = 1'b1;
          assign up_qi_v = 1'b0;
          assign up_qi = '0;
          assign up_so_rdy = 1'b1;
          assign up_si_v = 1'b0;
          assign up_si = '0;
        end
        lbp_router #(.LEVEL(L), .HAS_PARENT(L != NLEV)) u_r (
          .clk, .rst_n, .base(CW'(n * (4 ** L))),
          .c_req_in_v(cqi_v), .c_req_in(cqi), .c_req_in_rdy(cqi_rdy),
          .c_req_out_v(cqo_v), .c_req_out(cqo), .c_req_out_rdy(cqo_rdy),
          .c_rsp_in_v(csi_v), .c_rsp_in(csi), .c_rsp_in_rdy(csi_rdy),
          .c_rsp_out_v(cso_v), .c_rsp_out(cso), .c_rsp_out_rdy(cso_rdy),
          .p_req_out_v(up_qo_v), .p_req_out(up_qo), .p_req_out_rdy(up_qo_rdy),
          .p_req_in_v(up_qi_v), .p_req_in(up_qi), .p_req_in_rdy(up_qi_rdy),
          .p_rsp_out_v(up_so_v), .p_rsp_out(up_so), .p_rsp_out_rdy(up_so_rdy),
          .p_rsp_in_v(up_si_v), .p_rsp_in(up_si), .p_rsp_in_rdy(up_si_rdy));
      end
    end
  end

  // ---------------- status ----------------
  always_comb begin
    exit_o = 1'b0;
    for (int c = 0; c < NCORES; c++) exit_o |= core_exit[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) retire_cnt_o <= '0;
    else begin
      logic [63:0] s;
      s = retire_cnt_o;
      for (int c = 0; c < NCORES; c++) s += 64'(core_ret[c]);
      retire_cnt_o <= s;
    end
  end
endmodule
