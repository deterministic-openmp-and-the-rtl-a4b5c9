// lbp_router: one node of the r1/r2/r3 shared-memory router hierarchy.
//
// A node of level L serves 4^L cores: four children and one optional parent link. At level
// 1 (r1) child i is core i of a group of four: its distant-access requests come in on
// c_req_in[i] and go back out on c_rsp_out[i], while the shared bank of that core receives
// requests on c_req_out[i] and answers on c_rsp_in[i]. At levels 2 and 3 (r2, r3) each
// child is a router of the level below, connected by the same four channels. The parent
// link (absent at the top, HAS_PARENT = 0) carries one request and one response each way
// per cycle, as for r2 towards r3.
// Requests are routed on the destination bank, responses on the requester's core. Both
// networks are 5x5 crossbars with registered outputs (one item per link per cycle, one
// cycle per hop). base is the number of the first core of the node's subtree.
module lbp_router
  import lbp_pkg::*;
#(
  parameter int LEVEL = 1,
  parameter bit HAS_PARENT = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic [IDW-3:0] base,
  // children
  input  logic  c_req_in_v  [4],
  input  mreq_t c_req_in    [4],
  output logic  c_req_in_rdy[4],
  output logic  c_req_out_v [4],
  output mreq_t c_req_out   [4],
  input  logic  c_req_out_rdy[4],
  input  logic  c_rsp_in_v  [4],
  input  mrsp_t c_rsp_in    [4],
  output logic  c_rsp_in_rdy[4],
  output logic  c_rsp_out_v [4],
  output mrsp_t c_rsp_out   [4],
  input  logic  c_rsp_out_rdy[4],
  // parent
  output logic  p_req_out_v,
  output mreq_t p_req_out,
  input  logic  p_req_out_rdy,
  input  logic  p_req_in_v,
  input  mreq_t p_req_in,
  output logic  p_req_in_rdy,
  output logic  p_rsp_out_v,
  output mrsp_t p_rsp_out,
  input  logic  p_rsp_out_rdy,
  input  logic  p_rsp_in_v,
  input  mrsp_t p_rsp_in,
  output logic  p_rsp_in_rdy
);
  localparam int CW = IDW - 2;
  localparam int SH = 2 * (LEVEL - 1);

  logic        qi_v [5], qi_rdy [5], qo_v [5], qo_rdy [5];
  logic [MREQ_W-1:0] qi_d [5], qo_d [5];
  logic [2:0]  qi_dst [5];
  logic        si_v [5], si_rdy [5], so_v [5], so_rdy [5];
  logic [MRSP_W-1:0] si_d [5], so_d [5];
  logic [2:0]  si_dst [5];

  function automatic logic [2:0] route(input logic [CW-1:0] core);
    logic [CW-1:0] rel;
    rel = core - base;
    if (HAS_PARENT && (core < base || (32'(rel) >> (2 * LEVEL)) != 0)) return 3'd4;
    return 3'((32'(rel) >> SH) & 3);
  endfunction

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      qi_v[i] = c_req_in_v[i];  qi_d[i] = c_req_in[i];  qi_dst[i] = route(c_req_in[i].dst);
      si_v[i] = c_rsp_in_v[i];  si_d[i] = c_rsp_in[i];  si_dst[i] = route(c_rsp_in[i].src[IDW-1:2]);
    end
    qi_v[4] = HAS_PARENT && p_req_in_v;  qi_d[4] = p_req_in;  qi_dst[4] = route(p_req_in.dst);
    si_v[4] = HAS_PARENT && p_rsp_in_v;  si_d[4] = p_rsp_in;  si_dst[4] = route(p_rsp_in.src[IDW-1:2]);
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      c_req_in_rdy[i] = qi_rdy[i];
      c_rsp_in_rdy[i] = si_rdy[i];
    end
    p_req_in_rdy = qi_rdy[4];
    p_rsp_in_rdy = si_rdy[4];
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      c_req_out_v[i] = qo_v[i];  c_req_out[i] = mreq_t'(qo_d[i]);  qo_rdy[i] = c_req_out_rdy[i];
      c_rsp_out_v[i] = so_v[i];  c_rsp_out[i] = mrsp_t'(so_d[i]);  so_rdy[i] = c_rsp_out_rdy[i];
    end
    p_req_out_v = qo_v[4];  p_req_out = mreq_t'(qo_d[4]);  qo_rdy[4] = p_req_out_rdy || !HAS_PARENT;
    p_rsp_out_v = so_v[4];  p_rsp_out = mrsp_t'(so_d[4]);  so_rdy[4] = p_rsp_out_rdy || !HAS_PARENT;
  end

  lbp_xbar #(.N(5), .W(MREQ_W)) u_req (
    .clk, .rst_n, .in_v(qi_v), .in_d(qi_d), .in_dst(qi_dst), .in_rdy(qi_rdy),
    .out_v(qo_v), .out_d(qo_d), .out_rdy(qo_rdy));

  lbp_xbar #(.N(5), .W(MRSP_W)) u_rsp (
    .clk, .rst_n, .in_v(si_v), .in_d(si_d), .in_dst(si_dst), .in_rdy(si_rdy),
    .out_v(so_v), .out_d(so_d), .out_rdy(so_rdy));
endmodule
