// tb_lbp_router: one r1 router node serving cores 4..7, with a parent link.
// Random requests enter on the four child inputs and the parent input; each carries a
// unique tag. Every request must leave on the right port (the child whose core is the
// destination bank, or the parent when the bank is outside cores 4..7), exactly once.
// Responses are routed the same way on the requester's core. All outputs see random
// back-pressure. The cycle from entry to exit is checked to be at least one (registered).
module tb_lbp_router;
  import lbp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic  qi_v [4], qi_rdy [4], qo_v [4], qo_rdy [4], si_v [4], si_rdy [4], so_v [4], so_rdy [4];
  mreq_t qi [4], qo [4];
  mrsp_t si [4], so [4];
  logic  pqo_v, pqo_rdy, pqi_v, pqi_rdy, pso_v, pso_rdy, psi_v, psi_rdy;
  mreq_t pqo, pqi;
  mrsp_t pso, psi;
  int checks = 0, failures = 0;
  int exp_port_q [int];   // request tag -> expected port
  int exp_port_s [int];   // response tag -> expected port
  int next_tag = 1;

  lbp_router #(.LEVEL(1), .HAS_PARENT(1'b1)) dut (
    .clk, .rst_n, .base(14'd4),
    .c_req_in_v(qi_v), .c_req_in(qi), .c_req_in_rdy(qi_rdy),
    .c_req_out_v(qo_v), .c_req_out(qo), .c_req_out_rdy(qo_rdy),
    .c_rsp_in_v(si_v), .c_rsp_in(si), .c_rsp_in_rdy(si_rdy),
    .c_rsp_out_v(so_v), .c_rsp_out(so), .c_rsp_out_rdy(so_rdy),
    .p_req_out_v(pqo_v), .p_req_out(pqo), .p_req_out_rdy(pqo_rdy),
    .p_req_in_v(pqi_v), .p_req_in(pqi), .p_req_in_rdy(pqi_rdy),
    .p_rsp_out_v(pso_v), .p_rsp_out(pso), .p_rsp_out_rdy(pso_rdy),
    .p_rsp_in_v(psi_v), .p_rsp_in(psi), .p_rsp_in_rdy(psi_rdy));
  always #5 clk = ~clk;

  function automatic int port_of(int core);
    return (core >= 4 && core < 8) ? core - 4 : 4;
  endfunction

  task automatic new_req(output mreq_t r, input bit from_parent);
    int d;
    d = from_parent ? $urandom_range(4, 7) : $urandom_range(0, 15);
    r = '{src: 16'($urandom_range(0, 63)), dst: 14'(d), we: 1'b1, be: 4'hf, waddr: '0,
          wdata: 32'(next_tag)};
    exp_port_q[next_tag] = port_of(d);
    next_tag++;
  endtask
  task automatic new_rsp(output mrsp_t r, input bit from_parent);
    int c;
    c = from_parent ? $urandom_range(4, 7) : $urandom_range(0, 15);
    r = '{src: 16'(4 * c + $urandom_range(0, 3)), rdata: 32'(next_tag)};
    exp_port_s[next_tag] = port_of(c);
    next_tag++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin qi_v[i] <= 0; si_v[i] <= 0; qi[i] <= '0; si[i] <= '0; end
      pqi_v <= 0; psi_v <= 0; pqi <= '0; psi <= '0;
    end else begin
      // sources: keep an item until accepted, then maybe present a new one
      for (int i = 0; i < 4; i++) begin
        if (!qi_v[i] || qi_rdy[i]) begin
          qi_v[i] <= 0;
          if (sent < 1500 && $urandom_range(0, 1)) begin mreq_t r; new_req(r, 0); qi[i] <= r; qi_v[i] <= 1; sent++; end
        end
        if (!si_v[i] || si_rdy[i]) begin
          si_v[i] <= 0;
          if (sent < 1500 && $urandom_range(0, 1)) begin mrsp_t r; new_rsp(r, 0); si[i] <= r; si_v[i] <= 1; sent++; end
        end
      end
      if (!pqi_v || pqi_rdy) begin
        pqi_v <= 0;
        if (sent < 1500 && $urandom_range(0, 1)) begin mreq_t r; new_req(r, 1); pqi <= r; pqi_v <= 1; sent++; end
      end
      if (!psi_v || psi_rdy) begin
        psi_v <= 0;
        if (sent < 1500 && $urandom_range(0, 1)) begin mrsp_t r; new_rsp(r, 1); psi <= r; psi_v <= 1; sent++; end
      end
      // sinks
      for (int o = 0; o < 4; o++) begin
        if (qo_v[o] && qo_rdy[o]) begin
          checks++;
          if (!exp_port_q.exists(int'(qo[o].wdata)) || exp_port_q[int'(qo[o].wdata)] != o) begin
            failures++; $display("FAIL request %0d on port %0d", qo[o].wdata, o);
          end else exp_port_q.delete(int'(qo[o].wdata));
        end
        if (so_v[o] && so_rdy[o]) begin
          checks++;
          if (!exp_port_s.exists(int'(so[o].rdata)) || exp_port_s[int'(so[o].rdata)] != o) begin
            failures++; $display("FAIL response %0d on port %0d", so[o].rdata, o);
          end else exp_port_s.delete(int'(so[o].rdata));
        end
        qo_rdy[o] <= $urandom_range(0, 3) != 0;
        so_rdy[o] <= $urandom_range(0, 3) != 0;
      end
      if (pqo_v && pqo_rdy) begin
        checks++;
        if (!exp_port_q.exists(int'(pqo.wdata)) || exp_port_q[int'(pqo.wdata)] != 4) begin
          failures++; $display("FAIL request %0d on parent", pqo.wdata);
        end else exp_port_q.delete(int'(pqo.wdata));
      end
      if (pso_v && pso_rdy) begin
        checks++;
        if (!exp_port_s.exists(int'(pso.rdata)) || exp_port_s[int'(pso.rdata)] != 4) begin
          failures++; $display("FAIL response %0d on parent", pso.rdata);
        end else exp_port_s.delete(int'(pso.rdata));
      end
      pqo_rdy <= $urandom_range(0, 3) != 0;
      pso_rdy <= $urandom_range(0, 3) != 0;
    end
  end

  initial begin
    for (int o = 0; o < 4; o++) begin qo_rdy[o] = 0; so_rdy[o] = 0; end
    pqo_rdy = 0; pso_rdy = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (sent >= 1500);
    repeat (200) @(posedge clk);
    checks++;
    if (exp_port_q.size() != 0 || exp_port_s.size() != 0) begin
      failures++; $display("FAIL %0d requests / %0d responses lost", exp_port_q.size(), exp_port_s.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
