// tb_lbp_shared_bank: the dual-port shared bank. Port A (local core) and port B (distant,
// through the router, with valid/ready and a response carrying the requester identity) are
// driven at random, with random back-pressure on the port-B response, against a reference
// memory. Port-B reads must return the data, port-B writes an acknowledge, each exactly once.
module tb_lbp_shared_bank;
  import lbp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a_en = 0, a_we = 0;
  logic [3:0] a_be = '0;
  logic [7:0] a_addr = '0;
  logic [31:0] a_wdata = '0, a_rdata;
  logic b_req_v = 0, b_req_rdy, b_rsp_v, b_rsp_rdy = 0;
  mreq_t b_req = '0;
  mrsp_t b_rsp;
  logic [31:0] model [256];
  logic [31:0] exp_q [$];
  logic [15:0] exp_src [$];
  int checks = 0, failures = 0;

  lbp_shared_bank #(.WORDS(256)) dut (.clk, .rst_n, .a_en, .a_we, .a_be, .a_addr, .a_wdata, .a_rdata,
    .b_req_v, .b_req, .b_req_rdy, .b_rsp_v, .b_rsp, .b_rsp_rdy);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // zero the memory through port A
    for (int i = 0; i < 256; i++) begin
      a_en <= 1; a_we <= 1; a_be <= 4'hf; a_addr <= 8'(i); a_wdata <= 0;
      @(posedge clk);
    end
    a_en <= 0;
    for (int t = 0; t < 2000; t++) begin
      int ka, kb;
      bit took, a_rd;
      ka = $urandom_range(0, 127);       // port A uses the lower half
      kb = $urandom_range(128, 255);     // port B the upper half
      a_en <= 1; a_we <= ($urandom_range(0, 1) == 1); a_be <= 4'($urandom); a_addr <= 8'(ka);
      a_wdata <= $urandom;
      b_req_v <= ($urandom_range(0, 2) != 0);
      b_req <= '{src: 16'($urandom), dst: '0, we: ($urandom_range(0, 1) == 1), be: 4'($urandom),
                 waddr: 30'(kb), wdata: $urandom};
      b_rsp_rdy <= ($urandom_range(0, 3) != 0);
      #1;
      took = b_req_v && b_req_rdy;
      a_rd = !a_we;
      @(posedge clk);
      #1;
      if (a_rd) begin
        checks++;
        if (a_rdata != model[ka]) begin failures++; $display("FAIL port A read %0d", ka); end
      end else
        for (int j = 0; j < 4; j++) if (a_be[j]) model[ka][8*j +: 8] = a_wdata[8*j +: 8];
      if (took) begin
        exp_src.push_back(b_req.src);
        exp_q.push_back(b_req.we ? 32'd0 : model[kb]);
        if (b_req.we) for (int j = 0; j < 4; j++) if (b_req.be[j]) model[kb][8*j +: 8] = b_req.wdata[8*j +: 8];
      end
    end
    b_req_v <= 0; a_en <= 0; b_rsp_rdy <= 1;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d responses missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // response monitor
  always @(posedge clk) if (rst_n && b_rsp_v && b_rsp_rdy) begin
    checks++;
    if (exp_q.size() == 0 || b_rsp.rdata != exp_q[0] || b_rsp.src != exp_src[0]) begin
      failures++; $display("FAIL port B response %h", b_rsp.rdata);
    end
    if (exp_q.size() != 0) begin void'(exp_q.pop_front()); void'(exp_src.pop_front()); end
  end
endmodule
