// lbp_shared_bank: the shared global memory bank attached to one LBP core.
//
// Two access ports, as in the LBP memory organisation: port A for the accesses of the local
// core (synchronous, byte enables, read data one cycle after the request, always ready) and
// port B for distant accesses arriving through the r1 router. Port B takes a request
// (valid/ready) and answers with a response carrying the requester's identity one cycle
// later; a write answers too (acknowledge, rdata = 0), so a distant store is complete when
// its response returns. A new port-B request is taken only when the response register is
// empty or being drained.
module lbp_shared_bank
  import lbp_pkg::*;
#(
  parameter int WORDS = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        a_en,
  input  logic        a_we,
  input  logic [3:0]  a_be,
  input  logic [$clog2(WORDS)-1:0] a_addr,
  input  logic [31:0] a_wdata,
  output logic [31:0] a_rdata,
  input  logic        b_req_v,
  input  mreq_t       b_req,
  output logic        b_req_rdy,
  output logic        b_rsp_v,
  output mrsp_t       b_rsp,
  input  logic        b_rsp_rdy
);
  localparam int AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];
  logic        take;
  logic [AW-1:0] baddr;

  assign b_req_rdy = !b_rsp_v || b_rsp_rdy;
  assign take = b_req_v && b_req_rdy;
  assign baddr = b_req.waddr[AW-1:0];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) begin
        for (int i = 0; i < 4; i++)
          if (a_be[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      end else begin
        a_rdata <= mem[a_addr];
      end
    end
    if (take && b_req.we) begin
      for (int i = 0; i < 4; i++)
        if (b_req.be[i]) mem[baddr][8*i +: 8] <= b_req.wdata[8*i +: 8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_rsp_v <= 1'b0;
      b_rsp   <= '0;
    end else begin
      if (take) begin
        b_rsp_v     <= 1'b1;
        b_rsp.src   <= b_req.src;
        b_rsp.rdata <= b_req.we ? 32'd0 : mem[baddr];
      end else if (b_rsp_rdy) begin
        b_rsp_v <= 1'b0;
      end
    end
  end
endmodule
