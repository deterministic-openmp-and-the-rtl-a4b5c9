// lbp_local_bank: the local data (stack) bank of one LBP core.
//
// Holds the stacks of the core's harts, including the continuation-value area each hart
// reads with p_lwcv. Port A serves the core's loads/stores (synchronous read, byte
// enables, read data in the cycle after the request). Port B is a word write port used by
// continuation-value writes (p_swcv) arriving from the preceding core on the forward link,
// so that they never compete with the core's own accesses. A same-word write on both ports
// in one cycle keeps port B's value (cannot happen with correct fork code).
module lbp_local_bank #(
  parameter int WORDS = 1024
) (
  input  logic        clk,
  input  logic        a_en,
  input  logic        a_we,
  input  logic [3:0]  a_be,
  input  logic [$clog2(WORDS)-1:0] a_addr,
  input  logic [31:0] a_wdata,
  output logic [31:0] a_rdata,
  input  logic        b_we,
  input  logic [$clog2(WORDS)-1:0] b_addr,
  input  logic [31:0] b_wdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) begin
        for (int i = 0; i < 4; i++)
          if (a_be[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      end else begin
        a_rdata <= mem[a_addr];
      end
    end
    if (b_we) mem[b_addr] <= b_wdata;
  end
endmodule
