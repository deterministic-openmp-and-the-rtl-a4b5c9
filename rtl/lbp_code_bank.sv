// lbp_code_bank: the code memory bank of one LBP core.
//
// Each core fetches from its own code bank, so fetch never leaves the core. One synchronous
// read port for the fetch stage (address presented in cycle t, instruction available in
// cycle t+1) and one write port used to load the program (all cores hold the same code).
// WORDS is 32-bit words; the bank size is this design's choice.
module lbp_code_bank #(
  parameter int WORDS = 4096
) (
  input  logic        clk,
  input  logic        re,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [31:0] wdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
