// lbp_hart_select: selection of one hart per cycle for one pipeline stage.
//
// Each of the five LBP pipeline stages (fetch, decode/rename, issue, write back, commit)
// picks, independently of the others, one hart among those eligible for it in this cycle.
// The selection policy is not fixed by the architecture; this design uses a round-robin
// order starting after the hart selected last (when a hart was selected), which is fair
// and fully deterministic. Combinational grant, registered pointer; adv says the grant
// was used (it normally equals any).
module lbp_hart_select #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         adv,
  output logic         any,
  output logic [$clog2(N)-1:0] sel
);
  logic [$clog2(N)-1:0] last;
  logic [$clog2(N)-1:0] idx;

  always_comb begin
    any = 1'b0;
    sel = '0;
    idx = '0;
    for (int k = 1; k <= N; k++) begin
      idx = $clog2(N)'((int'(last) + k) % N);
      if (!any && req[idx]) begin
        any = 1'b1;
        sel = idx[$clog2(N)-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= $clog2(N)'(N - 1);
    else if (adv && any) last <= sel;
  end
endmodule
