// lbp_hart_alloc: hart allocator of one core (p_fc and p_fn forks).
//
// A fork allocates a free hart: p_fc on the same core, p_fn on the next core of the line.
// The allocator sees which harts are free and two kinds of requests:
//   prev_req  : a p_fn request from the preceding core, held in a register there until
//               granted; it has priority and gets the lowest-numbered free hart.
//   local_req : a p_fc of this core; it gets the lowest free hart left over.
// local_avail tells the issue stage whether a p_fc can be served this cycle; it depends only
// on registered state (free vector, prev_req register), so there is no combinational path
// along the line of cores. next_avail (any hart free) is what the preceding core waits for.
// Lowest-first allocation fills a core's harts in order, as the team-creation code expects.
module lbp_hart_alloc #(
  parameter int N = 4
) (
  input  logic [N-1:0] free_vec,
  input  logic         prev_req,
  output logic         prev_gnt,
  output logic [$clog2(N)-1:0] prev_hart,
  input  logic         local_req,
  output logic         local_avail,
  output logic [$clog2(N)-1:0] local_hart,
  output logic [N-1:0] alloc_vec      // harts allocated this cycle
);
  logic [N-1:0] rest;
  always_comb begin
    prev_gnt = 1'b0;
    prev_hart = '0;
    for (int i = N - 1; i >= 0; i--)
      if (free_vec[i]) begin prev_gnt = prev_req; prev_hart = i[$clog2(N)-1:0]; end
    rest = free_vec;
    if (prev_gnt) rest[prev_hart] = 1'b0;
    local_avail = |rest;
    local_hart = '0;
    for (int i = N - 1; i >= 0; i--)
      if (rest[i]) local_hart = i[$clog2(N)-1:0];
  end

  always_comb begin
    alloc_vec = '0;
    if (prev_gnt) alloc_vec[prev_hart] = 1'b1;
    if (local_req && local_avail) alloc_vec[local_hart] = 1'b1;
  end
endmodule
