// tb_lbp_hart_alloc: hart allocator. For every free vector and request combination checks
// that a predecessor's p_fn request gets the lowest free hart, that a local p_fc gets the
// lowest hart left over, and that nothing is granted when no hart is free.
module tb_lbp_hart_alloc;
  logic [3:0] free_vec, alloc_vec;
  logic prev_req, prev_gnt, local_req, local_avail;
  logic [1:0] prev_hart, local_hart;
  int checks = 0, failures = 0;

  lbp_hart_alloc #(.N(4)) dut (.free_vec, .prev_req, .prev_gnt, .prev_hart, .local_req,
                               .local_avail, .local_hart, .alloc_vec);

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic [3:0] rest, exp_alloc;
      int ph, lh;
      bit pg, la;
      free_vec = 4'(v); prev_req = v[4]; local_req = v[5];
      #1;
      ph = 0; pg = 0;
      for (int i = 3; i >= 0; i--) if (free_vec[i]) begin pg = prev_req; ph = i; end
      rest = free_vec;
      if (pg) rest[ph] = 0;
      la = |rest; lh = 0;
      for (int i = 3; i >= 0; i--) if (rest[i]) lh = i;
      exp_alloc = 0;
      if (pg) exp_alloc[ph] = 1;
      if (local_req && la) exp_alloc[lh] = 1;
      checks++;
      if (prev_gnt != pg || (pg && prev_hart != 2'(ph)) || local_avail != la ||
          (la && local_hart != 2'(lh)) || alloc_vec != exp_alloc) begin
        failures++;
        $display("FAIL free=%b prev=%b local=%b", free_vec, prev_req, local_req);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
