// tb_lbp_bwd_stage: one backward-line stage, for core 5. Messages arrive from the next core
// at random, addressed to core 5 (must be delivered locally, held while the core is not
// ready) or to a lower core (must be forwarded down, in order). The core injects messages
// for lower cores; an injection may only be accepted when passing traffic leaves the cycle
// free, and must then be forwarded too. The down side has random back-pressure.
module tb_lbp_bwd_stage;
  import lbp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic up_v = 0, up_rdy, inj_v = 0, inj_rdy, dl_v, dl_rdy = 0, dn_v, dn_rdy = 0;
  bwd_msg_t up = '0, inj = '0, dl, dn;
  bwd_msg_t exp_dn [$];
  bwd_msg_t exp_dl [$];
  int checks = 0, failures = 0, n = 0, passed_inj = 0;

  lbp_bwd_stage dut (.clk, .rst_n, .core_id(14'd5), .up_v, .up_msg(up), .up_rdy,
    .inj_v, .inj_msg(inj), .inj_rdy, .deliver_v(dl_v), .deliver_msg(dl), .deliver_rdy(dl_rdy),
    .down_v(dn_v), .down_msg(dn), .down_rdy(dn_rdy));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    // observe this cycle's transfers
    if (dn_v && dn_rdy) begin
      checks++;
      if (exp_dn.size() == 0 || dn != exp_dn[0]) begin failures++; $display("FAIL down %h", dn.data); end
      else void'(exp_dn.pop_front());
    end
    if (dl_v && dl_rdy) begin
      checks++;
      if (dl != up) begin failures++; $display("FAIL deliver"); end
    end
    if (up_v && up_rdy && up.dst[15:2] != 14'd5) exp_dn.push_back(up);
    if (inj_v && inj_rdy) begin
      exp_dn.push_back(inj);
      if (up_v && up.dst[15:2] != 14'd5) begin failures++; $display("FAIL inject over passing traffic"); end
    end
    // next stimulus
    if (!up_v || up_rdy) begin
      up_v <= 0;
      if (n < 1500 && $urandom_range(0, 2) != 0) begin
        up_v <= 1; n++;
        up <= '{kind: bwd_kind_e'($urandom_range(0, 1)),
                dst: 16'(4 * ($urandom_range(0, 2) == 0 ? 5 : $urandom_range(0, 4)) + $urandom_range(0, 3)),
                slot: 2'($urandom), data: 32'(n)};
      end
    end
    if (!inj_v || inj_rdy) begin
      inj_v <= 0;
      if (n < 1500 && $urandom_range(0, 1)) begin
        inj_v <= 1; n++;
        inj <= '{kind: B_RES, dst: 16'($urandom_range(0, 19)), slot: 2'($urandom), data: 32'(n)};
      end
    end
    dl_rdy <= $urandom_range(0, 2) != 0;
    dn_rdy <= $urandom_range(0, 3) != 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (n >= 1500);
    repeat (100) @(posedge clk);
    checks++;
    if (exp_dn.size() != 0) begin failures++; $display("FAIL %0d messages lost", exp_dn.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
