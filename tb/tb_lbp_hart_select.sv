// tb_lbp_hart_select: round-robin hart selection.
// Drives random request vectors and compares the grant with a reference model that keeps
// its own pointer: the first requesting hart after the last one granted.
module tb_lbp_hart_select;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] req;
  logic any;
  logic [1:0] sel;
  int checks = 0, failures = 0;
  int last = 3;

  lbp_hart_select #(.N(4)) dut (.clk, .rst_n, .req, .adv(1'b1), .any, .sel);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      int exp_sel;
      bit exp_any;
      req = 4'($urandom);
      if (t % 7 == 0) req = 4'b1111;
      #1;
      exp_any = 0; exp_sel = 0;
      for (int k = 1; k <= 4; k++)
        if (!exp_any && req[(last + k) % 4]) begin exp_any = 1; exp_sel = (last + k) % 4; end
      checks++;
      if (any != exp_any || (exp_any && sel != 2'(exp_sel))) begin
        failures++;
        $display("FAIL t=%0d req=%b any=%b sel=%0d exp %0d", t, req, any, sel, exp_sel);
      end
      if (exp_any) last = exp_sel;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
