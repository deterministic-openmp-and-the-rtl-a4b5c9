// tb_lbp_code_bank: writes random words through the load port and reads them back through
// the fetch port, checking the one-cycle read latency.
module tb_lbp_code_bank;
  logic clk = 1'b0, re = 1'b0, we = 1'b0;
  logic [7:0] raddr = '0, waddr = '0;
  logic [31:0] rdata, wdata = '0;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  lbp_code_bank #(.WORDS(256)) dut (.clk, .re, .raddr, .rdata, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 256; i++) begin
      model[i] = $urandom;
      we <= 1'b1; waddr <= 8'(i); wdata <= model[i];
      @(posedge clk);
    end
    we <= 1'b0;
    for (int i = 0; i < 300; i++) begin
      int k;
      k = $urandom_range(0, 255);
      re <= 1'b1; raddr <= 8'(k);
      @(posedge clk);
      re <= 1'b0;
      #1;
      checks++;
      if (rdata != model[k]) begin failures++; $display("FAIL addr %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
