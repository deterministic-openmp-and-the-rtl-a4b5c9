// tb_lbp_local_bank: random byte-enabled writes and reads on port A, word writes on port B
// (continuation values from the forward link), against a reference memory.
module tb_lbp_local_bank;
  logic clk = 1'b0;
  logic a_en = 0, a_we = 0, b_we = 0;
  logic [3:0] a_be = '0;
  logic [7:0] a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, a_rdata, b_wdata = '0;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  lbp_local_bank #(.WORDS(256)) dut (.clk, .a_en, .a_we, .a_be, .a_addr, .a_wdata, .a_rdata,
                                     .b_we, .b_addr, .b_wdata);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 256; i++) begin
      model[i] = i * 3;
      b_we <= 1'b1; b_addr <= 8'(i); b_wdata <= model[i];
      @(posedge clk);
    end
    b_we <= 1'b0;
    for (int t = 0; t < 1000; t++) begin
      int k, kb;
      k = $urandom_range(0, 255);
      kb = $urandom_range(0, 255);
      a_en <= 1'b1; a_addr <= 8'(k);
      a_we <= t[0];
      a_be <= 4'($urandom); a_wdata <= $urandom;
      b_we <= (t % 3 == 0) && kb != k; b_addr <= 8'(kb); b_wdata <= $urandom;
      @(posedge clk);
      #1;
      if (a_we) begin
        for (int j = 0; j < 4; j++) if (a_be[j]) model[k][8*j +: 8] = a_wdata[8*j +: 8];
      end else begin
        checks++;
        if (a_rdata != model[k]) begin failures++; $display("FAIL read %0d", k); end
      end
      if (b_we) model[kb] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
