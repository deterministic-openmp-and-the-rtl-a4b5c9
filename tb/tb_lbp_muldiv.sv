// tb_lbp_muldiv: multi-cycle multiply/divide unit. Random operands, all eight RV32M
// operations, the RISC-V corner cases (division by zero, overflow), and the latency:
// done must come exactly MUL_LAT / DIV_LAT cycles after start.
module tb_lbp_muldiv;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done;
  logic [2:0] f3;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  lbp_muldiv #(.MUL_LAT(3), .DIV_LAT(8)) dut (.clk, .rst_n, .start, .f3, .a, .b, .busy, .done, .y);
  always #5 clk = ~clk;

  function automatic logic [31:0] ref_y(logic [2:0] f, logic [31:0] x, logic [31:0] z);
    logic signed [63:0] sx, sz;
    logic [63:0] ux, uz;
    sx = $signed(x); sz = $signed(z); ux = {32'b0, x}; uz = {32'b0, z};
    case (f)
      0: return x * z;
      1: return 32'((sx * sz) >>> 32);
      2: return 32'((sx * $signed(uz)) >>> 32);
      3: return 32'((ux * uz) >> 32);
      4: return (z == 0) ? '1 : (x == 32'h8000_0000 && z == '1) ? x : 32'($signed(x) / $signed(z));
      5: return (z == 0) ? '1 : x / z;
      6: return (z == 0) ? x : (x == 32'h8000_0000 && z == '1) ? 0 : 32'($signed(x) % $signed(z));
      default: return (z == 0) ? x : x % z;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 600; t++) begin
      int lat, n;
      f3 <= 3'(t % 8); a <= $urandom; b <= (t % 13 == 0) ? 32'd0 : $urandom >> (t % 30);
      if (t % 17 == 0) begin a <= 32'h8000_0000; b <= '1; end
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      lat = (t % 8 >= 4) ? 8 : 3;
      n = 0;
      while (!done) begin @(posedge clk); n++; end
      checks++;
      if (y != ref_y(f3, a, b) || n != lat) begin
        failures++;
        $display("FAIL f3=%0d a=%h b=%h y=%h exp %h n=%0d", f3, a, b, y, ref_y(f3, a, b), n);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
