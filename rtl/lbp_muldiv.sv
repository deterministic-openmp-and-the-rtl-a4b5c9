// lbp_muldiv: multi-cycle multiply/divide functional unit (RV32M).
//
// One operation at a time. A start pulse with funct3, a and b latches the operands; done
// pulses MUL_LAT cycles later for the multiplications and DIV_LAT cycles later for the
// divisions/remainders, with the result on y (held until the next start). busy is high
// from start until done. The latencies are this design's choice: the multi-cycle unit is
// only named, without its timing. Division by zero and signed overflow follow RISC-V.
module lbp_muldiv #(
  parameter int MUL_LAT = 3,
  parameter int DIV_LAT = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [2:0]  f3,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        busy,
  output logic        done,
  output logic [31:0] y
);
  logic [7:0]  cnt;
  logic [31:0] res;
  logic signed [63:0] p_ss;
  logic signed [63:0] p_su;
  logic [63:0] p_uu;

  always_comb begin
    p_ss = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b});
    p_su = $signed({{32{a[31]}}, a}) * $signed({32'b0, b});
    p_uu = {32'b0, a} * {32'b0, b};
    unique case (f3)
      3'd0: res = p_uu[31:0];
      3'd1: res = p_ss[63:32];
      3'd2: res = p_su[63:32];
      3'd3: res = p_uu[63:32];
      3'd4: res = (b == 0) ? 32'hffff_ffff :
                  (a == 32'h8000_0000 && b == 32'hffff_ffff) ? a :
                  $unsigned($signed(a) / $signed(b));
      3'd5: res = (b == 0) ? 32'hffff_ffff : a / b;
      3'd6: res = (b == 0) ? a :
                  (a == 32'h8000_0000 && b == 32'hffff_ffff) ? 32'd0 :
                  $unsigned($signed(a) % $signed(b));
      default: res = (b == 0) ? a : a % b;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; busy <= 1'b0; done <= 1'b0; y <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        y <= res;
        busy <= 1'b1;
        cnt <= f3[2] ? 8'(DIV_LAT - 1) : 8'(MUL_LAT - 1);
      end else if (busy) begin
        if (cnt == 8'd1 || cnt == 8'd0) begin
          busy <= 1'b0; done <= 1'b1;
        end
        cnt <= cnt - 8'd1;
      end
    end
  end
endmodule
