// lbp_alu: single-cycle functional unit of the LBP core.
//
// Combinational. Computes the RV32I integer operations and the two X_PAR identity
// operations:
//   p_merge: y = (a & 0x7fff0000) | (b & 0x0000ffff)
//   p_set  : y = (a & 0x0000ffff) | (hart_id << 16) | 0x80000000
// where hart_id is the identity 4*core+hart of the executing hart. Both formulas are those
// of the X_PAR definition. Branch comparison is also done here (taken output, funct3 of
// the branch).
module lbp_alu
  import lbp_pkg::*;
(
  input  alu_e        op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [IDW-1:0] hart_id,
  input  logic [2:0]  br_f3,
  input  logic [31:0] br_a,
  input  logic [31:0] br_b,
  output logic [31:0] y,
  output logic        taken
);
  always_comb begin
    unique case (op)
      A_ADD:   y = a + b;
      A_SUB:   y = a - b;
      A_SLL:   y = a << b[4:0];
      A_SLT:   y = {31'b0, $signed(a) < $signed(b)};
      A_SLTU:  y = {31'b0, a < b};
      A_XOR:   y = a ^ b;
      A_SRL:   y = a >> b[4:0];
      A_SRA:   y = $unsigned($signed(a) >>> b[4:0]);
      A_OR:    y = a | b;
      A_AND:   y = a & b;
      A_PASSB: y = b;
      A_MERGE: y = (a & 32'h7fff_0000) | (b & 32'h0000_ffff);
      A_SET:   y = (a & 32'h0000_ffff) | ({16'b0, hart_id} << 16) | 32'h8000_0000;
      default: y = a + b;
    endcase
  end

  always_comb begin
    unique case (br_f3)
      3'd0: taken = (br_a == br_b);
      3'd1: taken = (br_a != br_b);
      3'd4: taken = ($signed(br_a) <  $signed(br_b));
      3'd5: taken = ($signed(br_a) >= $signed(br_b));
      3'd6: taken = (br_a <  br_b);
      3'd7: taken = (br_a >= br_b);
      default: taken = 1'b0;
    endcase
  end
endmodule
