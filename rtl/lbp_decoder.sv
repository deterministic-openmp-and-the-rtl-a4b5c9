// lbp_decoder: decode stage logic of an LBP hart (RV32IM + X_PAR).
//
// Purely combinational. Takes one fetched instruction and its pc and produces the decoded
// record (class, ALU operation, register fields, immediate) and the next pc when it is
// already known at decode: pc+4 for every non-control instruction, the target of jal and of
// p_jal (whose target is pc+offset). Conditional branches, jalr and p_jalr only know their
// next pc at issue; p_ret (p_jalr with rd = x0) has no next pc: the hart ends or waits.
// The X_PAR binary layout is this design's own: custom-0 with funct3 selecting p_lwcv,
// p_swcv, p_lwre, p_swre, p_jalr, p_merge, p_set, and funct7 selecting p_fc/p_fn/p_syncm
// under funct3=7; p_jal uses custom-1 with the I-type layout (rd, rs1, 12-bit byte offset).
// fence/ecall/ebreak and unknown encodings decode as no-operations.
module lbp_decoder
  import lbp_pkg::*;
(
  input  logic [31:0] instr,
  input  logic [31:0] pc,
  output dec_t        dec
);
  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  assign opc = instr[6:0];
  assign f3  = instr[14:12];
  assign f7  = instr[31:25];
  assign imm_i = {{20{instr[31]}}, instr[31:20]};
  assign imm_s = {{20{instr[31]}}, instr[31:25], instr[11:7]};
  assign imm_b = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
  assign imm_u = {instr[31:12], 12'b0};
  assign imm_j = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

  always_comb begin
    dec = '0;
    dec.cls = C_NOP;
    dec.aluop = A_ADD;
    dec.funct3 = f3;
    dec.rd  = instr[11:7];
    dec.rs1 = instr[19:15];
    dec.rs2 = instr[24:20];
    dec.next_known = 1'b1;
    dec.next_pc = pc + 32'd4;
    unique case (opc)
      OPC_LUI: begin
        dec.cls = C_ALU; dec.aluop = A_PASSB; dec.b_imm = 1'b1; dec.imm = imm_u; dec.wr_rd = 1'b1;
      end
      OPC_AUIPC: begin
        dec.cls = C_ALU; dec.aluop = A_ADD; dec.a_pc = 1'b1; dec.b_imm = 1'b1; dec.imm = imm_u;
        dec.wr_rd = 1'b1;
      end
      OPC_JAL: begin
        dec.cls = C_JAL; dec.imm = imm_j; dec.wr_rd = 1'b1; dec.next_pc = pc + imm_j;
      end
      OPC_JALR: begin
        dec.cls = C_JALR; dec.imm = imm_i; dec.use_rs1 = 1'b1; dec.wr_rd = 1'b1;
        dec.next_known = 1'b0;
      end
      OPC_BRANCH: begin
        dec.cls = C_BRANCH; dec.imm = imm_b; dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1;
        dec.next_known = 1'b0;
      end
      OPC_LOAD: begin
        dec.cls = C_LOAD; dec.imm = imm_i; dec.use_rs1 = 1'b1; dec.wr_rd = 1'b1;
      end
      OPC_STORE: begin
        dec.cls = C_STORE; dec.imm = imm_s; dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1;
      end
      OPC_OPIMM: begin
        dec.cls = C_ALU; dec.imm = imm_i; dec.use_rs1 = 1'b1; dec.b_imm = 1'b1; dec.wr_rd = 1'b1;
        unique case (f3)
          3'd0: dec.aluop = A_ADD;
          3'd1: dec.aluop = A_SLL;
          3'd2: dec.aluop = A_SLT;
          3'd3: dec.aluop = A_SLTU;
          3'd4: dec.aluop = A_XOR;
          3'd5: dec.aluop = instr[30] ? A_SRA : A_SRL;
          3'd6: dec.aluop = A_OR;
          default: dec.aluop = A_AND;
        endcase
      end
      OPC_OP: begin
        dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1; dec.wr_rd = 1'b1;
        if (f7 == 7'b0000001) begin
          dec.cls = C_MULDIV;
        end else begin
          dec.cls = C_ALU;
          unique case (f3)
            3'd0: dec.aluop = instr[30] ? A_SUB : A_ADD;
            3'd1: dec.aluop = A_SLL;
            3'd2: dec.aluop = A_SLT;
            3'd3: dec.aluop = A_SLTU;
            3'd4: dec.aluop = A_XOR;
            3'd5: dec.aluop = instr[30] ? A_SRA : A_SRL;
            3'd6: dec.aluop = A_OR;
            default: dec.aluop = A_AND;
          endcase
        end
      end
      OPC_XPAR: begin
        unique case (f3)
          XF_LWCV: begin dec.cls = C_LWCV; dec.imm = imm_i; dec.wr_rd = 1'b1; end
          XF_SWCV: begin
            dec.cls = C_SWCV; dec.imm = imm_s; dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1;
          end
          XF_LWRE: begin dec.cls = C_LWRE; dec.imm = imm_i; dec.wr_rd = 1'b1; end
          XF_SWRE: begin
            dec.cls = C_SWRE; dec.imm = imm_s; dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1;
          end
          XF_JALR: begin
            dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1; dec.next_known = 1'b0;
            if (instr[11:7] == 5'd0) dec.cls = C_PRET;
            else begin dec.cls = C_PJALR; dec.wr_rd = 1'b1; end
          end
          XF_MERGE: begin
            dec.cls = C_ALU; dec.aluop = A_MERGE; dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1;
            dec.wr_rd = 1'b1;
          end
          XF_SET: begin
            dec.cls = C_ALU; dec.aluop = A_SET; dec.use_rs1 = 1'b1; dec.wr_rd = 1'b1;
          end
          default: begin
            if (f7 == XF7_FC)      begin dec.cls = C_PFC; dec.wr_rd = 1'b1; end
            else if (f7 == XF7_FN) begin dec.cls = C_PFN; dec.wr_rd = 1'b1; end
            else if (f7 == XF7_SYNCM) dec.cls = C_SYNCM;
            else dec.cls = C_NOP;
          end
        endcase
      end
      OPC_PJAL: begin
        dec.cls = C_PJAL; dec.imm = imm_i; dec.use_rs1 = 1'b1; dec.wr_rd = 1'b1;
        dec.next_pc = pc + imm_i;
      end
      default: dec.cls = C_NOP;
    endcase
    if (dec.rd == 5'd0) dec.wr_rd = 1'b0;
    if (dec.rs1 == 5'd0) dec.use_rs1 = 1'b0;
    if (dec.rs2 == 5'd0) dec.use_rs2 = 1'b0;
  end
endmodule
