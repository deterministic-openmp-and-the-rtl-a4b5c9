// tb_lbp_decoder: decoder checks on hand-assembled RV32IM and X_PAR instructions: class,
// register fields, immediates and the next pc known at decode (or not known, for
// branches, jalr, p_jalr and p_ret), and the ALU operation chosen for the shift and
// subtract encodings.
module tb_lbp_decoder;
  import lbp_pkg::*;
  import lbp_asm_pkg::*;
  logic [31:0] instr, pc;
  dec_t dec;
  int checks = 0, failures = 0;

  lbp_decoder dut (.instr, .pc, .dec);

  task automatic t(input logic [31:0] i, input cls_e c, input int rd, input int rs1, input int rs2,
                   input logic [31:0] imm, input bit nk, input logic [31:0] npc, input string n);
    instr = i; pc = 32'h100;
    #1;
    checks++;
    if (dec.cls != c || (dec.wr_rd && dec.rd != 5'(rd)) || (dec.use_rs1 && dec.rs1 != 5'(rs1)) ||
        (dec.use_rs2 && dec.rs2 != 5'(rs2)) || dec.imm != imm || dec.next_known != nk ||
        (nk && dec.next_pc != npc)) begin
      failures++;
      $display("FAIL %s: cls=%s imm=%h nk=%b npc=%h", n, dec.cls.name(), dec.imm, dec.next_known, dec.next_pc);
    end
  endtask

  initial begin
    t(addi(A0, A1, -5), C_ALU, A0, A1, 0, 32'hffff_fffb, 1, 32'h104, "addi");
    t(lui(T4, 32'h20000), C_ALU, T4, 0, 0, 32'h2000_0000, 1, 32'h104, "lui");
    t(add(A0, A1, A2), C_ALU, A0, A1, A2, 0, 1, 32'h104, "add");
    t(mul(A0, A1, A2), C_MULDIV, A0, A1, A2, 0, 1, 32'h104, "mul");
    t(lw(A0, SP, 12), C_LOAD, A0, SP, 0, 12, 1, 32'h104, "lw");
    t(sw(A0, SP, -8), C_STORE, 0, SP, A0, 32'hffff_fff8, 1, 32'h104, "sw");
    t(beq(A0, A1, -16), C_BRANCH, 0, A0, A1, 32'hffff_fff0, 0, 0, "beq");
    t(jal(RA, 64), C_JAL, RA, 0, 0, 64, 1, 32'h140, "jal");
    t(jalr(RA, A0, 0), C_JALR, RA, A0, 0, 0, 0, 0, "jalr");
    t(p_lwcv(RA, 8), C_LWCV, RA, 0, 0, 8, 1, 32'h104, "p_lwcv");
    t(p_swcv(T6, A1, 8), C_SWCV, 0, T6, A1, 8, 1, 32'h104, "p_swcv");
    t(p_lwre(A0, 2), C_LWRE, A0, 0, 0, 2, 1, 32'h104, "p_lwre");
    t(p_swre(T0, A0, 1), C_SWRE, 0, T0, A0, 1, 1, 32'h104, "p_swre");
    t(p_jalr(RA, A0, T0), C_PJALR, RA, A0, T0, 0, 0, 0, "p_jalr");
    t(p_ret(), C_PRET, 0, RA, T0, 0, 0, 0, "p_ret");
    t(p_merge(T0, T0, T6), C_ALU, T0, T0, T6, 0, 1, 32'h104, "p_merge");
    t(p_set(T0, T0), C_ALU, T0, T0, 0, 0, 1, 32'h104, "p_set");
    t(p_fc(T6), C_PFC, T6, 0, 0, 0, 1, 32'h104, "p_fc");
    t(p_fn(T6), C_PFN, T6, 0, 0, 0, 1, 32'h104, "p_fn");
    t(p_syncm(), C_SYNCM, 0, 0, 0, 0, 1, 32'h104, "p_syncm");
    t(p_jal(RA, T6, -32), C_PJAL, RA, T6, 0, 32'hffff_ffe0, 1, 32'h0e0, "p_jal");
    // ALU operation selection, including the shift pair told apart by bit 30
    instr = sub(A0, A1, A2); #1;
    checks++; if (dec.aluop != A_SUB) begin failures++; $display("FAIL sub op"); end
    instr = srli(A0, A1, 3); #1;
    checks++; if (dec.aluop != A_SRL) begin failures++; $display("FAIL srli op"); end
    instr = {7'b0100000, 5'd3, 5'(A1), 3'b101, 5'(A0), 7'b0010011}; #1;   // srai a0, a1, 3
    checks++; if (dec.aluop != A_SRA || dec.imm[4:0] != 5'd3) begin failures++; $display("FAIL srai op"); end
    instr = {7'b0100000, 5'(A2), 5'(A1), 3'b101, 5'(A0), 7'b0110011}; #1;     // sra a0, a1, a2
    checks++; if (dec.aluop != A_SRA) begin failures++; $display("FAIL sra op"); end
    instr = p_merge(T0, T0, T6); #1;
    checks++; if (dec.aluop != A_MERGE) failures++;
    instr = p_set(T0, T0); #1;
    checks++; if (dec.aluop != A_SET) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
