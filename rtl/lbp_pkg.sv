// lbp_pkg: types and constants shared by the LBP manycore.
//
// Holds the instruction classes produced by the decoder, the ALU operation codes, the
// decoded-instruction record, the X_PAR instruction encoding, and the message formats of
// the three kinds of inter-core traffic:
//   - the forward link (core c to core c+1): continuation-value writes and hart starts,
//   - the backward line (core c to any core below c): results (p_swre) and join addresses,
//   - the shared-memory request/response network through the r1/r2/r3 routers.
// A hart identity is the number 4*core+hart (16 bits), as returned by p_fc/p_fn.
// The binary encoding of X_PAR is this design's own choice (custom-0 / custom-1 opcodes);
// only the instruction semantics come from the X_PAR definition.
package lbp_pkg;

  localparam int XLEN   = 32;
  localparam int NHARTS = 4;            // harts per core
  localparam int HW     = 2;            // log2(NHARTS)
  localparam int IDW    = 16;           // hart identity width
  localparam int RSLOTS = 4;            // numbered result buffers per hart (p_swre/p_lwre)
  localparam int CV_WORDS = 16;         // continuation-value area per hart, in words

  // Address map (byte addresses)
  localparam logic [3:0] REG_LOCAL  = 4'h1;   // 0x1xxx_xxxx : local (stack) bank of own core
  localparam logic [3:0] REG_SHARED = 4'h2;   // 0x2xxx_xxxx : shared banks, bank = core

  // RISC-V opcodes
  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC  = 7'b0010111;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;
  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] OPC_XPAR   = 7'b0001011;  // custom-0: X_PAR
  localparam logic [6:0] OPC_PJAL   = 7'b0101011;  // custom-1: p_jal (B-type layout)

  // X_PAR funct3 values under OPC_XPAR
  localparam logic [2:0] XF_LWCV  = 3'd0;  // I-type  p_lwcv  rd, off
  localparam logic [2:0] XF_SWCV  = 3'd1;  // S-type  p_swcv  rs1, rs2, off
  localparam logic [2:0] XF_LWRE  = 3'd2;  // I-type  p_lwre  rd, off
  localparam logic [2:0] XF_SWRE  = 3'd3;  // S-type  p_swre  rs1, rs2, off
  localparam logic [2:0] XF_JALR  = 3'd4;  // R-type  p_jalr  rd, rs1, rs2 (rd=x0: p_ret)
  localparam logic [2:0] XF_MERGE = 3'd5;  // R-type  p_merge rd, rs1, rs2
  localparam logic [2:0] XF_SET   = 3'd6;  // R-type  p_set   rd, rs1
  localparam logic [2:0] XF_MISC  = 3'd7;  // funct7: 0 p_fc rd, 1 p_fn rd, 2 p_syncm
  localparam logic [6:0] XF7_FC = 7'd0, XF7_FN = 7'd1, XF7_SYNCM = 7'd2;

  typedef enum logic [4:0] {
    C_ALU, C_BRANCH, C_JAL, C_JALR, C_LOAD, C_STORE, C_MULDIV,
    C_LWCV, C_SWCV, C_LWRE, C_SWRE, C_PJAL, C_PJALR, C_PRET,
    C_PFC, C_PFN, C_SYNCM, C_NOP
  } cls_e;

  typedef enum logic [3:0] {
    A_ADD, A_SUB, A_SLL, A_SLT, A_SLTU, A_XOR, A_SRL, A_SRA, A_OR, A_AND,
    A_PASSB, A_MERGE, A_SET
  } alu_e;

  typedef struct packed {
    cls_e        cls;
    alu_e        aluop;
    logic [2:0]  funct3;
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic        use_rs1;
    logic        use_rs2;
    logic        wr_rd;      // writes a (non-zero) destination register
    logic        b_imm;      // ALU operand b is the immediate
    logic        a_pc;       // ALU operand a is the pc (auipc)
    logic [31:0] imm;
    logic        next_known; // next pc is known at decode
    logic [31:0] next_pc;    // valid when next_known
  } dec_t;

  // Forward link (core c -> core c+1)
  typedef enum logic [0:0] {F_CVW, F_START} fwd_kind_e;
  typedef struct packed {
    fwd_kind_e   kind;
    logic [HW-1:0] hart;     // destination hart in the next core
    logic [5:0]  woff;       // F_CVW: word offset in the continuation-value area
    logic [31:0] data;       // F_CVW: value, F_START: start pc
  } fwd_msg_t;

  // Backward line (core c -> core d < c)
  typedef enum logic [0:0] {B_RES, B_JOIN} bwd_kind_e;
  typedef struct packed {
    bwd_kind_e   kind;
    logic [IDW-1:0] dst;     // destination hart identity (4*core+hart)
    logic [1:0]  slot;       // B_RES: result buffer number
    logic [31:0] data;       // B_RES: value, B_JOIN: restart pc
  } bwd_msg_t;

  // Shared memory network
  typedef struct packed {
    logic [IDW-1:0] src;     // requesting hart identity
    logic [IDW-3:0] dst;     // destination bank (= core number)
    logic        we;
    logic [3:0]  be;
    logic [29:0] waddr;      // word address inside the bank
    logic [31:0] wdata;
  } mreq_t;

  typedef struct packed {
    logic [IDW-1:0] src;     // requesting hart identity (route back)
    logic [31:0] rdata;
  } mrsp_t;

  localparam int MREQ_W = $bits(mreq_t);
  localparam int MRSP_W = $bits(mrsp_t);

endpackage
