// mips_pkg: shared encodings and pipeline-register types of the five-stage
// MIPS pipeline (IF, ID, EX, MEM, WB).
//
// Opcode and funct values are the standard MIPS32 encodings. The instruction
// subset is the one the SHA3-256 program needs: lw, sw, addi, beq, bne, j and
// the R-type add, sub, and, or, xor, nor, slt, sllv, srlv. The control word is
// split into the EX, M and WB groups that travel with an instruction down the
// pipeline registers; the signal names (RegDst, ALUSrc, ALUOp, Branch,
// MemRead, MemWrite, RegWrite, MemtoReg) are those of the classic pipelined
// datapath. Bne and Jump in the M group are this design's additions.
package mips_pkg;

  // ---- opcodes (instr[31:26]) ----
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // ---- R-type funct codes (instr[5:0]) ----
  localparam logic [5:0] FN_SLLV = 6'h04;
  localparam logic [5:0] FN_SRLV = 6'h06;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_NOR  = 6'h27;
  localparam logic [5:0] FN_SLT  = 6'h2A;

  // ALUOp from the main decoder to ALU control
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,   // lw, sw, addi
    ALUOP_SUB   = 2'b01,   // beq, bne
    ALUOP_FUNCT = 2'b10    // R-type: decided by funct
  } aluop_t;

  // ALU operation
  typedef enum logic [3:0] {
    ALU_AND  = 4'd0,
    ALU_OR   = 4'd1,
    ALU_ADD  = 4'd2,
    ALU_XOR  = 4'd3,
    ALU_NOR  = 4'd4,
    ALU_SUB  = 4'd6,
    ALU_SLT  = 4'd7,
    ALU_SLLV = 4'd8,
    ALU_SRLV = 4'd9
  } alu_op_t;

  // ---- control groups ----
  typedef struct packed {
    logic   reg_dst;   // 1: write register is rd, 0: rt
    logic   alu_src;   // 1: ALU B operand is the immediate
    aluop_t alu_op;
  } ex_ctrl_t;

  typedef struct packed {
    logic branch;      // beq
    logic bne;         // bne
    logic jump;        // j
    logic mem_read;
    logic mem_write;
  } m_ctrl_t;

  typedef struct packed {
    logic reg_write;
    logic mem_to_reg;  // 1: write back the loaded word
  } wb_ctrl_t;

  typedef struct packed {
    wb_ctrl_t wb;
    m_ctrl_t  m;
    ex_ctrl_t ex;
  } ctrl_t;

  // ---- pipeline registers ----
  typedef struct packed {
    logic [31:0] instr;
    logic [31:0] pc4;
  } if_id_t;

  typedef struct packed {
    wb_ctrl_t    wb;
    m_ctrl_t     m;
    ex_ctrl_t    ex;
    logic [31:0] pc4;
    logic [31:0] rd1;
    logic [31:0] rd2;
    logic [31:0] imm;
    logic [4:0]  rt;
    logic [4:0]  rd;
    logic [25:0] jindex;   // instr[25:0]; funct is imm[5:0]
  } id_ex_t;

  typedef struct packed {
    wb_ctrl_t    wb;
    m_ctrl_t     m;
    logic [31:0] target;   // branch or jump target
    logic        zero;
    logic [31:0] alu_out;
    logic [31:0] wdata;    // rt value for sw
    logic [4:0]  wreg;
  } ex_mem_t;

  typedef struct packed {
    wb_ctrl_t    wb;
    logic [31:0] rdata;
    logic [31:0] alu_out;
    logic [4:0]  wreg;
  } mem_wb_t;

endpackage
