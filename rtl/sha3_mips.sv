// sha3_mips: five-stage pipelined 32-bit MIPS processor with its instruction
// and data memories, sized to run a SHA3-256 (Keccak) program.
//
// Stages: IF (PC, instruction memory, PC+4 adder), ID (main control, register
// file, sign extension), EX (ALU, ALU control, ALUSrc and RegDst muxes,
// branch/jump target), MEM (data memory, branch decision) and WB (MemtoReg
// mux into the register file). The four pipeline registers IF/ID, ID/EX,
// EX/MEM and MEM/WB separate them, and the control word decoded in ID travels
// with the instruction in its EX, M and WB groups.
//
// The pipeline has no interlocks: there is no forwarding, no hazard
// detection and no flush. Software must therefore
//   * place an instruction that reads a register at least three instructions
//     after the one that writes it (the register file passes a value written
//     in WB straight to a read in ID in the same cycle), and
//   * treat the three instructions after a beq, bne or j as delay slots that
//     always execute: the branch is decided in MEM, as in the classic
//     datapath, and the jump is resolved there too.
//
// Host interface: while reset is high the program is written into the
// instruction memory (imem_we/imem_waddr/imem_wdata, word index) and the
// tables and padded message into the data memory (host_dmem_*, byte
// address). After reset is released execution starts at address 0. The host
// port of the data memory can be read at any time, e.g. to poll a done flag
// and read the digest.
//
// Observation outputs carry the names used in the simulation waveforms of
// the original processor: pc, pcnext, instr, aluout (EX), dataadr,
// writedata, memwrite and readdata (MEM).
//
// The datapath, stage split and control grouping follow the classic
// pipelined MIPS; the instruction subset, the jump path, memory sizes, host
// ports and reset are this design's choices.
module sha3_mips
  import mips_pkg::*;
#(
  parameter int IMEM_WORDS = 1024,
  parameter int DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        reset,
  // program load
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  // host access to data memory
  input  logic        host_dmem_we,
  input  logic [31:0] host_dmem_addr,
  input  logic [31:0] host_dmem_wdata,
  output logic [31:0] host_dmem_rdata,
  // observation
  output logic [31:0] pc,
  output logic [31:0] pcnext,
  output logic [31:0] instr,
  output logic [31:0] aluout,
  output logic [31:0] dataadr,
  output logic [31:0] writedata,
  output logic        memwrite,
  output logic [31:0] readdata
);
  // ---------------- IF ----------------
  logic [31:0] pc4_f;
  logic        pcsrc;
  if_id_t      if_id_d, if_id_q;
  id_ex_t      id_ex_d, id_ex_q;
  ex_mem_t     ex_mem_d, ex_mem_q;
  mem_wb_t     mem_wb_d, mem_wb_q;

  pc_reg #(.W(32)) u_pc (.clk, .reset, .pc_next(pcnext), .pc);
  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc), .rdata(instr),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata));
  adder #(.W(32)) u_pc_add (.a(pc), .b(32'd4), .y(pc4_f));
  mux2 #(.W(32)) u_pcsrc_mux (.d0(pc4_f), .d1(ex_mem_q.target), .s(pcsrc), .y(pcnext));

  assign if_id_d.instr = instr;
  assign if_id_d.pc4   = pc4_f;
  if_id_reg u_if_id (.clk, .reset, .d(if_id_d), .q(if_id_q));

  // ---------------- ID ----------------
  ctrl_t       ctrl_d;
  logic [31:0] rd1_d, rd2_d, imm_d, wb_data;

  control u_control (.opcode(if_id_q.instr[31:26]), .ctrl(ctrl_d));
  regfile #(.NREGS(32), .W(32)) u_regfile (
    .clk, .reset,
    .ra1(if_id_q.instr[25:21]), .ra2(if_id_q.instr[20:16]),
    .rd1(rd1_d), .rd2(rd2_d),
    .we(mem_wb_q.wb.reg_write), .wa(mem_wb_q.wreg), .wd(wb_data));
  sign_extend u_sext (.a(if_id_q.instr[15:0]), .y(imm_d));

  assign id_ex_d.wb     = ctrl_d.wb;
  assign id_ex_d.m      = ctrl_d.m;
  assign id_ex_d.ex     = ctrl_d.ex;
  assign id_ex_d.pc4    = if_id_q.pc4;
  assign id_ex_d.rd1    = rd1_d;
  assign id_ex_d.rd2    = rd2_d;
  assign id_ex_d.imm    = imm_d;
  assign id_ex_d.rt     = if_id_q.instr[20:16];
  assign id_ex_d.rd     = if_id_q.instr[15:11];
  assign id_ex_d.jindex = if_id_q.instr[25:0];
  id_ex_reg u_id_ex (.clk, .reset, .d(id_ex_d), .q(id_ex_q));

  // ---------------- EX ----------------
  logic [31:0] srcb;
  alu_op_t     alu_op;
  logic        zero_e;
  logic [4:0]  wreg_e;
  logic [31:0] target_e;

  mux2 #(.W(32)) u_alusrc_mux (.d0(id_ex_q.rd2), .d1(id_ex_q.imm), .s(id_ex_q.ex.alu_src), .y(srcb));
  alu_control u_alu_control (.aluop(id_ex_q.ex.alu_op), .funct(id_ex_q.imm[5:0]), .op(alu_op));
  alu #(.W(32)) u_alu (.a(id_ex_q.rd1), .b(srcb), .op(alu_op), .y(aluout), .zero(zero_e));
  mux2 #(.W(5)) u_regdst_mux (.d0(id_ex_q.rt), .d1(id_ex_q.rd), .s(id_ex_q.ex.reg_dst), .y(wreg_e));
  branch_target u_target (.pc4(id_ex_q.pc4), .imm(id_ex_q.imm), .jump(id_ex_q.m.jump),
                          .jindex(id_ex_q.jindex), .target(target_e));

  assign ex_mem_d.wb      = id_ex_q.wb;
  assign ex_mem_d.m       = id_ex_q.m;
  assign ex_mem_d.target  = target_e;
  assign ex_mem_d.zero    = zero_e;
  assign ex_mem_d.alu_out = aluout;
  assign ex_mem_d.wdata   = id_ex_q.rd2;
  assign ex_mem_d.wreg    = wreg_e;
  ex_mem_reg u_ex_mem (.clk, .reset, .d(ex_mem_d), .q(ex_mem_q));

  // ---------------- MEM ----------------
  assign dataadr   = ex_mem_q.alu_out;
  assign writedata = ex_mem_q.wdata;
  assign memwrite  = ex_mem_q.m.mem_write;

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(dataadr), .wdata(writedata), .we(memwrite), .re(ex_mem_q.m.mem_read),
    .rdata(readdata),
    .h_we(host_dmem_we), .h_addr(host_dmem_addr), .h_wdata(host_dmem_wdata),
    .h_rdata(host_dmem_rdata));
  pc_src u_pc_src (.branch(ex_mem_q.m.branch), .bne(ex_mem_q.m.bne), .jump(ex_mem_q.m.jump),
                   .zero(ex_mem_q.zero), .pcsrc(pcsrc));

  assign mem_wb_d.wb      = ex_mem_q.wb;
  assign mem_wb_d.rdata   = readdata;
  assign mem_wb_d.alu_out = ex_mem_q.alu_out;
  assign mem_wb_d.wreg    = ex_mem_q.wreg;
  mem_wb_reg u_mem_wb (.clk, .reset, .d(mem_wb_d), .q(mem_wb_q));

  // ---------------- WB ----------------
  mux2 #(.W(32)) u_memtoreg_mux (.d0(mem_wb_q.alu_out), .d1(mem_wb_q.rdata),
                                 .s(mem_wb_q.wb.mem_to_reg), .y(wb_data));
endmodule
