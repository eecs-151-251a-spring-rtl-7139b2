// riscv_pkg: types and constants shared by the single-cycle RV32I machine.
//
// Holds the major opcodes and funct3 codes of the RV32I encoding table, the
// encodings of the datapath control signals (ImmSel, ALUSel, WBSel, ...) and
// the control bundle ctrl_t that the control logic drives into the datapath.
// The signal names (ImmSel, RegWEn, BSel, ALUSel, MemRW, WBSel) are those of
// the single-cycle datapath this machine is built on; ASel, PCSel, BrUn and
// the pc+4 write-back choice are additions of this design for branches and
// jumps. ALUSel keeps Add=0 and Sub=1; the other codes are this design's.
package riscv_pkg;

  localparam int XLEN = 32;

  // Major opcodes (inst[6:0])
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_FENCE  = 7'b0001111;
  localparam logic [6:0] OP_SYSTEM = 7'b1110011;

  // Load / store widths (funct3)
  localparam logic [2:0] F3_B  = 3'b000;
  localparam logic [2:0] F3_H  = 3'b001;
  localparam logic [2:0] F3_W  = 3'b010;
  localparam logic [2:0] F3_BU = 3'b100;
  localparam logic [2:0] F3_HU = 3'b101;

  // Branch conditions (funct3)
  localparam logic [2:0] F3_BEQ  = 3'b000;
  localparam logic [2:0] F3_BNE  = 3'b001;
  localparam logic [2:0] F3_BLT  = 3'b100;
  localparam logic [2:0] F3_BGE  = 3'b101;
  localparam logic [2:0] F3_BLTU = 3'b110;
  localparam logic [2:0] F3_BGEU = 3'b111;

  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_U = 3'd3,
    IMM_J = 3'd4
  } imm_sel_t;

  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_SLL  = 4'd2,
    ALU_SLT  = 4'd3,
    ALU_SLTU = 4'd4,
    ALU_XOR  = 4'd5,
    ALU_SRL  = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_OR   = 4'd8,
    ALU_AND  = 4'd9,
    ALU_PASSB = 4'd10
  } alu_sel_t;

  // Write-back mux: 0 = mem, 1 = alu as in the single-cycle datapath; 2 = pc+4
  typedef enum logic [1:0] {
    WB_MEM = 2'd0,
    WB_ALU = 2'd1,
    WB_PC4 = 2'd2
  } wb_sel_t;

  typedef enum logic {
    MEM_READ  = 1'b0,
    MEM_WRITE = 1'b1
  } mem_rw_t;

  typedef struct packed {
    logic     pc_sel;    // 0: pc+4, 1: ALU result (branch/jump target)
    imm_sel_t imm_sel;
    logic     reg_wen;   // RegWEn
    logic     br_un;     // unsigned branch compare
    logic     a_sel;     // 0: Reg[rs1], 1: PC
    logic     b_sel;     // 0: Reg[rs2], 1: imm
    alu_sel_t alu_sel;
    mem_rw_t  mem_rw;    // MemRW
    logic [2:0] mem_f3;  // load/store width and signedness (funct3)
    wb_sel_t  wb_sel;
  } ctrl_t;

endpackage
