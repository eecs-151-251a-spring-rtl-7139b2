// control: decoder from the instruction to the datapath control signals.
//
// Combinational. From opcode inst[6:0], funct3 inst[14:12] and funct7
// (inst[30] distinguishes SUB from ADD and SRA/SRAI from SRL/SRLI) it drives
// the control bundle: ImmSel, RegWEn, BSel, ALUSel, MemRW and WBSel as in the
// single-cycle datapath, plus ASel, PCSel, BrUn, the load/store width and the
// pc+4 write-back choice, which this design adds for branches and jumps.
// The branch comparator flags br_eq/br_lt come back in so that PCSel can be
// set for a taken branch in the same cycle.
//
//   R-type   : RegWEn, A=rs1, B=rs2, ALUSel from funct3/funct7, WB=alu
//   I-ALU    : ImmSel=I, RegWEn, B=imm, ALUSel from funct3 (inst[30] for SRAI)
//   loads    : ImmSel=I, RegWEn, B=imm, ALU=add, MemRW=Read, WB=mem
//   stores   : ImmSel=S, B=imm, ALU=add, MemRW=Write
//   branches : ImmSel=B, A=PC, B=imm, ALU=add, PCSel=taken
//   JAL/JALR : ImmSel=J/I, A=PC/rs1, ALU=add, PCSel=1, WB=pc+4
//   LUI/AUIPC: ImmSel=U, B=imm, ALU=passB/add (A=PC for AUIPC), WB=alu
// FENCE/FENCE.I are no-ops. ECALL, EBREAK, the CSR instructions and any other
// encoding raise illegal and write nothing (the PC still advances by 4).
module control
  import riscv_pkg::*;
(
  input  logic [31:0] inst,
  input  logic        br_eq,
  input  logic        br_lt,
  output ctrl_t       ctrl,
  output logic        illegal
);
  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [6:0] funct7;
  logic       taken;

  assign opcode = inst[6:0];
  assign funct3 = inst[14:12];
  assign funct7 = inst[31:25];

  // ALU operation for OP / OP-IMM from funct3 and inst[30]
  function automatic alu_sel_t alu_op(input logic [2:0] f3, input logic alt, input logic is_reg);
    unique case (f3)
      3'b000:  return (is_reg && alt) ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return alt ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    unique case (funct3)
      F3_BEQ:  taken = br_eq;
      F3_BNE:  taken = !br_eq;
      F3_BLT,
      F3_BLTU: taken = br_lt;
      F3_BGE,
      F3_BGEU: taken = !br_lt;
      default: taken = 1'b0;
    endcase
  end

  always_comb begin
    ctrl = '{pc_sel:   1'b0,
             imm_sel:  IMM_I,
             reg_wen:  1'b0,
             br_un:    funct3[1],
             a_sel:    1'b0,
             b_sel:    1'b0,
             alu_sel:  ALU_ADD,
             mem_rw:   MEM_READ,
             mem_f3:   funct3,
             wb_sel:   WB_ALU};
    illegal = 1'b0;

    unique case (opcode)
      OP_REG: begin
        if (funct7 == 7'b0000000 || (funct7 == 7'b0100000 && (funct3 == 3'b000 || funct3 == 3'b101))) begin
          ctrl.reg_wen = 1'b1;
          ctrl.alu_sel = alu_op(funct3, inst[30], 1'b1);
        end else begin
          illegal = 1'b1;
        end
      end
      OP_IMM: begin
        if (funct3 == 3'b001 && funct7 != 7'b0000000) illegal = 1'b1;
        else if (funct3 == 3'b101 && funct7 != 7'b0000000 && funct7 != 7'b0100000) illegal = 1'b1;
        else begin
          ctrl.imm_sel = IMM_I;
          ctrl.reg_wen = 1'b1;
          ctrl.b_sel   = 1'b1;
          ctrl.alu_sel = alu_op(funct3, inst[30], 1'b0);
        end
      end
      OP_LOAD: begin
        if (funct3 == 3'b011 || funct3[2:1] == 2'b11) illegal = 1'b1;
        else begin
          ctrl.imm_sel  = IMM_I;
          ctrl.reg_wen  = 1'b1;
          ctrl.b_sel    = 1'b1;
          ctrl.alu_sel  = ALU_ADD;
          ctrl.mem_rw   = MEM_READ;
          ctrl.wb_sel   = WB_MEM;
        end
      end
      OP_STORE: begin
        if (funct3[2] || funct3 == 3'b011) illegal = 1'b1;
        else begin
          ctrl.imm_sel = IMM_S;
          ctrl.b_sel   = 1'b1;
          ctrl.alu_sel = ALU_ADD;
          ctrl.mem_rw  = MEM_WRITE;
        end
      end
      OP_BRANCH: begin
        if (funct3 == 3'b010 || funct3 == 3'b011) illegal = 1'b1;
        else begin
          ctrl.imm_sel = IMM_B;
          ctrl.a_sel   = 1'b1;
          ctrl.b_sel   = 1'b1;
          ctrl.alu_sel = ALU_ADD;
          ctrl.pc_sel  = taken;
        end
      end
      OP_JAL: begin
        ctrl.imm_sel = IMM_J;
        ctrl.reg_wen = 1'b1;
        ctrl.a_sel   = 1'b1;
        ctrl.b_sel   = 1'b1;
        ctrl.alu_sel = ALU_ADD;
        ctrl.pc_sel  = 1'b1;
        ctrl.wb_sel  = WB_PC4;
      end
      OP_JALR: begin
        if (funct3 != 3'b000) illegal = 1'b1;
        else begin
          ctrl.imm_sel = IMM_I;
          ctrl.reg_wen = 1'b1;
          ctrl.b_sel   = 1'b1;
          ctrl.alu_sel = ALU_ADD;
          ctrl.pc_sel  = 1'b1;
          ctrl.wb_sel  = WB_PC4;
        end
      end
      OP_LUI: begin
        ctrl.imm_sel = IMM_U;
        ctrl.reg_wen = 1'b1;
        ctrl.b_sel   = 1'b1;
        ctrl.alu_sel = ALU_PASSB;
      end
      OP_AUIPC: begin
        ctrl.imm_sel = IMM_U;
        ctrl.reg_wen = 1'b1;
        ctrl.a_sel   = 1'b1;
        ctrl.b_sel   = 1'b1;
        ctrl.alu_sel = ALU_ADD;
      end
      OP_FENCE: begin
        if (funct3[2:1] != 2'b00) illegal = 1'b1;
      end
      default: illegal = 1'b1;  // SYSTEM (ECALL/EBREAK/CSR) and unknown opcodes
    endcase
  end
endmodule
