// datapath: the single-cycle RV32I datapath.
//
// In one clock cycle the instruction at PC is fetched from the instruction
// memory (asynchronous read), its register operands are read, the immediate is
// built, the ALU computes, the data memory is read or written, and on the
// rising edge the result is written to rd and the PC is updated. Register
// addresses come straight from the instruction: AddrD = inst[11:7],
// AddrA = inst[19:15], AddrB = inst[24:20]. The B operand mux (BSel: 0 =
// Reg[rs2], 1 = imm) and the write-back mux (WBSel: 1 = alu, 0 = mem) follow
// the single-cycle datapath drawings. This design adds an A operand mux
// (ASel: 0 = Reg[rs1], 1 = PC), a third write-back input pc+4 for JAL/JALR,
// the branch comparator, and a next-PC mux that takes the ALU result as the
// target (bit 0 cleared, as JALR requires). Loads pass through load_extend,
// stores through store_align.
//
// Interface: ctrl comes from the control logic, which sees inst and the
// comparator flags; imem_* and dmem_* connect the external memories. rf_*
// mirror the register write for observation.
module datapath
  import riscv_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  output logic [31:0] inst,
  output logic        br_eq,
  output logic        br_lt,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output logic [31:0] dmem_addr,
  output logic [3:0]  dmem_we,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata
);
  logic [31:0] pc, pc_plus4, target;
  logic [31:0] rs1_data, rs2_data, imm;
  logic [31:0] alu_a, alu_b, alu_y;
  logic [31:0] load_data, wb;

  pc_unit #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst,
    .pc_sel  (ctrl.pc_sel),
    .target  (target),
    .pc      (pc),
    .pc_plus4(pc_plus4)
  );

  assign imem_addr = pc;
  assign inst      = imem_rdata;

  regfile #(.XLEN(32), .NREGS(32)) u_rf (
    .clk,
    .we    (ctrl.reg_wen),
    .addr_d(inst[11:7]),
    .data_d(wb),
    .addr_a(inst[19:15]),
    .data_a(rs1_data),
    .addr_b(inst[24:20]),
    .data_b(rs2_data)
  );

  imm_gen u_imm (
    .inst,
    .imm_sel(ctrl.imm_sel),
    .imm
  );

  branch_comp u_bc (
    .a    (rs1_data),
    .b    (rs2_data),
    .br_un(ctrl.br_un),
    .br_eq,
    .br_lt
  );

  assign alu_a = ctrl.a_sel ? pc  : rs1_data;
  assign alu_b = ctrl.b_sel ? imm : rs2_data;

  alu u_alu (
    .a      (alu_a),
    .b      (alu_b),
    .alu_sel(ctrl.alu_sel),
    .y      (alu_y)
  );

  assign target    = {alu_y[31:1], 1'b0};
  assign dmem_addr = alu_y;

  store_align u_st (
    .store    (ctrl.mem_rw == MEM_WRITE),
    .funct3   (ctrl.mem_f3),
    .addr_lo  (alu_y[1:0]),
    .wdata    (rs2_data),
    .we       (dmem_we),
    .wdata_out(dmem_wdata)
  );

  load_extend u_ld (
    .rdata  (dmem_rdata),
    .addr_lo(alu_y[1:0]),
    .funct3 (ctrl.mem_f3),
    .data   (load_data)
  );

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb = load_data;
      WB_PC4:  wb = pc_plus4;
      default: wb = alu_y;
    endcase
  end

  assign rf_we    = ctrl.reg_wen && (inst[11:7] != 5'd0);
  assign rf_waddr = inst[11:7];
  assign rf_wdata = wb;
endmodule
