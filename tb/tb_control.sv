// tb_control: self-checking test of the control logic.
//
// For random instances of every RV32I instruction the decoder's outputs are
// compared with an expected-value table written in the testbench. The rows
// for add, sub, addi, lw and sw carry the values of the single-cycle
// datapath drawings (for example lw: ImmSel=I, RegWEn=1, BSel=1, ALUSel=add,
// MemRW=Read, WBSel=mem). Branches are checked taken and not taken for each
// comparator outcome, and SYSTEM/unknown encodings must raise illegal and
// write nothing.
module tb_control;
  import riscv_pkg::*;
  import rv_tb_pkg::*;

  logic [31:0] inst;
  logic        br_eq, br_lt;
  ctrl_t       ctrl;
  logic        illegal;
  int checks = 0, failures = 0;

  control dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected values; b_sel/a_sel/imm_sel/alu_sel are compared only where relevant
  task automatic expect_ctrl(input string name, input logic ill, input logic wen, input logic pcs,
                             input logic asel, input logic bsel, input imm_sel_t isel,
                             input alu_sel_t asl, input mem_rw_t rw, input wb_sel_t wb,
                             input logic chk_wb);
    logic ok;
    #1;
    ok = (illegal == ill) && (ctrl.reg_wen == wen) && (ctrl.pc_sel == pcs) && (ctrl.mem_rw == rw);
    if (!ill) begin
      ok &= (ctrl.a_sel == asel) && (ctrl.b_sel == bsel) && (ctrl.alu_sel == asl);
      if (bsel) ok &= (ctrl.imm_sel == isel);
      if (chk_wb) ok &= (ctrl.wb_sel == wb);
      if (rw == MEM_WRITE || (chk_wb && wb == WB_MEM)) ok &= (ctrl.mem_f3 == inst[14:12]);
    end
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s inst=%h ctrl=%p illegal=%0b", name, inst, ctrl, illegal);
    end
  endtask

  initial begin
    logic [31:0] r;
    alu_sel_t rops[8] = '{ALU_ADD, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_OR, ALU_AND};
    logic [2:0] lf3[5] = '{3'd0, 3'd1, 3'd2, 3'd4, 3'd5};
    logic tk;
    for (int n = 0; n < 300; n++) begin
      r = $urandom;
      br_eq = r[0]; br_lt = r[1];
      // R-type
      for (int f = 0; f < 8; f++) begin
        inst = enc_r(7'h00, r[24:20], r[19:15], 3'(f), r[11:7], 7'b0110011);
        expect_ctrl("R", 0, 1, 0, 0, 0, IMM_I, rops[f], MEM_READ, WB_ALU, 1);
      end
      inst = enc_r(7'h20, r[24:20], r[19:15], 3'd0, r[11:7], 7'b0110011);
      expect_ctrl("sub", 0, 1, 0, 0, 0, IMM_I, ALU_SUB, MEM_READ, WB_ALU, 1);
      inst = enc_r(7'h20, r[24:20], r[19:15], 3'd5, r[11:7], 7'b0110011);
      expect_ctrl("sra", 0, 1, 0, 0, 0, IMM_I, ALU_SRA, MEM_READ, WB_ALU, 1);
      inst = enc_r(7'h01, r[24:20], r[19:15], 3'd0, r[11:7], 7'b0110011);
      expect_ctrl("mul (not RV32I)", 1, 0, 0, 0, 0, IMM_I, ALU_ADD, MEM_READ, WB_ALU, 0);
      // I-type ALU
      for (int f = 0; f < 8; f++) begin
        logic [11:0] imm;
        imm = r[31:20];
        if (f == 1 || f == 5) imm[11:5] = 7'h00;
        inst = enc_i(imm, r[19:15], 3'(f), r[11:7], 7'b0010011);
        expect_ctrl("I", 0, 1, 0, 0, 1, IMM_I, rops[f], MEM_READ, WB_ALU, 1);
      end
      inst = enc_i({7'h20, r[24:20]}, r[19:15], 3'd5, r[11:7], 7'b0010011);
      expect_ctrl("srai", 0, 1, 0, 0, 1, IMM_I, ALU_SRA, MEM_READ, WB_ALU, 1);
      // loads
      foreach (lf3[k]) begin
        inst = enc_i(r[31:20], r[19:15], lf3[k], r[11:7], 7'b0000011);
        expect_ctrl("load", 0, 1, 0, 0, 1, IMM_I, ALU_ADD, MEM_READ, WB_MEM, 1);
      end
      // stores
      for (int f = 0; f < 3; f++) begin
        inst = enc_s(r[31:20], r[24:20], r[19:15], 3'(f));
        expect_ctrl("store", 0, 0, 0, 0, 1, IMM_S, ALU_ADD, MEM_WRITE, WB_ALU, 0);
      end
      // branches
      for (int f = 0; f < 8; f++) begin
        if (f == 2 || f == 3) continue;
        inst = enc_b({r[12:1], 1'b0}, r[24:20], r[19:15], 3'(f));
        case (f)
          0: tk = br_eq;
          1: tk = !br_eq;
          4, 6: tk = br_lt;
          default: tk = !br_lt;
        endcase
        expect_ctrl("branch", 0, 0, tk, 1, 1, IMM_B, ALU_ADD, MEM_READ, WB_ALU, 0);
        checks++;
        if (ctrl.br_un != (f >= 6)) begin failures++; $display("FAIL BrUn f3=%0d", f); end
      end
      inst = enc_j({r[20:1], 1'b0}, r[11:7]);
      expect_ctrl("jal", 0, 1, 1, 1, 1, IMM_J, ALU_ADD, MEM_READ, WB_PC4, 1);
      inst = enc_i(r[31:20], r[19:15], 3'd0, r[11:7], 7'b1100111);
      expect_ctrl("jalr", 0, 1, 1, 0, 1, IMM_I, ALU_ADD, MEM_READ, WB_PC4, 1);
      inst = enc_u(r[31:12], r[11:7], 7'b0110111);
      expect_ctrl("lui", 0, 1, 0, 0, 1, IMM_U, ALU_PASSB, MEM_READ, WB_ALU, 1);
      inst = enc_u(r[31:12], r[11:7], 7'b0010111);
      expect_ctrl("auipc", 0, 1, 0, 1, 1, IMM_U, ALU_ADD, MEM_READ, WB_ALU, 1);
      inst = 32'h0ff0_000f;
      expect_ctrl("fence", 0, 0, 0, 0, 0, IMM_I, ALU_ADD, MEM_READ, WB_ALU, 0);
      inst = 32'h0000_0073;
      expect_ctrl("ecall", 1, 0, 0, 0, 0, IMM_I, ALU_ADD, MEM_READ, WB_ALU, 0);
      inst = {r[31:7], 7'b1110011};
      expect_ctrl("system", 1, 0, 0, 0, 0, IMM_I, ALU_ADD, MEM_READ, WB_ALU, 0);
      inst = 32'h0000_0000;
      expect_ctrl("zero word", 1, 0, 0, 0, 0, IMM_I, ALU_ADD, MEM_READ, WB_ALU, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
