// tb_datapath: self-checking test of the datapath with hand-set controls.
//
// The testbench plays the part of both the control logic and the memories:
// for each instruction of a short program it sets the control bundle by
// hand (ImmSel, RegWEn, ASel, BSel, ALUSel, MemRW, WBSel, PCSel as the
// single-cycle datapath needs them for that instruction) and serves the
// instruction and data words from its own arrays. The register writes, data
// writes and PCs the datapath produces are compared with the reference model
// in rv_tb_pkg running the same program. The program covers every operand and
// write-back path: R-type, immediate, LUI, AUIPC, loads of every width,
// stores of every width, taken and untaken branches, JAL and JALR.
module tb_datapath;
  import riscv_pkg::*;
  import rv_tb_pkg::*;

  logic        clk = 0, rst;
  ctrl_t       ctrl;
  logic [31:0] inst;
  logic        br_eq, br_lt;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata, rf_wdata;
  logic [3:0]  dmem_we;
  logic        rf_we;
  logic [4:0]  rf_waddr;
  int checks = 0, failures = 0;

  datapath dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog[$];
  ctrl_t       pctl[$];
  logic [31:0] dm[256];

  assign imem_rdata = (imem_addr[31:2] < 32'(prog.size())) ? prog[imem_addr[31:2]] : 32'h0;
  assign dmem_rdata = dm[dmem_addr[9:2]];

  always_ff @(posedge clk)
    for (int l = 0; l < 4; l++) if (dmem_we[l]) dm[dmem_addr[9:2]][8*l +: 8] <= dmem_wdata[8*l +: 8];

  function automatic ctrl_t c(logic pcs, imm_sel_t is, logic wen, logic bun, logic as, logic bs,
                              alu_sel_t al, mem_rw_t rw, logic [2:0] f3, wb_sel_t wb);
    ctrl_t x;
    x.pc_sel = pcs; x.imm_sel = is; x.reg_wen = wen; x.br_un = bun; x.a_sel = as; x.b_sel = bs;
    x.alu_sel = al; x.mem_rw = rw; x.mem_f3 = f3; x.wb_sel = wb;
    return x;
  endfunction

  task automatic add(logic [31:0] w, ctrl_t x);
    prog.push_back(w); pctl.push_back(x);
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    rv_iss iss;
    trace_t t;
    ctrl_t addi_c, r_c, ld_c, st_c;
    addi_c = c(0, IMM_I, 1, 0, 0, 1, ALU_ADD, MEM_READ, 3'd0, WB_ALU);
    // x1 = 0x100 (data base), x2 = -50, x3 = 0x7f
    add(enc_i(12'h100, 0, 0, 1, 7'b0010011), addi_c);
    add(enc_i(12'hfce, 0, 0, 2, 7'b0010011), addi_c);
    add(enc_i(12'h07f, 0, 0, 3, 7'b0010011), addi_c);
    // add x4,x2,x3 ; sub x5,x2,x3 ; sra x6,x2,x3 ; sltu x7,x3,x2
    add(enc_r(7'h00, 3, 2, 0, 4, 7'b0110011), c(0, IMM_I, 1, 0, 0, 0, ALU_ADD,  MEM_READ, 3'd0, WB_ALU));
    add(enc_r(7'h20, 3, 2, 0, 5, 7'b0110011), c(0, IMM_I, 1, 0, 0, 0, ALU_SUB,  MEM_READ, 3'd0, WB_ALU));
    add(enc_r(7'h20, 3, 2, 5, 6, 7'b0110011), c(0, IMM_I, 1, 0, 0, 0, ALU_SRA,  MEM_READ, 3'd5, WB_ALU));
    add(enc_r(7'h00, 2, 3, 3, 7, 7'b0110011), c(0, IMM_I, 1, 0, 0, 0, ALU_SLTU, MEM_READ, 3'd3, WB_ALU));
    // lui x8, 0x8badf ; auipc x9, 0x12345
    add(enc_u(20'h8badf, 8, 7'b0110111), c(0, IMM_U, 1, 0, 0, 1, ALU_PASSB, MEM_READ, 3'd0, WB_ALU));
    add(enc_u(20'h12345, 9, 7'b0010111), c(0, IMM_U, 1, 0, 1, 1, ALU_ADD,   MEM_READ, 3'd0, WB_ALU));
    // sw x8,0(x1) ; sh x2,6(x1) ; sb x3,5(x1)
    add(enc_s(12'd0, 8, 1, 3'd2), c(0, IMM_S, 0, 0, 0, 1, ALU_ADD, MEM_WRITE, 3'd2, WB_ALU));
    add(enc_s(12'd6, 2, 1, 3'd1), c(0, IMM_S, 0, 0, 0, 1, ALU_ADD, MEM_WRITE, 3'd1, WB_ALU));
    add(enc_s(12'd5, 3, 1, 3'd0), c(0, IMM_S, 0, 0, 0, 1, ALU_ADD, MEM_WRITE, 3'd0, WB_ALU));
    // lw x10,0(x1) ; lb x11,3(x1) ; lbu x12,3(x1) ; lh x13,6(x1) ; lhu x14,6(x1)
    add(enc_i(12'd0, 1, 3'd2, 10, 7'b0000011), c(0, IMM_I, 1, 0, 0, 1, ALU_ADD, MEM_READ, 3'd2, WB_MEM));
    add(enc_i(12'd3, 1, 3'd0, 11, 7'b0000011), c(0, IMM_I, 1, 0, 0, 1, ALU_ADD, MEM_READ, 3'd0, WB_MEM));
    add(enc_i(12'd3, 1, 3'd4, 12, 7'b0000011), c(0, IMM_I, 1, 0, 0, 1, ALU_ADD, MEM_READ, 3'd4, WB_MEM));
    add(enc_i(12'd6, 1, 3'd1, 13, 7'b0000011), c(0, IMM_I, 1, 0, 0, 1, ALU_ADD, MEM_READ, 3'd1, WB_MEM));
    add(enc_i(12'd6, 1, 3'd5, 14, 7'b0000011), c(0, IMM_I, 1, 0, 0, 1, ALU_ADD, MEM_READ, 3'd5, WB_MEM));
    add(enc_i(12'd4, 1, 3'd4, 15, 7'b0000011), c(0, IMM_I, 1, 0, 0, 1, ALU_ADD, MEM_READ, 3'd4, WB_MEM));
    add(enc_i(12'd5, 1, 3'd4, 16, 7'b0000011), c(0, IMM_I, 1, 0, 0, 1, ALU_ADD, MEM_READ, 3'd4, WB_MEM));
    // blt x2,x3,+8 (taken: -50 < 127), skipped addi, bltu x2,x3,+8 (not taken)
    add(enc_b(13'd8, 3, 2, 3'd4), c(1, IMM_B, 0, 0, 1, 1, ALU_ADD, MEM_READ, 3'd4, WB_ALU));
    add(enc_i(12'h111, 0, 0, 17, 7'b0010011), addi_c);
    add(enc_b(13'd8, 3, 2, 3'd6), c(0, IMM_B, 0, 1, 1, 1, ALU_ADD, MEM_READ, 3'd6, WB_ALU));
    // jal x18,+8 ; (skipped) ; jalr x19, 5(x20) where x20 = address of the last instruction
    add(enc_j(21'd8, 18), c(1, IMM_J, 1, 0, 1, 1, ALU_ADD, MEM_READ, 3'd0, WB_PC4));
    add(enc_i(12'h222, 0, 0, 17, 7'b0010011), addi_c);
    add(enc_u(20'h0, 20, 7'b0010111), c(0, IMM_U, 1, 0, 1, 1, ALU_ADD, MEM_READ, 3'd0, WB_ALU));
    add(enc_i(12'd13, 20, 0, 19, 7'b1100111), c(1, IMM_I, 1, 0, 0, 1, ALU_ADD, MEM_READ, 3'd0, WB_PC4));
    add(enc_i(12'h333, 0, 0, 17, 7'b0010011), addi_c);
    add(enc_i(12'h444, 0, 0, 21, 7'b0010011), addi_c);   // jalr target: auipc pc + 12 (x17 = 0x333 skipped)

    foreach (dm[k]) dm[k] = '0;
    iss = new(32'h0);
    foreach (prog[k]) iss.imem[k] = prog[k];
    rst = 1; ctrl = pctl[0];
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int n = 0; n < 25; n++) begin   // 28 words, 3 skipped
      ctrl = pctl[imem_addr[31:2]];
      #1;
      t = iss.step();
      chk(imem_addr == t.pc, $sformatf("pc %h exp %h", imem_addr, t.pc));
      chk(rf_we == t.rf_we, $sformatf("rf_we at %h", t.pc));
      if (t.rf_we) chk(rf_waddr == t.rf_waddr && rf_wdata == t.rf_wdata,
                       $sformatf("%s at %h: x%0d=%h exp x%0d=%h", t.kind, t.pc, rf_waddr, rf_wdata, t.rf_waddr, t.rf_wdata));
      chk(dmem_we == t.mem_we, $sformatf("dmem_we %b exp %b at %h", dmem_we, t.mem_we, t.pc));
      for (int l = 0; l < 4; l++)
        if (t.mem_we[l]) chk(dmem_wdata[8*l +: 8] == t.mem_wdata[8*l +: 8] && {dmem_addr[31:2], 2'b0} == t.mem_addr,
                             $sformatf("store lane %0d at %h", l, t.pc));
      if (t.kind == "branch_taken" || t.kind == "branch_not_taken")
        chk(ctrl.pc_sel == (t.kind == "branch_taken") &&
            br_lt == (t.kind == "branch_taken"), $sformatf("comparator at %h", t.pc));
      @(negedge clk);
    end
    // hand-worked values the model must also agree on
    chk(iss.x[4] == 32'd77 && iss.x[5] == 32'hffff_ff4f && iss.x[11] == 32'hffff_ff8b && iss.x[12] == 32'h8b,
        "reference model sanity");
    chk(iss.x[17] == 32'h0 && iss.x[21] == 32'h444 && iss.x[19] == 32'd104, "branch and jump targets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
