// tb_imm_gen: self-checking test of the immediate generator.
//
// For each format a random immediate is chosen, placed into an otherwise
// random instruction by the encoders of rv_tb_pkg (the opposite direction
// from the generator), and the generator must give it back sign-extended.
// The I-type example addi x15,x1,-50 and the S-type example sw x14,8(x2) are
// checked with their known bit patterns.
module tb_imm_gen;
  import riscv_pkg::*;
  import rv_tb_pkg::*;

  logic [31:0] inst, imm;
  imm_sel_t    sel;
  int checks = 0, failures = 0;

  imm_gen dut (.inst, .imm_sel(sel), .imm);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_imm(input logic [31:0] e, input string what);
    #1;
    checks++;
    if (imm !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s: inst=%h imm=%h exp=%h", what, inst, imm, e);
    end
  endtask

  initial begin
    logic [31:0] r, v;
    // textbook examples
    inst = 32'b111111001110_00001_000_01111_0010011; sel = IMM_I; expect_imm(32'hffff_ffce, "addi -50");
    inst = 32'b0000000_01110_00010_010_01000_0100011; sel = IMM_S; expect_imm(32'd8, "sw 8");
    for (int n = 0; n < 2000; n++) begin
      r = $urandom; v = $urandom;
      sel = IMM_I; inst = enc_i(v[11:0], r[19:15], r[14:12], r[11:7], r[6:0]);
      expect_imm({{20{v[11]}}, v[11:0]}, "I");
      sel = IMM_S; inst = enc_s(v[11:0], r[24:20], r[19:15], r[14:12]);
      expect_imm({{20{v[11]}}, v[11:0]}, "S");
      sel = IMM_B; inst = enc_b({v[12:1], 1'b0}, r[24:20], r[19:15], r[14:12]);
      expect_imm({{19{v[12]}}, v[12:1], 1'b0}, "B");
      sel = IMM_U; inst = enc_u(v[31:12], r[11:7], r[6:0]);
      expect_imm({v[31:12], 12'h000}, "U");
      sel = IMM_J; inst = enc_j({v[20:1], 1'b0}, r[11:7]);
      expect_imm({{11{v[20]}}, v[20:1], 1'b0}, "J");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
