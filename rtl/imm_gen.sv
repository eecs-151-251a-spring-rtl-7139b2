// imm_gen: immediate generator for the five RV32I immediate formats.
//
// Builds imm[31:0] from the instruction for the format selected by ImmSel.
// For I and S the sign bit inst[31] fills imm[31:11], inst[30:25] is always
// imm[10:5], and a 5-bit mux picks imm[4:0] from inst[24:20] (I) or
// inst[11:7] (S). B, U and J use the bit positions of the RV32I format table:
//   B: {inst[31] x20, inst[7], inst[30:25], inst[11:8], 0}
//   U: {inst[31:12], 12'b0}
//   J: {inst[31] x12, inst[19:12], inst[20], inst[30:21], 0}
// Purely combinational.
module imm_gen
  import riscv_pkg::*;
(
  input  logic [31:0] inst,
  input  imm_sel_t    imm_sel,
  output logic [31:0] imm
);
  always_comb begin
    unique case (imm_sel)
      IMM_I:   imm = {{21{inst[31]}}, inst[30:25], inst[24:20]};
      IMM_S:   imm = {{21{inst[31]}}, inst[30:25], inst[11:7]};
      IMM_B:   imm = {{20{inst[31]}}, inst[7], inst[30:25], inst[11:8], 1'b0};
      IMM_U:   imm = {inst[31:12], 12'b0};
      IMM_J:   imm = {{12{inst[31]}}, inst[19:12], inst[20], inst[30:21], 1'b0};
      default: imm = '0;
    endcase
  end
endmodule
