// branch_comp: branch comparator for BEQ/BNE/BLT/BGE/BLTU/BGEU.
//
// Compares the two register operands and reports equality and less-than,
// signed or, when br_un is high, unsigned. The control logic combines the
// two flags with the branch's funct3 to decide whether the branch is taken,
// leaving the ALU free to compute the target PC+imm in the same cycle. This
// split is this design's choice. Purely combinational.
module branch_comp (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        br_un,
  output logic        br_eq,
  output logic        br_lt
);
  assign br_eq = (a == b);
  assign br_lt = br_un ? (a < b) : ($signed(a) < $signed(b));
endmodule
