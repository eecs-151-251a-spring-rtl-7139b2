// alu: the 32-bit arithmetic and logic unit of the single-cycle machine.
//
// Computes y from operands a and b for the operation chosen by ALUSel: the ten
// RV32I register-register operations (ADD, SUB, SLL, SLT, SLTU, XOR, SRL, SRA,
// OR, AND), which the control logic also uses for their immediate forms, for
// load/store addresses and for branch and jump targets; and PASSB (y = b),
// which this design adds for LUI. Shifts use b[4:0] as the amount. SLT/SLTU
// give 1 or 0. ALUSel codes Add=0 and Sub=1 follow the datapath drawings; the
// other codes are this design's. Purely combinational.
module alu
  import riscv_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_sel_t    alu_sel,
  output logic [31:0] y
);
  logic [4:0] shamt;
  assign shamt = b[4:0];

  always_comb begin
    unique case (alu_sel)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << shamt;
      ALU_SLT:   y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'b0, a < b};
      ALU_XOR:   y = a ^ b;
      ALU_SRL:   y = a >> shamt;
      ALU_SRA:   y = 32'($signed(a) >>> shamt);
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
