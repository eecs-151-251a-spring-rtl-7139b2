// pc_unit: program counter with its +4 adder and next-PC mux.
//
// The PC register holds the address of the instruction executing in the
// current cycle. Each rising clock edge loads either PC+4 (sequential flow)
// or a target computed elsewhere in the datapath (taken branch, JAL, JALR).
// The register, the +4 adder and the mux in front of the PC are those of the
// single-cycle datapath; the select encoding (0 = PC+4) and the synchronous
// reset to RESET_PC are this design's choices.
//
// Interface: pc_sel chooses the next PC, target is the computed address.
// Timing: pc and pc_plus4 are valid for the whole cycle; the update is on the
// rising edge, rst is synchronous and active high.
module pc_unit #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pc_sel,
  input  logic [31:0] target,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4
);
  logic [31:0] pc_next;

  assign pc_plus4 = pc + 32'd4;
  assign pc_next  = pc_sel ? target : pc_plus4;

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end
endmodule
