// riscv_top: single-cycle RV32I machine with its instruction and data memory.
//
// The processor (riscv_cpu) fetches from a separate instruction memory (imem)
// and loads/stores to a separate data memory (dmem); both read
// asynchronously and write on the rising clock edge, so every instruction
// completes in exactly one clock cycle. A host loads the program through the
// prog_* port while rst is held, then releases rst; execution starts at
// RESET_PC. The remaining outputs show, for each cycle, the PC and
// instruction executing, the register write it makes, the data memory write
// it makes, and whether the instruction was not recognised (such an
// instruction writes nothing and the PC moves on by 4).
//
// Memory sizes and the reset PC are this design's defaults; the separate
// memories, the asynchronous-read/synchronous-write state elements and the
// one-instruction-per-cycle timing follow the single-cycle design.
module riscv_top #(
  parameter int          IMEM_WORDS = 1024,
  parameter int          DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_wdata,
  output logic [31:0] pc,
  output logic [31:0] inst,
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata,
  output logic [3:0]  dmem_we,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic        illegal
);
  logic [31:0] dmem_rdata;

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk,
    .addr      (pc),
    .rdata     (inst),
    .prog_we,
    .prog_addr,
    .prog_wdata
  );

  riscv_cpu #(.RESET_PC(RESET_PC)) u_cpu (
    .clk, .rst,
    .imem_addr (pc),
    .imem_rdata(inst),
    .dmem_addr,
    .dmem_we,
    .dmem_wdata,
    .dmem_rdata,
    .rf_we,
    .rf_waddr,
    .rf_wdata,
    .illegal
  );

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .addr (dmem_addr),
    .we   (dmem_we),
    .wdata(dmem_wdata),
    .rdata(dmem_rdata)
  );
endmodule
