// riscv_cpu: single-cycle RV32I processor (datapath plus control logic).
//
// The control logic decodes the instruction the datapath has fetched and
// steers the datapath's muxes, ALU, register write and memory write in the
// same cycle; one instruction completes on every rising clock edge. The
// instruction and data memories are outside: the processor drives the PC
// and the data address/write data and receives the instruction and the data
// word combinationally, as both memories read asynchronously. This split
// into datapath, controller and external memories follows the usual
// single-cycle organisation.
//
// Interface: imem_* and dmem_* to the memories (dmem_we are byte enables);
// rf_* and illegal report what the current instruction does. rst is
// synchronous and active high.
module riscv_cpu
  import riscv_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output logic [31:0] dmem_addr,
  output logic [3:0]  dmem_we,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata,
  output logic        illegal
);
  ctrl_t       ctrl;
  logic [31:0] inst;
  logic        br_eq, br_lt;

  control u_ctrl (
    .inst,
    .br_eq,
    .br_lt,
    .ctrl,
    .illegal
  );

  datapath #(.RESET_PC(RESET_PC)) u_dp (
    .clk, .rst,
    .ctrl,
    .inst,
    .br_eq, .br_lt,
    .imem_addr, .imem_rdata,
    .dmem_addr, .dmem_we, .dmem_wdata, .dmem_rdata,
    .rf_we, .rf_waddr, .rf_wdata
  );
endmodule
