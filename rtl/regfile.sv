// regfile: the RV32I integer register file, x0..x31.
//
// NREGS registers of XLEN bits with two combinational (asynchronous) read
// ports, DataA at AddrA (rs1) and DataB at AddrB (rs2), and one write port,
// DataD at AddrD (rd), written on the rising clock edge when we (RegWEn) is
// high. Register x0 always reads as zero and writes to it are dropped.
// A read of a register being written in the same cycle returns the old
// value; the new one is visible after the edge. These rules are those of the
// RV32I state the machine implements. Registers other than x0 are not reset.
module regfile #(
  parameter int XLEN  = 32,
  parameter int NREGS = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] addr_d,
  input  logic [XLEN-1:0]          data_d,
  input  logic [$clog2(NREGS)-1:0] addr_a,
  output logic [XLEN-1:0]          data_a,
  input  logic [$clog2(NREGS)-1:0] addr_b,
  output logic [XLEN-1:0]          data_b
);
  // Entry 0 is never written and never read.
  logic [XLEN-1:0] regs [1:NREGS-1];

  always_ff @(posedge clk) begin
    if (we && addr_d != '0) regs[addr_d] <= data_d;
  end

  assign data_a = (addr_a == '0) ? '0 : regs[addr_a];
  assign data_b = (addr_b == '0) ? '0 : regs[addr_b];
endmodule
