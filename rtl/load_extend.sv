// load_extend: byte/halfword extraction and extension for loads.
//
// DMEM returns the whole 32-bit word that holds the addressed byte. For LB,
// LBU, LH and LHU this circuit picks the addressed byte (addr_lo) or halfword
// (addr_lo[1]) out of that word, little-endian, and sign-extends (LB, LH) or
// zero-extends (LBU, LHU) it to 32 bits for the register file; LW passes the
// word. The width and signedness come from the load's funct3 as encoded in
// RV32I. Misaligned halfword/word loads are not split across words. Purely
// combinational.
module load_extend
  import riscv_pkg::*;
(
  input  logic [31:0] rdata,
  input  logic [1:0]  addr_lo,
  input  logic [2:0]  funct3,
  output logic [31:0] data
);
  logic [7:0]  byte_v;
  logic [15:0] half_v;

  always_comb begin
    byte_v = rdata[8*addr_lo +: 8];
    half_v = addr_lo[1] ? rdata[31:16] : rdata[15:0];
    unique case (funct3)
      F3_B:    data = {{24{byte_v[7]}}, byte_v};
      F3_BU:   data = {24'b0, byte_v};
      F3_H:    data = {{16{half_v[15]}}, half_v};
      F3_HU:   data = {16'b0, half_v};
      default: data = rdata;
    endcase
  end
endmodule
