// store_align: byte enables and lane alignment for SB, SH and SW.
//
// When store is high (MemRW = Write) this turns the store's funct3 and the
// low two address bits into four DMEM byte write enables, and copies the
// source register's low byte (SB) or halfword (SH) onto every lane so that
// the enabled lanes receive it; SW enables all four lanes. With store low no
// lane is enabled. Little-endian lane order; misaligned halfword/word stores
// are not split across words. Byte enables are this design's way of
// providing SB and SH. Purely combinational.
module store_align
  import riscv_pkg::*;
(
  input  logic        store,
  input  logic [2:0]  funct3,
  input  logic [1:0]  addr_lo,
  input  logic [31:0] wdata,
  output logic [3:0]  we,
  output logic [31:0] wdata_out
);
  always_comb begin
    we        = 4'b0000;
    wdata_out = wdata;
    unique case (funct3[1:0])
      2'b00: begin
        wdata_out = {4{wdata[7:0]}};
        we        = 4'b0001 << addr_lo;
      end
      2'b01: begin
        wdata_out = {2{wdata[15:0]}};
        we        = addr_lo[1] ? 4'b1100 : 4'b0011;
      end
      default: begin
        wdata_out = wdata;
        we        = 4'b1111;
      end
    endcase
    if (!store) we = 4'b0000;
  end
endmodule
