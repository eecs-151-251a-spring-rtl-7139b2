// dmem: data memory.
//
// WORDS 32-bit words addressed by the byte address addr (bits 1:0 select a
// byte lane, higher bits wrap). The read is asynchronous: rdata is the whole
// word at addr within the same cycle, for a load to finish in one cycle. The
// write is synchronous: on the rising clock edge each byte lane whose bit in
// we is set takes the matching byte of wdata. Per-lane write enables (for SB
// and SH) and the default size are this design's choices. Contents start at
// zero.
module dmem #(
  parameter int WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [3:0]  we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  localparam int AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;

  assign widx = addr[AW+1:2];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < 4; l++) begin
      if (we[l]) mem[widx][8*l +: 8] <= wdata[8*l +: 8];
    end
  end

  assign rdata = mem[widx];
endmodule
