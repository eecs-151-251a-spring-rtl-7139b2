// imem: instruction memory.
//
// WORDS 32-bit words, addressed by the byte address addr (bits 1:0 ignored,
// higher bits wrap). The read is asynchronous: rdata follows addr within the
// cycle, so the instruction at PC is available in the same cycle. The
// processor never writes it; a separate load port (prog_we, prog_addr,
// prog_wdata), written on the rising clock edge, lets a host place a program
// in it, normally while the processor is held in reset. The load port and the
// default size are this design's choices. Contents start at zero.
module imem #(
  parameter int WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_wdata
);
  localparam int AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr[AW+1:2]] <= prog_wdata;
  end

  assign rdata = mem[addr[AW+1:2]];
endmodule
