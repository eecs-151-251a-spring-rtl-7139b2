// tb_imem: self-checking test of the instruction memory.
//
// Loads random words through the load port at random addresses (kept in a
// model), then reads them back combinationally at random byte addresses,
// checking that the low two address bits are ignored and that the read
// needs no clock edge.
module tb_imem;
  localparam int WORDS = 256;
  logic clk = 0, prog_we;
  logic [31:0] addr, rdata, prog_addr, prog_wdata;
  logic [31:0] model[WORDS];
  int checks = 0, failures = 0;

  imem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    prog_we = 0; prog_addr = 0; prog_wdata = 0; addr = 0;
    for (int k = 0; k < WORDS; k++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 32'(4 * k); prog_wdata = $urandom; model[k] = prog_wdata;
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      w = $urandom_range(0, WORDS - 1);
      prog_we = 1; prog_addr = 32'(4 * w); prog_wdata = $urandom; model[w] = prog_wdata;
    end
    @(negedge clk); prog_we = 0;
    for (int n = 0; n < 2000; n++) begin
      w = $urandom_range(0, WORDS - 1);
      addr = 32'(4 * w) + 32'($urandom_range(0, 3));
      #1;
      checks++;
      if (rdata !== model[w]) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h rdata=%h exp=%h", addr, rdata, model[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
