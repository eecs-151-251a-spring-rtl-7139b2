// tb_dmem: self-checking test of the data memory.
//
// Random byte-enabled writes against a model array; each cycle the word at a
// random address is read combinationally and compared, including a read of
// the word being written (old value before the edge, new one after).
module tb_dmem;
  localparam int WORDS = 256;
  logic clk = 0;
  logic [31:0] addr, wdata, rdata;
  logic [3:0]  we;
  logic [31:0] model[WORDS];
  int checks = 0, failures = 0;

  dmem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int w;
    we = 0; addr = 0; wdata = 0;
    for (int k = 0; k < WORDS; k++) model[k] = '0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      w = $urandom_range(0, WORDS - 1);
      addr = 32'(4 * w) + 32'($urandom_range(0, 3));
      we = 4'($urandom); wdata = $urandom;
      #1;
      chk(rdata == model[w], $sformatf("read before edge %h: %h exp %h", addr, rdata, model[w]));
      @(posedge clk);
      for (int l = 0; l < 4; l++) if (we[l]) model[w][8*l +: 8] = wdata[8*l +: 8];
      #1;
      chk(rdata == model[w], $sformatf("read after edge %h: %h exp %h", addr, rdata, model[w]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
