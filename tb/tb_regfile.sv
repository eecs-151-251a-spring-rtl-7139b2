// tb_regfile: self-checking test of the register file.
//
// Random writes and reads against a model array: reads are combinational,
// a write lands at the rising edge (a same-cycle read still sees the old
// value), writes with we low change nothing, and x0 always reads zero.
module tb_regfile;
  logic clk = 0, we;
  logic [4:0] addr_d, addr_a, addr_b;
  logic [31:0] data_d, data_a, data_b;
  logic [31:0] model[32];
  int checks = 0, failures = 0;

  regfile dut (.*);

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
    we = 0; addr_d = 0; data_d = 0; addr_a = 0; addr_b = 0;
    // fill every register first so that no read sees an unwritten one
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1; addr_d = 5'(r); data_d = $urandom;
      model[r] = (r == 0) ? 32'h0 : data_d;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); addr_d = 5'($urandom); data_d = $urandom;
      addr_a = ($urandom_range(0, 3) == 0) ? addr_d : 5'($urandom);
      addr_b = ($urandom_range(0, 7) == 0) ? 5'd0 : 5'($urandom);
      #1;
      chk(data_a == model[addr_a], $sformatf("read A x%0d = %h exp %h", addr_a, data_a, model[addr_a]));
      chk(data_b == model[addr_b], $sformatf("read B x%0d = %h exp %h", addr_b, data_b, model[addr_b]));
      @(posedge clk);
      if (we && addr_d != 0) model[addr_d] = data_d;
      #1;
      chk(data_a == model[addr_a], $sformatf("after edge A x%0d = %h exp %h", addr_a, data_a, model[addr_a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
