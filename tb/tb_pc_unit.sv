// tb_pc_unit: self-checking test of the program counter.
//
// Checks that reset loads RESET_PC, that the PC advances by 4 on each rising
// edge with pc_sel low (and only on the edge), that a target is taken with
// pc_sel high, and that pc_plus4 always equals pc + 4.
module tb_pc_unit;
  logic clk = 0, rst, pc_sel;
  logic [31:0] target, pc, pc_plus4;
  int checks = 0, failures = 0;

  pc_unit #(.RESET_PC(32'h0000_1000)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: pc=%h", what, pc); end
  endtask

  initial begin
    logic [31:0] model;
    rst = 1; pc_sel = 0; target = '0;
    @(negedge clk); @(negedge clk);
    chk(pc == 32'h1000, "reset value");
    rst = 0;
    model = 32'h1000;
    for (int n = 0; n < 1000; n++) begin
      pc_sel = ($urandom_range(0, 3) == 0);
      target = {$urandom} & ~32'h3;
      #1;
      chk(pc == model && pc_plus4 == model + 4, "combinational outputs");
      @(posedge clk); #1;
      model = pc_sel ? target : model + 4;
      chk(pc == model, "update on the edge");
      @(negedge clk);
      chk(pc == model, "stable between edges");
    end
    rst = 1;
    @(negedge clk);
    chk(pc == 32'h1000, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
