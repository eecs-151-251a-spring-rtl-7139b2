// tb_riscv_cpu: processor-level test of datapath plus control.
//
// The instruction and data memories are modelled in the testbench
// (asynchronous read, byte-enabled write at the rising edge). A random RV32I
// program, different from the one of the top-level test, runs in lockstep
// with the reference model of rv_tb_pkg; every cycle the PC, register write
// and data write are compared, and each instruction must take exactly one
// clock cycle. The run ends at the program's final self-loop.
module tb_riscv_cpu;
  import rv_tb_pkg::*;

  logic        clk = 0, rst;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata, rf_wdata;
  logic [3:0]  dmem_we;
  logic        rf_we, illegal;
  logic [4:0]  rf_waddr;
  int checks = 0, failures = 0;

  riscv_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog[$];
  logic [31:0] dm[1024];

  assign imem_rdata = (imem_addr[31:2] < 32'(prog.size())) ? prog[imem_addr[31:2]] : 32'h0;
  assign dmem_rdata = dm[dmem_addr[11:2]];

  always_ff @(posedge clk)
    for (int l = 0; l < 4; l++) if (dmem_we[l]) dm[dmem_addr[11:2]][8*l +: 8] <= dmem_wdata[8*l +: 8];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    rv_iss iss;
    trace_t t;
    int n;
    process::self().srandom(7);
    void'(gen_program(prog, 400, 32'h0000_0600));
    foreach (dm[k]) dm[k] = '0;
    iss = new(32'h0);
    foreach (prog[k]) iss.imem[k] = prog[k];
    rst = 1;
    @(negedge clk); @(negedge clk);
    rst = 0;
    n = 0;
    forever begin
      #1;
      t = iss.step();
      chk(imem_addr == t.pc, $sformatf("pc %h exp %h", imem_addr, t.pc));
      chk(rf_we == t.rf_we, $sformatf("rf_we at %h (%s)", t.pc, t.kind));
      if (t.rf_we) chk(rf_waddr == t.rf_waddr && rf_wdata == t.rf_wdata,
                       $sformatf("%s at %h: x%0d=%h exp %h", t.kind, t.pc, rf_waddr, rf_wdata, t.rf_wdata));
      chk(dmem_we == t.mem_we, $sformatf("dmem_we at %h", t.pc));
      for (int l = 0; l < 4; l++)
        if (t.mem_we[l]) chk(dmem_wdata[8*l +: 8] == t.mem_wdata[8*l +: 8], $sformatf("store lane %0d at %h", l, t.pc));
      chk(illegal == (t.kind == "illegal"), $sformatf("illegal at %h", t.pc));
      n++;
      if (t.inst == enc_j(21'h0, 5'd0)) break;
      @(negedge clk);
    end
    $display("%0d instructions executed", n);
    chk(n > 300, "program ran to its end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
