// tb_riscv_top: end-to-end test of the single-cycle RV32I machine at its
// default sizes.
//
// The program is loaded through the instruction-memory load port while reset
// is held. It starts with a directed part built from textbook examples (add,
// sub, addi x15,x1,-50, sw x14,8(x2), lw x14,8(x2)) whose register results
// are checked against values worked out by hand, and whose encodings are
// checked against their known bit patterns. A long random program follows
// that exercises every implemented instruction class. Every cycle the
// machine's PC, register write and data-memory write are compared with the
// reference model in rv_tb_pkg, which also proves the one-instruction-per-
// cycle timing: the model takes one step per clock. Each instruction class,
// taken and untaken branches, writes to x0 (dropped) and unrecognised
// instructions are counted, and a class that never occurred counts as a
// failure.
module tb_riscv_top;
  import rv_tb_pkg::*;

  localparam int NRAND = 800;   // random groups; program must fit the 1024-word IMEM

  logic        clk = 1'b0;
  logic        rst;
  logic        prog_we;
  logic [31:0] prog_addr, prog_wdata;
  logic [31:0] pc, inst;
  logic        rf_we;
  logic [4:0]  rf_waddr;
  logic [31:0] rf_wdata;
  logic [3:0]  dmem_we;
  logic [31:0] dmem_addr, dmem_wdata;
  logic        illegal;

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int count[string];

  riscv_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycles, what);
    end
  endtask

  logic [31:0] prog[$];
  logic [31:0] rnd[$];
  // hand-worked register results of the directed part, in program order
  logic [4:0]  exp_rd[$];
  logic [31:0] exp_val[$];

  localparam logic [31:0] BASE_A = 32'h0000_0200;

  initial begin : main
    rv_iss iss;
    trace_t t;
    int n, dir_len;
    string need[$];
    logic [31:0] w_addi, w_lw, w_sw;

    // ---- encodings of the textbook examples
    w_addi = enc_i(12'hfce, 5'd1, 3'b000, 5'd15, 7'b0010011);     // addi x15,x1,-50
    w_lw   = enc_i(12'd8, 5'd2, 3'b010, 5'd14, 7'b0000011);        // lw x14,8(x2)
    w_sw   = enc_s(12'd8, 5'd14, 5'd2, 3'b010);                    // sw x14,8(x2)
    check(w_addi == 32'b111111001110_00001_000_01111_0010011, "addi x15,x1,-50 encoding");
    check(w_lw   == 32'b000000001000_00010_010_01110_0000011, "lw x14,8(x2) encoding");
    check(w_sw   == 32'b0000000_01110_00010_010_01000_0100011, "sw x14,8(x2) encoding");

    // ---- directed part
    prog.delete();
    prog.push_back(enc_i(12'h200, 5'd0, 3'd0, 5'd2, 7'b0010011));  exp_rd.push_back(2);  exp_val.push_back(32'h200);
    prog.push_back(enc_i(12'd100, 5'd0, 3'd0, 5'd3, 7'b0010011));  exp_rd.push_back(3);  exp_val.push_back(32'd100);
    prog.push_back(enc_i(12'hff9, 5'd0, 3'd0, 5'd7, 7'b0010011));  exp_rd.push_back(7);  exp_val.push_back(32'hffff_fff9);
    prog.push_back(enc_i(12'd1000, 5'd0, 3'd0, 5'd9, 7'b0010011)); exp_rd.push_back(9);  exp_val.push_back(32'd1000);
    prog.push_back(enc_r(7'h00, 5'd3, 5'd2, 3'd0, 5'd1, 7'b0110011)); exp_rd.push_back(1);  exp_val.push_back(32'h264); // add x1,x2,x3
    prog.push_back(enc_r(7'h00, 5'd9, 5'd7, 3'd0, 5'd6, 7'b0110011)); exp_rd.push_back(6);  exp_val.push_back(32'd993); // add x6,x7,x9
    prog.push_back(enc_r(7'h20, 5'd3, 5'd9, 3'd0, 5'd5, 7'b0110011)); exp_rd.push_back(5);  exp_val.push_back(32'd900); // sub x5,x9,x3
    prog.push_back(w_addi);                                          exp_rd.push_back(15); exp_val.push_back(32'd562);
    prog.push_back(enc_i(12'h5a5, 5'd0, 3'd0, 5'd14, 7'b0010011)); exp_rd.push_back(14); exp_val.push_back(32'h5a5);
    prog.push_back(w_sw);                                            exp_rd.push_back(0);  exp_val.push_back(32'h0);
    prog.push_back(enc_i(12'h000, 5'd0, 3'd0, 5'd14, 7'b0010011)); exp_rd.push_back(14); exp_val.push_back(32'h0);
    prog.push_back(w_lw);                                            exp_rd.push_back(14); exp_val.push_back(32'h5a5);
    dir_len = prog.size();

    // ---- random part
    void'(gen_program(rnd, NRAND, 32'h0000_0400));
    foreach (rnd[k]) prog.push_back(rnd[k]);
    if (prog.size() > 1024) begin
      $display("program too long: %0d words", prog.size());
      failures++;
    end
    $display("program: %0d words (%0d directed)", prog.size(), dir_len);

    // ---- load with reset held
    rst = 1'b1; prog_we = 1'b0; prog_addr = '0; prog_wdata = '0;
    iss = new(32'h0);
    foreach (prog[k]) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 32'(k * 4); prog_wdata = prog[k];
      iss.imem[k] = prog[k];
    end
    @(negedge clk);
    prog_we = 1'b0;
    @(negedge clk);
    rst = 1'b0;

    // ---- run in lockstep with the reference model
    n = 0;
    forever begin
      #1;                    // outputs of this cycle's instruction have settled
      cycles++;
      t = iss.step();
      check(pc == t.pc, $sformatf("pc %h, expected %h", pc, t.pc));
      check(inst == t.inst, $sformatf("inst %h, expected %h", inst, t.inst));
      check(rf_we == t.rf_we, $sformatf("rf_we %0b, expected %0b (%s at %h)", rf_we, t.rf_we, t.kind, t.pc));
      if (t.rf_we) begin
        check(rf_waddr == t.rf_waddr, $sformatf("rd x%0d, expected x%0d", rf_waddr, t.rf_waddr));
        check(rf_wdata == t.rf_wdata, $sformatf("wb %h, expected %h (%s at %h)", rf_wdata, t.rf_wdata, t.kind, t.pc));
      end
      check(dmem_we == t.mem_we, $sformatf("dmem_we %b, expected %b (%s)", dmem_we, t.mem_we, t.kind));
      if (t.mem_we != 0) begin
        check({dmem_addr[31:2], 2'b00} == t.mem_addr, $sformatf("store address %h, expected %h", dmem_addr, t.mem_addr));
        for (int l = 0; l < 4; l++)
          if (t.mem_we[l]) check(dmem_wdata[8*l +: 8] == t.mem_wdata[8*l +: 8], $sformatf("store lane %0d", l));
      end
      check(illegal == (t.kind == "illegal"), $sformatf("illegal flag %0b for %s", illegal, t.kind));
      // hand-worked values of the directed part
      if (n < dir_len) begin
        if (exp_rd[n] != 0) begin
          check(rf_we && rf_waddr == exp_rd[n] && rf_wdata == exp_val[n],
                $sformatf("directed step %0d: x%0d = %h, expected x%0d = %h", n, rf_waddr, rf_wdata, exp_rd[n], exp_val[n]));
        end else begin
          check(dmem_we == 4'b1111 && dmem_addr == BASE_A + 8 && dmem_wdata == 32'h5a5, "directed sw x14,8(x2)");
        end
      end
      if (count.exists(t.kind)) count[t.kind]++; else count[t.kind] = 1;
      n++;
      if (t.inst == enc_j(21'h0, 5'd0)) break;   // final self-loop reached
      @(negedge clk);
    end

    // one more cycle: the self-loop keeps the PC
    @(negedge clk);
    #1;
    check(pc == t.pc, "self-loop holds the PC");

    // ---- coverage of the mechanisms
    need = '{"add", "sub", "sll", "slt", "sltu", "xor", "srl", "sra", "or", "and",
             "addi", "slti", "sltiu", "xori", "ori", "andi", "slli", "srli", "srai",
             "lb", "lh", "lw", "lbu", "lhu", "sb", "sh", "sw",
             "branch_taken", "branch_not_taken", "jal", "jalr", "lui", "auipc",
             "fence", "illegal", "add_x0"};
    foreach (need[k]) begin
      checks++;
      if (!count.exists(need[k])) begin
        failures++;
        $display("never executed: %s", need[k]);
      end
    end
    foreach (count[s]) $display("  %-18s %0d", s, count[s]);
    $display("%0d instructions in %0d cycles", n, cycles);
    check(n == cycles, "one instruction per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
