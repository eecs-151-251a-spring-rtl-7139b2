// tb_store_align: self-checking test of store byte enables and lane data.
//
// For SB, SH and SW at every aligned offset, with the store strobe on and
// off, checks the byte enables and that every enabled lane carries the right
// byte of the source register. Expected values are worked out in the
// testbench from the offset and width.
module tb_store_align;
  logic        store;
  logic [2:0]  funct3;
  logic [1:0]  addr_lo;
  logic [31:0] wdata, wdata_out;
  logic [3:0]  we;
  int checks = 0, failures = 0;

  store_align dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] ewe;
    int size;
    logic ok;
    for (int n = 0; n < 300; n++) begin
      for (int f = 0; f < 3; f++) begin
        for (int o = 0; o < 4; o++) begin
          size = 1 << f;
          if (o % size != 0) continue;
          wdata = $urandom; funct3 = 3'(f); addr_lo = o[1:0]; store = (n % 5 != 0);
          #1;
          ewe = '0;
          for (int l = o; l < o + size; l++) ewe[l] = 1'b1;
          if (!store) ewe = '0;
          ok = (we === ewe);
          for (int l = 0; l < 4; l++)
            if (ewe[l] && wdata_out[8*l +: 8] !== wdata[8*(l - o) +: 8]) ok = 0;
          checks++;
          if (!ok) begin
            failures++;
            if (failures < 10) $display("FAIL f3=%0d off=%0d st=%0b we=%b exp=%b out=%h in=%h", f, o, store, we, ewe, wdata_out, wdata);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
