// tb_load_extend: self-checking test of load byte/halfword extraction.
//
// Random words, every byte offset and every load funct3; the expected value
// is computed in the testbench by shifting the word right by the offset and
// sign- or zero-extending the low byte/halfword.
module tb_load_extend;
  logic [31:0] rdata, data;
  logic [1:0]  addr_lo;
  logic [2:0]  funct3;
  int checks = 0, failures = 0;

  load_extend dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] sh, e;
    logic [2:0] f3s[5] = '{3'b000, 3'b001, 3'b010, 3'b100, 3'b101};
    for (int n = 0; n < 500; n++) begin
      rdata = $urandom;
      foreach (f3s[k]) begin
        for (int o = 0; o < 4; o++) begin
          funct3 = f3s[k];
          addr_lo = o[1:0];
          if (funct3[1:0] == 2'b01 && o[0]) continue;   // misaligned halfword
          if (funct3 == 3'b010 && o != 0) continue;     // misaligned word
          #1;
          sh = rdata >> (8 * o);
          case (funct3)
            3'b000: e = {{24{sh[7]}}, sh[7:0]};
            3'b100: e = {24'h0, sh[7:0]};
            3'b001: e = {{16{sh[15]}}, sh[15:0]};
            3'b101: e = {16'h0, sh[15:0]};
            default: e = rdata;
          endcase
          checks++;
          if (data !== e) begin
            failures++;
            if (failures < 10) $display("FAIL w=%h off=%0d f3=%b data=%h exp=%h", rdata, o, funct3, data, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
