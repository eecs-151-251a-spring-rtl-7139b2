// tb_branch_comp: self-checking test of the branch comparator.
//
// Random and corner-case operand pairs (including equal pairs and pairs that
// differ only in the sign bit), signed and unsigned; the expected flags are
// computed in the testbench.
module tb_branch_comp;
  logic [31:0] a, b;
  logic br_un, br_eq, br_lt;
  int checks = 0, failures = 0;

  branch_comp dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_lt;
    for (int n = 0; n < 2000; n++) begin
      a = $urandom; b = $urandom;
      if (n % 4 == 0) b = a;
      if (n % 4 == 1) b = a ^ 32'h8000_0000;
      br_un = n[3];
      #1;
      if (br_un) exp_lt = (a < b);
      else       exp_lt = (a[31] ^ b[31]) ? a[31] : (a[30:0] < b[30:0]);
      checks++;
      if (br_eq !== (a == b) || br_lt !== exp_lt) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h un=%0b eq=%0b lt=%0b", a, b, br_un, br_eq, br_lt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
