// tb_alu: self-checking test of the ALU.
//
// Drives random and corner-case operands through every ALUSel code and
// compares y with a reference computed in the testbench from the RV32I
// definitions of each operation.
module tb_alu;
  import riscv_pkg::*;

  logic [31:0] a, b, y;
  alu_sel_t    sel;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alu_sel(sel), .y);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_op(alu_sel_t s, logic [31:0] x, logic [31:0] z);
    logic [63:0] ext;
    case (s)
      ALU_ADD:   return x + z;
      ALU_SUB:   return x + ~z + 1;
      ALU_SLL:   return x << z[4:0];
      ALU_SLT:   return ((x[31] != z[31]) ? x[31] : (x < z)) ? 32'd1 : 32'd0;
      ALU_SLTU:  return (x < z) ? 32'd1 : 32'd0;
      ALU_XOR:   return x ^ z;
      ALU_SRL:   return x >> z[4:0];
      ALU_SRA:   begin ext = {{32{x[31]}}, x} >> z[4:0]; return ext[31:0]; end
      ALU_OR:    return x | z;
      ALU_AND:   return x & z;
      ALU_PASSB: return z;
      default:   return 32'h0;
    endcase
  endfunction

  initial begin
    logic [31:0] corner[6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h0000_001f};
    for (int s = 0; s <= 10; s++) begin
      for (int n = 0; n < 300; n++) begin
        sel = alu_sel_t'(s);
        if (n < 36) begin a = corner[n / 6]; b = corner[n % 6]; end
        else begin a = $urandom; b = $urandom; end
        #1;
        checks++;
        if (y !== ref_op(sel, a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d a=%h b=%h y=%h exp=%h", s, a, b, y, ref_op(sel, a, b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
