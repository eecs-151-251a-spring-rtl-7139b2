// rv_tb_pkg: testbench support for the RV32I machine.
//
// Instruction encoders (one function per format, written from the RV32I
// encoding table), a random program generator that produces programs which
// always run forward and end in a self-loop, and rv_iss, an instruction-set
// reference model. The model executes one instruction per call to step() and
// reports the register write and memory write that instruction makes, so a
// testbench can compare the hardware cycle by cycle. It knows nothing of the
// RTL: it decodes with its own case statements.
package rv_tb_pkg;

  // ---------------------------------------------------------------- encoders
  function automatic logic [31:0] enc_r(input logic [6:0] f7, input logic [4:0] rs2, input logic [4:0] rs1,
                                        input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction

  function automatic logic [31:0] enc_i(input logic [11:0] imm, input logic [4:0] rs1, input logic [2:0] f3,
                                        input logic [4:0] rd, input logic [6:0] op);
    return {imm, rs1, f3, rd, op};
  endfunction

  function automatic logic [31:0] enc_s(input logic [11:0] imm, input logic [4:0] rs2, input logic [4:0] rs1,
                                        input logic [2:0] f3);
    return {imm[11:5], rs2, rs1, f3, imm[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] enc_b(input logic [12:0] imm, input logic [4:0] rs2, input logic [4:0] rs1,
                                        input logic [2:0] f3);
    return {imm[12], imm[10:5], rs2, rs1, f3, imm[4:1], imm[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] enc_u(input logic [19:0] imm, input logic [4:0] rd, input logic [6:0] op);
    return {imm, rd, op};
  endfunction

  function automatic logic [31:0] enc_j(input logic [20:0] imm, input logic [4:0] rd);
    return {imm[20], imm[10:1], imm[11], imm[19:12], rd, 7'b1101111};
  endfunction

  // ------------------------------------------------------- reference model
  typedef struct {
    logic [31:0] pc;
    logic [31:0] inst;
    logic        rf_we;
    logic [4:0]  rf_waddr;
    logic [31:0] rf_wdata;
    logic [3:0]  mem_we;     // bytes written
    logic [31:0] mem_addr;   // word-aligned address of the write
    logic [31:0] mem_wdata;  // word after the write, enabled lanes only meaningful
    string       kind;       // instruction class, for coverage counts
  } trace_t;

  class rv_iss;
    logic [31:0] x[32];
    logic [31:0] pc;
    logic [31:0] dmem[int unsigned];   // word address -> word
    logic [31:0] imem[int unsigned];

    function new(logic [31:0] reset_pc);
      foreach (x[i]) x[i] = '0;
      pc = reset_pc;
    endfunction

    function logic [31:0] rd_word(logic [31:0] a);
      int unsigned k = int'(a >> 2);
      return dmem.exists(k) ? dmem[k] : 32'h0;
    endfunction

    function trace_t step();
      trace_t t;
      logic [31:0] i, a, b, imm_i, imm_s, imm_b, imm_u, imm_j, r, w, ea;
      logic [6:0] op;
      logic [2:0] f3;
      logic [4:0] rd;
      logic wr;
      logic [31:0] npc;
      int unsigned k;
      i = imem.exists(int'(pc >> 2)) ? imem[int'(pc >> 2)] : 32'h0;
      t.pc = pc; t.inst = i; t.mem_we = '0; t.mem_addr = '0; t.mem_wdata = '0; t.kind = "illegal";
      op = i[6:0]; f3 = i[14:12]; rd = i[11:7];
      a = x[i[19:15]]; b = x[i[24:20]];
      imm_i = 32'($signed(i[31:20]));
      imm_s = 32'($signed({i[31:25], i[11:7]}));
      imm_b = 32'($signed({i[31], i[7], i[30:25], i[11:8], 1'b0}));
      imm_u = {i[31:12], 12'h0};
      imm_j = 32'($signed({i[31], i[19:12], i[20], i[30:21], 1'b0}));
      npc = pc + 4; wr = 0; r = '0;
      case (op)
        7'b0110011: begin
          wr = 1;
          case ({i[31:25], f3})
            {7'h00, 3'd0}: begin r = a + b;  t.kind = "add";  end
            {7'h20, 3'd0}: begin r = a - b;  t.kind = "sub";  end
            {7'h00, 3'd1}: begin r = a << b[4:0]; t.kind = "sll"; end
            {7'h00, 3'd2}: begin r = ($signed(a) < $signed(b)) ? 1 : 0; t.kind = "slt"; end
            {7'h00, 3'd3}: begin r = (a < b) ? 1 : 0; t.kind = "sltu"; end
            {7'h00, 3'd4}: begin r = a ^ b;  t.kind = "xor";  end
            {7'h00, 3'd5}: begin r = a >> b[4:0]; t.kind = "srl"; end
            {7'h20, 3'd5}: begin r = 32'($signed(a) >>> b[4:0]); t.kind = "sra"; end
            {7'h00, 3'd6}: begin r = a | b;  t.kind = "or";   end
            {7'h00, 3'd7}: begin r = a & b;  t.kind = "and";  end
            default: wr = 0;
          endcase
        end
        7'b0010011: begin
          wr = 1;
          case (f3)
            3'd0: begin r = a + imm_i; t.kind = "addi"; end
            3'd2: begin r = ($signed(a) < $signed(imm_i)) ? 1 : 0; t.kind = "slti"; end
            3'd3: begin r = (a < imm_i) ? 1 : 0; t.kind = "sltiu"; end
            3'd4: begin r = a ^ imm_i; t.kind = "xori"; end
            3'd6: begin r = a | imm_i; t.kind = "ori"; end
            3'd7: begin r = a & imm_i; t.kind = "andi"; end
            3'd1: if (i[31:25] == 0) begin r = a << i[24:20]; t.kind = "slli"; end else wr = 0;
            3'd5: if (i[31:25] == 0) begin r = a >> i[24:20]; t.kind = "srli"; end
                  else if (i[31:25] == 7'h20) begin r = 32'($signed(a) >>> i[24:20]); t.kind = "srai"; end
                  else wr = 0;
            default: wr = 0;
          endcase
        end
        7'b0000011: begin
          ea = a + imm_i; w = rd_word(ea); wr = 1;
          case (f3)
            3'd0: begin r = 32'($signed(w[8*ea[1:0] +: 8])); t.kind = "lb"; end
            3'd1: begin r = 32'($signed(w[16*ea[1] +: 16])); t.kind = "lh"; end
            3'd2: begin r = w; t.kind = "lw"; end
            3'd4: begin r = {24'h0, w[8*ea[1:0] +: 8]}; t.kind = "lbu"; end
            3'd5: begin r = {16'h0, w[16*ea[1] +: 16]}; t.kind = "lhu"; end
            default: wr = 0;
          endcase
        end
        7'b0100011: begin
          ea = a + imm_s; w = rd_word(ea); k = int'(ea >> 2);
          case (f3)
            3'd0: begin w[8*ea[1:0] +: 8] = b[7:0]; t.mem_we = 4'b0001 << ea[1:0]; t.kind = "sb"; end
            3'd1: begin w[16*ea[1] +: 16] = b[15:0]; t.mem_we = ea[1] ? 4'b1100 : 4'b0011; t.kind = "sh"; end
            3'd2: begin w = b; t.mem_we = 4'b1111; t.kind = "sw"; end
            default: ;
          endcase
          if (t.mem_we != 0) begin
            dmem[k] = w; t.mem_addr = {ea[31:2], 2'b00}; t.mem_wdata = w;
          end
        end
        7'b1100011: begin
          logic tk;
          tk = 0;
          case (f3)
            3'd0: tk = (a == b);
            3'd1: tk = (a != b);
            3'd4: tk = ($signed(a) < $signed(b));
            3'd5: tk = ($signed(a) >= $signed(b));
            3'd6: tk = (a < b);
            3'd7: tk = (a >= b);
            default: ;
          endcase
          t.kind = tk ? "branch_taken" : "branch_not_taken";
          if (tk) npc = pc + imm_b;
        end
        7'b1101111: begin wr = 1; r = pc + 4; npc = pc + imm_j; t.kind = "jal"; end
        7'b1100111: if (f3 == 0) begin wr = 1; r = pc + 4; npc = (a + imm_i) & ~32'h1; t.kind = "jalr"; end
        7'b0110111: begin wr = 1; r = imm_u; t.kind = "lui"; end
        7'b0010111: begin wr = 1; r = pc + imm_u; t.kind = "auipc"; end
        7'b0001111: t.kind = "fence";
        default: ;
      endcase
      t.rf_we = wr && (rd != 0);
      t.rf_waddr = rd;
      t.rf_wdata = r;
      if (wr && rd == 0) t.kind = {t.kind, "_x0"};
      if (t.rf_we) x[rd] = r;
      pc = npc;
      return t;
    endfunction
  endclass

  // ------------------------------------------------------ program generator
  // Fills prog with a program for a machine starting at pc 0: x31 holds the
  // data-region base (base) and is never overwritten, x1..x29 get random
  // values, then ninst random instruction groups follow (all RV32I classes).
  // Control flow only goes forward: a branch or JAL skips 0..2 whole groups
  // (an AUIPC/JALR pair is one group, so no jump lands between them), and
  // the program ends in "jal x0, 0". Returns the number of words used.
  typedef struct {
    logic [31:0] w[2];
    int          nw;
    int          jump;   // 0: none, 1: branch in w[0], 2: jal in w[0]
    int          skip;   // groups skipped when the jump is taken
  } group_t;

  function automatic int gen_program(ref logic [31:0] prog[$], input int ninst, input logic [31:0] base);
    logic [4:0] rd, rs1, rs2;
    int kind;
    logic [31:0] v;
    group_t g[$];
    group_t c;
    int addr[$];
    int a;
    prog.delete();
    c.w[0] = enc_u(base[31:12] + {19'h0, base[11]}, 5'd31, 7'b0110111); c.w[1] = '0; c.nw = 1; c.jump = 0; c.skip = 0;
    g.push_back(c);
    c.w[0] = enc_i(base[11:0], 5'd31, 3'd0, 5'd31, 7'b0010011); g.push_back(c);
    for (int r = 1; r < 30; r++) begin
      v = $urandom;
      if (r % 5 == 0) v = v & 32'h0000_000f;            // some small values
      if (r % 7 == 0) v = 32'h8000_0000 | v;             // some negatives
      c.w[0] = enc_u(v[31:12] + {19'h0, v[11]}, r[4:0], 7'b0110111); g.push_back(c);
      c.w[0] = enc_i(v[11:0], r[4:0], 3'd0, r[4:0], 7'b0010011); g.push_back(c);
    end
    for (int n = 0; n < ninst; n++) begin
      rd  = 5'($urandom_range(0, 29));
      rs1 = 5'($urandom_range(0, 29));
      rs2 = 5'($urandom_range(0, 29));
      if ($urandom_range(0, 3) == 0) rs2 = rs1;          // equal operands for branches
      kind = $urandom_range(0, 15);
      c.nw = 1; c.jump = 0; c.skip = 0; c.w[1] = '0;
      case (kind)
        0, 1, 2: begin : rtype
          logic [2:0] f3;
          logic [6:0] f7;
          f3 = 3'($urandom);
          f7 = ((f3 == 0 || f3 == 5) && $urandom_range(0, 1) == 1) ? 7'h20 : 7'h00;
          c.w[0] = enc_r(f7, rs2, rs1, f3, rd, 7'b0110011);
        end
        3, 4: begin : itype
          logic [2:0] f3;
          logic [11:0] imm;
          f3 = 3'($urandom);
          imm = 12'($urandom);
          if (f3 == 1) imm = {7'h00, imm[4:0]};
          if (f3 == 5) imm = {($urandom_range(0, 1) == 1) ? 7'h20 : 7'h00, imm[4:0]};
          c.w[0] = enc_i(imm, rs1, f3, rd, 7'b0010011);
        end
        5, 6: begin : load
          logic [2:0] f3;
          logic [11:0] off;
          case ($urandom_range(0, 4))
            0: f3 = 3'd0; 1: f3 = 3'd1; 2: f3 = 3'd2; 3: f3 = 3'd4; default: f3 = 3'd5;
          endcase
          off = 12'($urandom_range(0, 255));
          if (f3[1:0] == 2'd1) off[0] = 1'b0;
          if (f3 == 3'd2) off[1:0] = 2'b00;
          c.w[0] = enc_i(off, 5'd31, f3, rd, 7'b0000011);
        end
        7, 8: begin : store
          logic [2:0] f3;
          logic [11:0] off;
          f3 = 3'($urandom_range(0, 2));
          off = 12'($urandom_range(0, 255));
          if (f3 == 3'd1) off[0] = 1'b0;
          if (f3 == 3'd2) off[1:0] = 2'b00;
          c.w[0] = enc_s(off, rs2, 5'd31, f3);
        end
        9, 10: begin : branch
          logic [2:0] f3;
          case ($urandom_range(0, 5))
            0: f3 = 3'd0; 1: f3 = 3'd1; 2: f3 = 3'd4; 3: f3 = 3'd5; 4: f3 = 3'd6; default: f3 = 3'd7;
          endcase
          c.w[0] = enc_b(13'h0, rs2, rs1, f3); c.jump = 1; c.skip = $urandom_range(0, 2);
        end
        11: begin c.w[0] = enc_j(21'h0, rd); c.jump = 2; c.skip = $urandom_range(0, 2); end
        12: begin : jalr
          // x30 = pc of the auipc; jump to x30 + 8 (next) or + 12 (skip one word)
          c.nw = 2;
          c.w[0] = enc_u(20'h0, 5'd30, 7'b0010111);
          c.w[1] = enc_i(12'd8, 5'd30, 3'd0, rd, 7'b1100111);
        end
        13: c.w[0] = enc_u(20'($urandom), rd, 7'b0110111);
        14: c.w[0] = enc_u(20'($urandom), rd, 7'b0010111);
        default: begin
          case ($urandom_range(0, 3))
            0: c.w[0] = 32'h0000_0073;                          // ecall: not executed
            1: c.w[0] = 32'h0ff0_000f;                          // fence
            default: c.w[0] = enc_r(7'h00, rs2, rs1, 3'd0, 5'd0, 7'b0110011); // add x0
          endcase
        end
      endcase
      g.push_back(c);
    end
    // padding so that forward jumps near the end stay in the program
    c.nw = 1; c.jump = 0; c.skip = 0;
    c.w[0] = enc_i(12'h0, 5'd0, 3'd0, 5'd0, 7'b0010011);
    for (int p = 0; p < 3; p++) g.push_back(c);
    c.w[0] = enc_j(21'h0, 5'd0);
    g.push_back(c);
    // resolve jump offsets
    a = 0;
    foreach (g[k]) begin addr.push_back(a); a += 4 * g[k].nw; end
    foreach (g[k]) begin
      if (g[k].jump != 0) begin
        int off;
        off = addr[k + 1 + g[k].skip] - addr[k];
        if (g[k].jump == 1) g[k].w[0] = enc_b(13'(off), g[k].w[0][24:20], g[k].w[0][19:15], g[k].w[0][14:12]);
        else                g[k].w[0] = enc_j(21'(off), g[k].w[0][11:7]);
      end
      for (int q = 0; q < g[k].nw; q++) prog.push_back(g[k].w[q]);
    end
    return prog.size();
  endfunction

endpackage
