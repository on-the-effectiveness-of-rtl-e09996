// tb_sparc_decode: self-checking test of the SPARC subset decoder.
//
// Directed cases cover every instruction class the decoder accepts (the
// arithmetic and logic operations with and without condition codes, the
// shifts, sethi, ld, st, conditional branches, ba and bn), the cases that
// turn into no-ops (results to %g0) and encodings that are not decoded.
// A random part then builds format-3 words from random fields and checks
// each decoded field against the SPARC encoding tables written out here.
// Purely combinational: each case is applied and checked after #1.
module tb_sparc_decode;
  import dts_pkg::*;

  logic [31:0]     ir;
  logic [XLEN-1:0] pc;
  dinstr_t         d;
  logic            jump, illegal;
  logic [XLEN-1:0] target;

  sparc_decode dut (.ir, .pc, .d, .jump, .target, .illegal);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: ir=%h got %h expected %h", what, ir, got, exp);
    end
  endtask

  function automatic logic [31:0] f3(input logic [1:0] op, input int rd, input logic [5:0] op3,
                                     input int rs1, input logic i, input int low);
    return {op, 5'(rd), op3, 5'(rs1), i, 13'(low)};
  endfunction

  // expected ALU function of a format-2 op3 (bit 4 = set condition codes)
  function automatic int exp_fn(input logic [5:0] op3);
    case (op3)
      6'o00, 6'o20: return FN_ADD;
      6'o01, 6'o21: return FN_AND;
      6'o02, 6'o22: return FN_OR;
      6'o03, 6'o23: return FN_XOR;
      6'o04, 6'o24: return FN_SUB;
      6'o45:        return FN_SLL;
      6'o46:        return FN_SRL;
      6'o47:        return FN_SRA;
      default:      return -1;
    endcase
  endfunction

  task automatic apply(input logic [31:0] w, input logic [31:0] p);
    ir = w; pc = p; #1;
  endtask

  task automatic chk_rid(input string what, input rid_t got, input rkind_e k, input int idx);
    chk({what, ".kind"}, 32'(got.kind), 32'(k));
    chk({what, ".idx"}, 32'(got.idx), 32'(idx));
  endtask

  initial begin
    logic [5:0] alu_ops [11] = '{6'o00, 6'o01, 6'o02, 6'o03, 6'o04, 6'o20, 6'o21, 6'o22, 6'o23, 6'o24, 6'o45};
    // ---- add r3, r1, r2
    apply(f3(2'b10, 3, 6'o00, 1, 1'b0, 2), 0);
    chk("add.op", 32'(d.op), OP_ALU); chk("add.fn", 32'(d.fn), FN_ADD);
    chk_rid("add.srca", d.srca, RK_INT, 1); chk_rid("add.srcb", d.srcb, RK_INT, 2);
    chk_rid("add.dst", d.dst, RK_INT, 3);
    chk("add.flags", {27'd0, d.va, d.vb, d.vd, d.vf, d.use_imm}, 32'b11100);
    chk("add.ill", 32'(illegal), 0); chk("add.jump", 32'(jump), 0);
    // ---- subcc r0, r1, 5 (cmp)
    apply(f3(2'b10, 0, 6'o24, 1, 1'b1, 5), 0);
    chk("cmp.op", 32'(d.op), OP_ALU); chk("cmp.fn", 32'(d.fn), FN_SUB);
    chk("cmp.flags", {26'd0, d.va, d.vb, d.vd, d.vf, d.use_imm, d.setcc}, 32'b100111);
    chk("cmp.imm", d.imm, 5); chk_rid("cmp.dstf", d.dstf, RK_ICC, 0);
    // ---- sub r4, r4, -1: sign extension of simm13
    apply(f3(2'b10, 4, 6'o04, 4, 1'b1, 'h1fff), 0);
    chk("sub.imm", d.imm, 32'hffff_ffff);
    // ---- sethi 0x12345, r5
    apply({2'b00, 5'd5, 3'b100, 22'h12345}, 0);
    chk("sethi.op", 32'(d.op), OP_ALU); chk("sethi.fn", 32'(d.fn), FN_PASS);
    chk("sethi.imm", d.imm, 32'h12345 << 10); chk_rid("sethi.dst", d.dst, RK_INT, 5);
    chk("sethi.vd", 32'(d.vd), 1); chk("sethi.va", 32'(d.va), 0);
    // ---- sethi 0, r0 (nop)
    apply({2'b00, 5'd0, 3'b100, 22'h0}, 0);
    chk("nop.op", 32'(d.op), OP_NOP); chk("nop.ill", 32'(illegal), 0);
    // ---- ld [r1 + 8], r6
    apply(f3(2'b11, 6, 6'o00, 1, 1'b1, 8), 0);
    chk("ld.op", 32'(d.op), OP_LD); chk_rid("ld.srca", d.srca, RK_INT, 1);
    chk("ld.imm", d.imm, 8); chk_rid("ld.dst", d.dst, RK_INT, 6);
    chk("ld.flags", {27'd0, d.va, d.vb, d.vd, d.vf, d.use_imm}, 32'b10101);
    // ---- ld to r0 is a nop
    apply(f3(2'b11, 0, 6'o00, 1, 1'b1, 8), 0);
    chk("ld0.op", 32'(d.op), OP_NOP);
    // ---- st r7, [r1 + r2]
    apply(f3(2'b11, 7, 6'o04, 1, 1'b0, 2), 0);
    chk("st.op", 32'(d.op), OP_ST); chk_rid("st.srcc", d.srcc, RK_INT, 7);
    chk("st.flags", {26'd0, d.va, d.vb, d.vc, d.vd, d.vf, d.use_imm}, 32'b111000);
    // ---- be +3 at 0x40
    apply({2'b00, 1'b0, 4'd1, 3'b010, 22'd3}, 32'h40);
    chk("be.op", 32'(d.op), OP_BR); chk("be.cond", 32'(d.cond), 1);
    chk_rid("be.srca", d.srca, RK_ICC, 0); chk("be.va", 32'(d.va), 1);
    chk("be.target", target, 32'h4c); chk("be.jump", 32'(jump), 0);
    // ---- bne -2 at 0x40
    apply({2'b00, 1'b0, 4'd9, 3'b010, 22'h3ffffe}, 32'h40);
    chk("bne.op", 32'(d.op), OP_BR); chk("bne.cond", 32'(d.cond), 9);
    chk("bne.target", target, 32'h38);
    // ---- ba +16 at 0x100
    apply({2'b00, 1'b0, 4'd8, 3'b010, 22'd16}, 32'h100);
    chk("ba.op", 32'(d.op), OP_NOP); chk("ba.jump", 32'(jump), 1);
    chk("ba.target", target, 32'h140);
    // ---- bn
    apply({2'b00, 1'b0, 4'd0, 3'b010, 22'd16}, 32'h100);
    chk("bn.op", 32'(d.op), OP_NOP); chk("bn.jump", 32'(jump), 0);
    // ---- add r0, r1, r2 is a nop
    apply(f3(2'b10, 0, 6'o00, 1, 1'b0, 2), 0);
    chk("add0.op", 32'(d.op), OP_NOP); chk("add0.vd", 32'(d.vd), 0);
    // ---- not decoded
    apply({2'b01, 30'h1234}, 0);                               chk("call.ill", 32'(illegal), 1);
    apply(f3(2'b10, 1, 6'o70, 2, 1'b1, 0), 0);                 chk("jmpl.ill", 32'(illegal), 1);
    apply({2'b00, 5'd0, 3'b000, 22'd0}, 0);                    chk("unimp.ill", 32'(illegal), 1);
    apply(f3(2'b11, 1, 6'o01, 2, 1'b1, 0), 0);                 chk("ldub.ill", 32'(illegal), 1);
    chk("ldub.op", 32'(d.op), OP_NOP);
    // ---- random format-3 arithmetic
    for (int n = 0; n < 400; n++) begin
      logic [5:0] op3;
      int rd, rs1, low;
      logic i;
      op3 = (n % 5 == 4) ? 6'($urandom_range(0, 63)) : alu_ops[$urandom_range(0, 10)];
      if (n % 7 == 0) op3 = 6'o46 + 6'($urandom_range(0, 1));
      rd  = $urandom_range(0, 31); rs1 = $urandom_range(0, 31);
      i   = 1'($urandom); low = $urandom_range(0, 8191);
      apply(f3(2'b10, rd, op3, rs1, i, low), 0);
      if (exp_fn(op3) < 0) begin
        chk("rnd.ill", 32'(illegal), 1);
        chk("rnd.illop", 32'(d.op), OP_NOP);
      end else begin
        logic setcc, live;
        setcc = op3[4] && op3[5] == 1'b0;
        live  = rd != 0 || setcc;
        chk("rnd.ill", 32'(illegal), 0);
        chk("rnd.op", 32'(d.op), live ? OP_ALU : OP_NOP);
        if (live) begin
          chk("rnd.fn", 32'(d.fn), 32'(exp_fn(op3)));
          chk("rnd.vd", 32'(d.vd), 32'(rd != 0));
          chk("rnd.vf", 32'(d.vf), 32'(setcc));
          chk("rnd.ui", 32'(d.use_imm), 32'(i));
          chk("rnd.vb", 32'(d.vb), 32'(!i));
          chk_rid("rnd.srca", d.srca, RK_INT, rs1);
          chk_rid("rnd.dst", d.dst, RK_INT, rd);
          if (i) chk("rnd.imm", d.imm, {{19{low[12]}}, 13'(low)});
          else   chk_rid("rnd.srcb", d.srcb, RK_INT, low % 32);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
