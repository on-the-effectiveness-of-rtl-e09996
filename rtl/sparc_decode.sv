// sparc_decode: decode stage logic of the Primary Processor.
//
// Turns one 32-bit SPARC V7 instruction word into the decoded instruction
// format (dts_pkg::dinstr_t) that the pipeline, the Scheduler Unit and the
// VLIW Cache all share, so an instruction is decoded once and its decoded
// form is what gets cached. Purely combinational.
//
// The subset decoded is the integer core the example code of the DTSVLIW
// uses: sethi, add/sub/and/or/xor with and without condition codes, the
// three shifts, ld and st of words, and Bicc. Unconditional branches (ba)
// are reported on `jump` and decode to OP_NOP, since a trace already fixes
// their direction; bn, sethi 0,%g0 and every instruction whose result goes
// to %g0 without touching the condition codes decode to OP_NOP as well.
// Anything else raises `illegal` and decodes to OP_NOP. Branch displacements
// are added to the instruction's own address; there are no delay slots and
// no register windows (32 flat integer registers), which is this design's
// simplification of the SPARC architecture.
module sparc_decode
  import dts_pkg::*;
(
  input  logic [31:0]     ir,
  input  logic [XLEN-1:0] pc,
  output dinstr_t         d,
  output logic            jump,       // ba: continue at target
  output logic [XLEN-1:0] target,     // branch target address
  output logic            illegal
);

  logic [1:0] op;
  logic [2:0] op2;
  logic [5:0] op3;
  logic [4:0] rd, rs1, rs2;
  logic       i;
  logic [XLEN-1:0] simm;

  assign op   = ir[31:30];
  assign op2  = ir[24:22];
  assign op3  = ir[24:19];
  assign rd   = ir[29:25];
  assign rs1  = ir[18:14];
  assign rs2  = ir[4:0];
  assign i    = ir[13];
  assign simm = {{19{ir[12]}}, ir[12:0]};
  assign target = pc + {{8{ir[21]}}, ir[21:0], 2'b00};

  always_comb begin
    d       = DINSTR_NONE;
    jump    = 1'b0;
    illegal = 1'b0;
    d.valid = 1'b1;
    d.op    = OP_NOP;
    d.fn    = FN_ADD;
    d.srca  = rid_int(rs1);
    d.srcb  = rid_int(rs2);
    d.srcc  = rid_int(rd);
    d.dst   = rid_int(rd);
    d.dstf  = rid_icc();
    d.imm   = simm;
    d.use_imm = i;
    unique case (op)
      2'b00: begin
        if (op2 == 3'b100) begin                       // sethi
          d.op = OP_ALU; d.fn = FN_PASS; d.use_imm = 1'b1;
          d.imm = {ir[21:0], 10'b0};
          d.vd = rd != 5'd0;
          if (rd == 5'd0) d.op = OP_NOP;
        end else if (op2 == 3'b010) begin              // Bicc
          d.cond = ir[28:25];
          if (ir[28:25] == 4'b1000) jump = 1'b1;       // ba
          else if (ir[28:25] != 4'b0000) begin         // bn is a nop
            d.op = OP_BR; d.srca = rid_icc(); d.va = 1'b1;
          end
        end else illegal = 1'b1;
      end
      2'b10: begin
        d.op = OP_ALU;
        d.va = 1'b1;
        d.vb = !i;
        d.vd = rd != 5'd0;
        d.setcc = op3[4];
        d.vf = op3[4];
        unique casez (op3)
          6'b0?0000: d.fn = FN_ADD;
          6'b0?0001: d.fn = FN_AND;
          6'b0?0010: d.fn = FN_OR;
          6'b0?0011: d.fn = FN_XOR;
          6'b0?0100: d.fn = FN_SUB;
          6'b100101: d.fn = FN_SLL;
          6'b100110: d.fn = FN_SRL;
          6'b100111: d.fn = FN_SRA;
          default:   illegal = 1'b1;
        endcase
        if (illegal || (!d.vd && !d.vf)) d.op = OP_NOP;
      end
      2'b11: begin
        d.va = 1'b1;
        d.vb = !i;
        if (op3 == 6'b000000) begin                    // ld
          d.op = OP_LD; d.vd = rd != 5'd0;
          if (rd == 5'd0) d.op = OP_NOP;
        end else if (op3 == 6'b000100) begin           // st
          d.op = OP_ST; d.vc = 1'b1;
        end else illegal = 1'b1;
      end
      default: illegal = 1'b1;                         // call is not decoded
    endcase
    if (d.op == OP_NOP) begin
      d.va = 1'b0; d.vb = 1'b0; d.vc = 1'b0; d.vd = 1'b0; d.vf = 1'b0; d.setcc = 1'b0;
    end
  end

endmodule
