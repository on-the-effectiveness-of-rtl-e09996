// dts_pkg: types and constants shared by the DTSVLIW machine.
//
// The machine has two engines that share one architectural state: a simple
// in-order Primary Processor that runs ordinary SPARC-style code and a VLIW
// Engine that runs blocks of long instructions built on the fly by the
// Scheduler Unit. Both work on the same decoded instruction format, defined
// here, so the Scheduler Unit can copy what the Primary Processor executed
// straight into a long-instruction slot.
//
// Register identifiers (rid_t) name one storage position of the machine:
//   kind RK_INT  : architectural integer register idx[4:0] (r0 reads 0)
//   kind RK_ICC  : the architectural integer condition codes (N Z V C)
//   kind RK_RINT : integer renaming register idx
//   kind RK_RFLG : condition-code renaming register idx
// The renaming registers are written only by VLIW code; a copy instruction
// left behind by the scheduler moves their content to the architectural
// position. 256 renaming registers of each kind follow the document's
// machine parameters; the encoding of identifiers is this design's own.
package dts_pkg;

  localparam int XLEN      = 32;
  localparam int NREN      = 256;         // renaming registers per kind
  localparam int RIDX_W    = 8;
  localparam int TAGW      = 9;           // branch tags: a block holds at most 2**TAGW-1 branches

  typedef enum logic [1:0] {
    RK_INT  = 2'd0,
    RK_ICC  = 2'd1,
    RK_RINT = 2'd2,
    RK_RFLG = 2'd3
  } rkind_e;

  typedef struct packed {
    rkind_e              kind;
    logic [RIDX_W-1:0]   idx;
  } rid_t;

  // Operation classes of the decoded instruction.
  typedef enum logic [2:0] {
    OP_NOP  = 3'd0,   // no effect (also unconditional branches: the trace fixes them)
    OP_ALU  = 3'd1,   // arithmetic / logic / sethi
    OP_LD   = 3'd2,   // 32-bit load
    OP_ST   = 3'd3,   // 32-bit store
    OP_BR   = 3'd4,   // conditional branch (Bicc)
    OP_COPY = 3'd5    // renaming register -> architectural position
  } op_e;

  typedef enum logic [3:0] {
    FN_ADD  = 4'd0,
    FN_SUB  = 4'd1,
    FN_AND  = 4'd2,
    FN_OR   = 4'd3,
    FN_XOR  = 4'd4,
    FN_SLL  = 4'd5,
    FN_SRL  = 4'd6,
    FN_SRA  = 4'd7,
    FN_PASS = 4'd8    // result = operand b (sethi)
  } fn_e;

  // Decoded instruction, as held in a pipeline register, a candidate
  // instruction and a long-instruction slot.
  typedef struct packed {
    logic             valid;
    op_e              op;
    fn_e              fn;
    logic             setcc;     // writes the condition codes
    logic             use_imm;   // operand b is imm instead of register srcb
    logic [XLEN-1:0]  imm;
    rid_t             srca;  logic va;   // operand a (branch: the icc it tests)
    rid_t             srcb;  logic vb;   // operand b (copy: condition-code source)
    rid_t             srcc;  logic vc;   // store data
    rid_t             dst;   logic vd;   // integer result
    rid_t             dstf;  logic vf;   // condition-code result
    logic [3:0]       cond;      // branch condition (SPARC Bicc encoding)
    logic             taken;     // direction seen when the trace was scheduled
    logic [XLEN-1:0]  exit_pc;   // where to go if the direction differs
    logic [TAGW-1:0]  tag;       // branch region (0: before any branch of the block)
  } dinstr_t;

  localparam dinstr_t DINSTR_NONE = '0;

  function automatic rid_t rid_int(input logic [4:0] r);
    rid_t x;
    x.kind = RK_INT;
    x.idx  = {3'b000, r};
    return x;
  endfunction

  function automatic rid_t rid_icc();
    rid_t x;
    x.kind = RK_ICC;
    x.idx  = '0;
    return x;
  endfunction

  function automatic logic is_renamed(input rid_t r);
    return r.kind == RK_RINT || r.kind == RK_RFLG;
  endfunction

  // SPARC integer ALU with condition codes {N,Z,V,C}.
  function automatic logic [XLEN+3:0] alu(input fn_e fn, input logic [XLEN-1:0] a,
                                           input logic [XLEN-1:0] b);
    logic [XLEN:0]   s;
    logic [XLEN-1:0] r;
    logic            v, c;
    s = '0; v = 1'b0; c = 1'b0;
    unique case (fn)
      FN_ADD: begin s = {1'b0, a} + {1'b0, b}; r = s[XLEN-1:0]; c = s[XLEN];
                    v = (a[XLEN-1] == b[XLEN-1]) && (r[XLEN-1] != a[XLEN-1]); end
      FN_SUB: begin s = {1'b0, a} - {1'b0, b}; r = s[XLEN-1:0]; c = s[XLEN];
                    v = (a[XLEN-1] != b[XLEN-1]) && (r[XLEN-1] != a[XLEN-1]); end
      FN_AND:  r = a & b;
      FN_OR:   r = a | b;
      FN_XOR:  r = a ^ b;
      FN_SLL:  r = a << b[4:0];
      FN_SRL:  r = a >> b[4:0];
      FN_SRA:  r = $signed(a) >>> b[4:0];
      default: r = b;
    endcase
    return {r, r[XLEN-1], (r == '0), v, c};
  endfunction

  // SPARC Bicc condition evaluation on icc = {N,Z,V,C}.
  function automatic logic bcond(input logic [3:0] cond, input logic [3:0] icc);
    logic n, z, v, c, t;
    {n, z, v, c} = icc;
    unique case (cond[2:0])
      3'd0: t = 1'b0;               // bn / ba
      3'd1: t = z;                  // be / bne
      3'd2: t = z | (n ^ v);        // ble / bg
      3'd3: t = n ^ v;              // bl / bge
      3'd4: t = c | z;              // bleu / bgu
      3'd5: t = c;                  // bcs / bcc
      3'd6: t = n;                  // bneg / bpos
      default: t = v;               // bvs / bvc
    endcase
    return cond[3] ? ~t : t;
  endfunction

endpackage
