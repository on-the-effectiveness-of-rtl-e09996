// primary_proc: the Primary Processor of the DTSVLIW Scheduler Engine.
//
// A simple in-order pipeline of four stages, fetch, decode, execute and
// write back, with no branch prediction. It runs the original code whenever
// the VLIW Cache has no block for it, and every instruction that reaches the
// execute stage is also handed to the Scheduler Unit (sc_*), with its own
// address, the address of the instruction executed after it and, for a
// conditional branch, the direction taken and the address of the other
// direction (the exit a long-instruction block needs if that branch later
// goes the other way).
//
// Timing. Operands are read in execute, with a bypass from write back, so
// dependent instructions follow each other without stalls (latency 1).
// Loads and stores use the perfect data cache in execute; results are
// written in write back. Branches resolve in execute, so a taken branch
// leaves a 2-cycle bubble (the fetch and decode stages are squashed). The
// pipeline stalls while the Scheduler Unit cannot accept (sc_ready low).
//
// Control. `restart` flushes the pipeline and starts fetching at restart_pc;
// `halt` squashes fetch, decode and execute (the instruction in execute is
// neither executed nor handed to the scheduler) and stops fetching until the
// next restart. Both come from the Fetch Unit.
//
// The document's Primary Processor runs the full SPARC V7 instruction set;
// this one runs the integer subset decoded by sparc_decode, with branches
// that have no delay slot.
module primary_proc
  import dts_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 restart,
  input  logic [XLEN-1:0]      restart_pc,
  input  logic                 halt,
  // instruction cache
  output logic [XLEN-1:0]      im_addr,
  input  logic [31:0]          im_data,
  // register file: 3 reads (execute), 2 writes (write back)
  output rid_t [2:0]           rf_ra,
  input  logic [2:0][XLEN-1:0] rf_rdata,
  output logic [1:0]           rf_we,
  output rid_t [1:0]           rf_wa,
  output logic [1:0][XLEN-1:0] rf_wdata,
  // data cache
  output logic [XLEN-1:0]      dm_addr,
  input  logic [XLEN-1:0]      dm_rdata,
  output logic                 dm_we,
  output logic [XLEN-1:0]      dm_wdata,
  // scheduler unit
  output logic                 sc_valid,
  output dinstr_t              sc_instr,
  output logic [XLEN-1:0]      sc_pc,
  output logic [XLEN-1:0]      sc_next_pc,
  input  logic                 sc_ready,
  // execute stage, seen by the Fetch Unit
  output logic                 e_valid,
  output logic [XLEN-1:0]      e_pc,
  // events
  output logic                 ev_exec,       // instruction executed
  output logic                 ev_taken,      // taken branch (bubble)
  output logic                 ev_illegal     // an undecoded instruction completed (as a no-op)
);

  logic            running;
  logic [XLEN-1:0] pc;
  // fetch -> decode
  logic            d_v;
  logic [31:0]     d_ir;
  logic [XLEN-1:0] d_pc;
  // decode -> execute
  dinstr_t         e_d;
  logic            e_jump;
  logic [XLEN-1:0] e_target;
  logic            e_v;
  logic            e_ill;
  logic [XLEN-1:0] e_pcr;
  // execute -> write back
  logic [1:0]           w_we;
  rid_t [1:0]           w_wa;
  logic [1:0][XLEN-1:0] w_wd;

  // ---------------- decode ----------------
  dinstr_t         dd;
  logic            d_jump, d_ill;
  logic [XLEN-1:0] d_target;

  sparc_decode u_dec (
    .ir(d_ir), .pc(d_pc), .d(dd), .jump(d_jump), .target(d_target), .illegal(d_ill)
  );

  // ---------------- execute ----------------
  logic [XLEN-1:0] a, b, c;
  logic [XLEN+3:0] res;
  logic            taken, redirect, adv;
  logic [XLEN-1:0] next_pc;

  function automatic logic [XLEN-1:0] byp(input rid_t r, input logic [XLEN-1:0] v,
      input logic [1:0] we, input rid_t [1:0] wa, input logic [1:0][XLEN-1:0] wd);
    logic [XLEN-1:0] o;
    o = v;
    for (int q = 0; q < 2; q++) if (we[q] && wa[q] == r) o = wd[q];
    return o;
  endfunction

  always_comb begin
    rf_ra[0] = e_d.srca;
    rf_ra[1] = e_d.srcb;
    rf_ra[2] = e_d.srcc;
    a = byp(e_d.srca, rf_rdata[0], w_we, w_wa, w_wd);
    b = e_d.use_imm ? e_d.imm : byp(e_d.srcb, rf_rdata[1], w_we, w_wa, w_wd);
    c = byp(e_d.srcc, rf_rdata[2], w_we, w_wa, w_wd);
    res = alu(e_d.fn, a, b);
    taken = e_jump || (e_d.op == OP_BR && bcond(e_d.cond, a[3:0]));
    next_pc = taken ? e_target : e_pcr + 32'd4;
    sc_instr = e_d;
    sc_instr.taken   = taken;
    sc_instr.exit_pc = taken ? e_pcr + 32'd4 : e_target;
  end

  assign e_valid    = e_v;
  assign e_pc       = e_pcr;
  assign sc_valid   = e_v && !halt;
  assign sc_pc      = e_pcr;
  assign sc_next_pc = next_pc;
  assign adv        = e_v && !halt && sc_ready;          // execute stage completes
  assign redirect   = adv && taken;

  assign dm_addr  = a + b;
  assign dm_we    = adv && e_d.op == OP_ST;
  assign dm_wdata = c;

  assign rf_we    = w_we;
  assign rf_wa    = w_wa;
  assign rf_wdata = w_wd;
  assign im_addr  = pc;

  assign ev_exec    = adv;
  assign ev_taken   = redirect;
  assign ev_illegal = adv && e_ill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      pc       <= '0;
      d_v      <= 1'b0;
      d_ir     <= '0;
      d_pc     <= '0;
      e_v      <= 1'b0;
      e_ill    <= 1'b0;
      e_d      <= DINSTR_NONE;
      e_jump   <= 1'b0;
      e_target <= '0;
      e_pcr    <= '0;
      w_we     <= '0;
      w_wa     <= '0;
      w_wd     <= '0;
    end else if (restart) begin
      running <= 1'b1;
      pc      <= restart_pc;
      d_v     <= 1'b0;
      e_v     <= 1'b0;
      w_we    <= '0;
    end else if (halt) begin
      running <= 1'b0;
      d_v     <= 1'b0;
      e_v     <= 1'b0;
      w_we    <= '0;
    end else begin
      // write back
      w_we[0] <= adv && e_d.vd && (e_d.op == OP_ALU || e_d.op == OP_LD);
      w_wa[0] <= e_d.dst;
      w_wd[0] <= (e_d.op == OP_LD) ? dm_rdata : res[XLEN+3:4];
      w_we[1] <= adv && e_d.vf && e_d.op == OP_ALU;
      w_wa[1] <= e_d.dstf;
      w_wd[1] <= {28'd0, res[3:0]};
      if (!e_v || adv) begin
        // decode -> execute
        e_v      <= d_v && !redirect;
        e_d      <= dd;
        e_ill    <= d_ill;
        e_jump   <= d_jump;
        e_target <= d_target;
        e_pcr    <= d_pc;
        // fetch -> decode
        d_v      <= running && !redirect;
        d_ir     <= im_data;
        d_pc     <= pc;
        if (redirect)     pc <= next_pc;
        else if (running) pc <= pc + 32'd4;
      end
    end
  end

endmodule
