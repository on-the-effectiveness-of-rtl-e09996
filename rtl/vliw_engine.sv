// vliw_engine: the VLIW Engine of the DTSVLIW.
//
// Runs blocks of long instructions from the VLIW Cache in place of the
// original code. Every slot has the same simple pipeline: fetch (read the
// long instruction at the current line and line index), execute (read
// operands, compute, evaluate branches, read data memory) and write back
// (write registers and data memory). There is no decode stage: the cache
// holds decoded instructions. All slots are untyped: any slot executes any
// operation, as in the evaluated untyped configurations.
//
// Addressing. The line index starts at zero and counts up; when it reaches
// the line's last index the next fetch uses the line's next address, which
// is looked up at once, so consecutive blocks run without a bubble. A
// conditional branch whose outcome differs from the direction recorded when
// the block was built invalidates its tag: the slots of its long instruction
// that carry that tag or a later one are not written back, the long
// instruction already fetched behind it is dropped, and the branch's exit
// address is looked up at once, so the next block follows after one bubble. Slots whose tag is still valid
// write their results; renamed results go to renaming registers and copy
// instructions move them to the architectural registers.
//
// Handing over. `start` with start_pc begins VLIW execution; when a lookup
// misses, fetching stops, the pipeline drains and `done` is raised for one
// cycle with done_pc, the address the Primary Processor must continue from.
// lock_v/lock_line name the line being fetched (from the start request on)
// so the cache does not rewrite it under the engine.
//
// Register operands are bypassed from write back to execute, and loads see
// stores of the long instruction in write back, so one long instruction can
// use the results of the previous one (latency 1, as in the evaluation).
module vliw_engine
  import dts_pkg::*;
#(
  parameter int WIDTH  = 8,
  parameter int HEIGHT = 8,
  parameter int LINES  = 8192
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [XLEN-1:0]             start_pc,
  output logic                        done,
  output logic [XLEN-1:0]             done_pc,
  // VLIW Cache
  output logic [XLEN-1:0]             la_pc,
  input  logic                        la_hit,
  input  logic [$clog2(LINES)-1:0]    la_line,
  output logic [$clog2(LINES)-1:0]    rd_line,
  output logic [$clog2(HEIGHT)-1:0]   rd_idx,
  input  dinstr_t [WIDTH-1:0]         rd_li,
  input  logic [$clog2(HEIGHT)-1:0]   rd_max,
  input  logic [XLEN-1:0]             rd_next,
  output logic                        lock_v,
  output logic [$clog2(LINES)-1:0]    lock_line,
  // register file: 3 reads and 2 writes per slot
  output rid_t [3*WIDTH-1:0]          rf_ra,
  input  logic [3*WIDTH-1:0][XLEN-1:0] rf_rdata,
  output logic [2*WIDTH-1:0]          rf_we,
  output rid_t [2*WIDTH-1:0]          rf_wa,
  output logic [2*WIDTH-1:0][XLEN-1:0] rf_wdata,
  // data memory: one port per slot
  output logic [WIDTH-1:0][XLEN-1:0]  dm_ra,        // load address (execute)
  output logic [WIDTH-1:0][XLEN-1:0]  dm_wa,        // store address (write back)
  input  logic [WIDTH-1:0][XLEN-1:0]  dm_rdata,
  output logic [WIDTH-1:0]            dm_we,
  output logic [WIDTH-1:0][XLEN-1:0]  dm_wdata,
  // events
  output logic                        ev_li,        // a long instruction executed
  output logic [$clog2(WIDTH+1)-1:0]  ev_ops,       // instructions written back (copies excluded)
  output logic                        ev_block,     // a block entered
  output logic                        ev_br_exit,   // left a block through a branch
  output logic                        ev_chain      // next block found without a bubble
);

  localparam int LW = $clog2(LINES);
  localparam int HW = $clog2(HEIGHT);

  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_RUN, S_DRAIN} st_e;

  st_e             st;
  logic [LW-1:0]   line;
  logic [HW-1:0]   idx;
  logic [XLEN-1:0] pc_next;          // address to look up in S_LOOK / to hand back

  // execute stage
  logic                    e_v;
  dinstr_t [WIDTH-1:0]     e_li;
  // write-back stage
  logic [2*WIDTH-1:0]            w_we;
  rid_t [2*WIDTH-1:0]            w_wa;
  logic [2*WIDTH-1:0][XLEN-1:0]  w_wd;
  logic [WIDTH-1:0]              w_st;
  logic [WIDTH-1:0][XLEN-1:0]    w_sa, w_sd;

  // ---------------- execute ----------------
  logic [WIDTH-1:0][XLEN-1:0] opa, opb, opc;
  logic [WIDTH-1:0]           mism;
  logic [TAGW-1:0]            kill_tag;
  logic                       kill;
  logic [WIDTH-1:0]           keep;
  logic [2*WIDTH-1:0]           x_we;
  rid_t [2*WIDTH-1:0]           x_wa;
  logic [2*WIDTH-1:0][XLEN-1:0] x_wd;
  logic [WIDTH-1:0]             x_st;
  logic [WIDTH-1:0][XLEN-1:0]   x_sa, x_sd;
  logic [XLEN-1:0]              kill_pc;

  function automatic logic [XLEN-1:0] bypass(input rid_t r, input logic [XLEN-1:0] v,
      input logic [2*WIDTH-1:0] we, input rid_t [2*WIDTH-1:0] wa,
      input logic [2*WIDTH-1:0][XLEN-1:0] wd);
    logic [XLEN-1:0] o;
    o = v;
    for (int q = 0; q < 2*WIDTH; q++)
      if (we[q] && wa[q] == r) o = (r.kind == RK_ICC || r.kind == RK_RFLG) ? {28'd0, wd[q][3:0]} : wd[q];
    return o;
  endfunction

  always_comb begin
    for (int s = 0; s < WIDTH; s++) begin
      rf_ra[3*s]   = e_li[s].srca;
      rf_ra[3*s+1] = e_li[s].srcb;
      rf_ra[3*s+2] = e_li[s].srcc;
      opa[s] = bypass(e_li[s].srca, rf_rdata[3*s],   w_we, w_wa, w_wd);
      opb[s] = e_li[s].use_imm ? e_li[s].imm
             : bypass(e_li[s].srcb, rf_rdata[3*s+1], w_we, w_wa, w_wd);
      opc[s] = bypass(e_li[s].srcc, rf_rdata[3*s+2], w_we, w_wa, w_wd);
    end
  end

  always_comb
    for (int s = 0; s < WIDTH; s++) dm_ra[s] = opa[s] + opb[s];

  always_comb begin
    kill     = 1'b0;
    kill_tag = '1;
    kill_pc  = '0;
    for (int s = 0; s < WIDTH; s++) begin
      mism[s] = e_v && e_li[s].valid && e_li[s].op == OP_BR &&
                (bcond(e_li[s].cond, opa[s][3:0]) != e_li[s].taken);
      if (mism[s] && e_li[s].tag <= kill_tag) begin
        kill     = 1'b1;
        kill_tag = e_li[s].tag;
        kill_pc  = e_li[s].exit_pc;
      end
    end
    for (int s = 0; s < WIDTH; s++) begin
      logic [XLEN+3:0] res;
      logic [XLEN-1:0] ld;
      keep[s] = e_v && e_li[s].valid && !(kill && e_li[s].tag >= kill_tag);
      res = alu(e_li[s].fn, opa[s], opb[s]);
      ld = dm_rdata[s];
      for (int q = 0; q < WIDTH; q++)
        if (w_st[q] && w_sa[q][XLEN-1:2] == dm_ra[s][XLEN-1:2]) ld = w_sd[q];
      x_we[2*s]   = keep[s] && e_li[s].vd &&
                    (e_li[s].op == OP_ALU || e_li[s].op == OP_LD || e_li[s].op == OP_COPY);
      x_wa[2*s]   = e_li[s].dst;
      x_wd[2*s]   = (e_li[s].op == OP_LD) ? ld : (e_li[s].op == OP_COPY) ? opa[s] : res[XLEN+3:4];
      x_we[2*s+1] = keep[s] && e_li[s].vf && (e_li[s].op == OP_ALU || e_li[s].op == OP_COPY);
      x_wa[2*s+1] = e_li[s].dstf;
      x_wd[2*s+1] = (e_li[s].op == OP_COPY) ? {28'd0, opb[s][3:0]} : {28'd0, res[3:0]};
      x_st[s]     = keep[s] && e_li[s].op == OP_ST;
      x_sa[s]     = dm_ra[s];
      x_sd[s]     = opc[s];
    end
  end

  // ---------------- write back ----------------
  assign rf_we    = w_we;
  assign rf_wa    = w_wa;
  assign rf_wdata = w_wd;
  always_comb begin
    for (int s = 0; s < WIDTH; s++) begin
      dm_we[s]    = w_st[s];
      dm_wa[s]    = w_sa[s];
      dm_wdata[s] = w_sd[s];
    end
  end

  // ---------------- fetch ----------------
  logic f_fire;                    // a long instruction is fetched this cycle
  assign rd_line   = line;
  assign rd_idx    = idx;
  // at the last long instruction of a block the next block is looked up at once
  // and a branch leaving the block looks up its exit address in the same cycle
  assign la_pc     = kill ? kill_pc : (st == S_RUN) ? rd_next : pc_next;
  // the line is locked from the start request on, so a block closed by the
  // same hit cannot overwrite the block about to run
  assign lock_v    = start || st != S_IDLE;
  assign lock_line = (st == S_IDLE) ? start_pc[LW+1:2] : line;
  assign f_fire    = st == S_RUN && !kill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      line    <= '0;
      idx     <= '0;
      pc_next <= '0;
      e_v     <= 1'b0;
      e_li    <= '0;
      w_we    <= '0;
      w_wa    <= '0;
      w_wd    <= '0;
      w_st    <= '0;
      w_sa    <= '0;
      w_sd    <= '0;
      done    <= 1'b0;
      done_pc <= '0;
    end else begin
      done <= 1'b0;
      // write back register
      w_we <= x_we;
      w_wa <= x_wa;
      w_wd <= x_wd;
      w_st <= x_st;
      w_sa <= x_sa;
      w_sd <= x_sd;
      // execute register
      e_v  <= f_fire;
      e_li <= rd_li;
      unique case (st)
        S_IDLE: if (start) begin
          pc_next <= start_pc;
          st      <= S_LOOK;
        end
        S_LOOK: begin
          if (la_hit) begin
            line <= la_line;
            idx  <= '0;
            st   <= S_RUN;
          end else st <= S_DRAIN;
        end
        S_RUN: begin
          if (kill) begin
            pc_next <= kill_pc;
            idx     <= '0;
            if (la_hit) line <= la_line;
            else        st   <= S_DRAIN;
          end else if (idx == rd_max) begin
            pc_next <= rd_next;
            idx     <= '0;
            if (la_hit) line <= la_line;
            else             st   <= S_DRAIN;
          end else idx <= idx + 1'b1;
        end
        default: begin        // S_DRAIN: wait for execute and write back
          if (kill) begin
            pc_next <= kill_pc;
            idx     <= '0;
            if (la_hit) begin
              line <= la_line;
              st   <= S_RUN;
            end
          end else if (!e_v && w_we == '0 && w_st == '0 && !kill) begin
            done    <= 1'b1;
            done_pc <= pc_next;
            st      <= S_IDLE;
          end
        end
      endcase
    end
  end


  // ---------------- events ----------------
  always_comb begin
    ev_ops = '0;
    for (int s = 0; s < WIDTH; s++)
      if (keep[s] && e_li[s].op != OP_COPY && e_li[s].op != OP_NOP) ev_ops = ev_ops + 1'b1;
  end
  assign ev_li      = e_v;
  assign ev_block   = (st == S_LOOK && la_hit) || (kill && la_hit) ||
                      (st == S_RUN && !kill && idx == rd_max && la_hit);
  assign ev_br_exit = kill;
  assign ev_chain   = st == S_RUN && !kill && idx == rd_max && la_hit;

endmodule
