// dtsvliw_top: a dynamically trace scheduled VLIW (DTSVLIW) machine.
//
// The machine runs ordinary sequential code and, as it runs it, turns the
// executed instruction trace into blocks of long (VLIW) instructions, which
// it keeps in a VLIW Cache and runs on a VLIW Engine the next time the same
// code comes round. Binary compatibility comes from the Scheduler Engine:
//
//   instr_mem (Instruction Cache) -> primary_proc (Primary Processor)
//        every executed instruction -> sched_unit (Scheduler Unit)
//        finished blocks            -> vliw_cache (VLIW Cache)
//   vliw_cache -> vliw_engine (VLIW Engine)
//   fetch_unit picks the engine that runs; both share dts_regfile (integer
//   and renaming registers) and data_mem (data cache).
//
// Parameters: WIDTH instructions per long instruction and HEIGHT long
// instructions per block (8x8 by default, one of the evaluated untyped
// geometries), LINES lines of VLIW Cache (one block each), and the sizes of
// the perfect instruction and data caches.
//
// Interface: the program is written into the instruction memory through the
// prog_* port while rst_n is low or before the code is reached; after reset
// the Primary Processor starts at address 0. The architectural registers,
// the current engine and per-cycle event pulses are brought out so the
// machine can be observed.
module dtsvliw_top
  import dts_pkg::*;
#(
  parameter int WIDTH    = 8,
  parameter int HEIGHT   = 8,
  parameter int LINES    = 8192,
  parameter int IM_WORDS = 1024,
  parameter int DM_WORDS = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // program load
  input  logic                     prog_we,
  input  logic [XLEN-1:0]          prog_addr,
  input  logic [31:0]              prog_data,
  // observation
  output logic [31:0][XLEN-1:0]    arch_r,
  output logic [3:0]               arch_icc,
  output logic                     vliw_mode,
  output logic                     pp_e_valid,
  output logic [XLEN-1:0]          pp_e_pc,
  // events (one-cycle pulses)
  output logic                     ev_pp_exec,
  output logic                     ev_pp_taken,
  output logic                     ev_illegal,
  output logic                     ev_ins_tail,
  output logic                     ev_ins_new,
  output logic [HEIGHT-1:0]        ev_move,
  output logic [HEIGHT-1:0]        ev_install,
  output logic [HEIGHT-1:0]        ev_split,
  output logic                     ev_block_full,
  output logic                     ev_sched_stall,
  output logic                     ev_save,
  output logic                     ev_save_hold,
  output logic                     ev_vliw_li,
  output logic [$clog2(WIDTH+1)-1:0] ev_vliw_ops,
  output logic                     ev_vliw_block,
  output logic                     ev_vliw_br_exit,
  output logic                     ev_vliw_chain,
  output logic                     ev_to_vliw,
  output logic                     ev_to_primary
);

  localparam int LW = $clog2(LINES);
  localparam int HW = $clog2(HEIGHT);

  // ---------------- instruction cache ----------------
  logic [XLEN-1:0] im_addr;
  logic [31:0]     im_data;

  instr_mem #(.WORDS(IM_WORDS)) u_imem (
    .clk, .addr(im_addr), .rdata(im_data),
    .load_we(prog_we), .load_addr(prog_addr), .load_data(prog_data)
  );

  // ---------------- machine state ----------------
  localparam int NR = 3 + 3 * WIDTH;
  localparam int NW = 2 + 2 * WIDTH;
  rid_t [NR-1:0]            rf_ra;
  logic [NR-1:0][XLEN-1:0]  rf_rdata;
  logic [NW-1:0]            rf_we;
  rid_t [NW-1:0]            rf_wa;
  logic [NW-1:0][XLEN-1:0]  rf_wdata;

  dts_regfile #(.NR(NR), .NW(NW)) u_rf (
    .clk, .rst_n, .ra(rf_ra), .rdata(rf_rdata), .we(rf_we), .wa(rf_wa), .wdata(rf_wdata),
    .arch_r, .arch_icc
  );

  localparam int NP = 1 + WIDTH;
  logic [NP-1:0][XLEN-1:0] dm_ra, dm_wa, dm_rdata, dm_wdata;
  logic [NP-1:0]           dm_we;

  data_mem #(.NP(NP), .WORDS(DM_WORDS)) u_dmem (
    .clk, .rst_n, .raddr(dm_ra), .waddr(dm_wa), .rdata(dm_rdata), .we(dm_we), .wdata(dm_wdata)
  );

  // ---------------- Primary Processor ----------------
  logic            pp_restart, pp_halt;
  logic [XLEN-1:0] pp_restart_pc;
  logic            sc_valid, sc_ready;
  dinstr_t         sc_instr;
  logic [XLEN-1:0] sc_pc, sc_next_pc;
  logic [XLEN-1:0] pp_dm_addr;

  primary_proc u_pp (
    .clk, .rst_n,
    .restart(pp_restart), .restart_pc(pp_restart_pc), .halt(pp_halt),
    .im_addr, .im_data,
    .rf_ra(rf_ra[2:0]), .rf_rdata(rf_rdata[2:0]),
    .rf_we(rf_we[1:0]), .rf_wa(rf_wa[1:0]), .rf_wdata(rf_wdata[1:0]),
    .dm_addr(pp_dm_addr), .dm_rdata(dm_rdata[0]), .dm_we(dm_we[0]), .dm_wdata(dm_wdata[0]),
    .sc_valid, .sc_instr, .sc_pc, .sc_next_pc, .sc_ready,
    .e_valid(pp_e_valid), .e_pc(pp_e_pc),
    .ev_exec(ev_pp_exec), .ev_taken(ev_pp_taken), .ev_illegal
  );
  assign dm_ra[0] = pp_dm_addr;
  assign dm_wa[0] = pp_dm_addr;

  // ---------------- Scheduler Unit ----------------
  logic                  sched_flush;
  logic                  sv_valid, sv_last, sv_hold;
  logic [XLEN-1:0]       sv_pc, sv_next_pc;
  logic [HW-1:0]         sv_idx;
  dinstr_t [WIDTH-1:0]   sv_li;

  sched_unit #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_sched (
    .clk, .rst_n,
    .in_valid(sc_valid), .in_instr(sc_instr), .in_pc(sc_pc), .in_next_pc(sc_next_pc),
    .in_ready(sc_ready), .flush_req(sched_flush),
    .sv_valid, .sv_pc, .sv_idx, .sv_last, .sv_next_pc, .sv_li, .sv_hold,
    .ev_ins_tail, .ev_ins_new, .ev_move, .ev_install, .ev_split,
    .ev_full(ev_block_full), .ev_stall(ev_sched_stall), .ev_hold(ev_save_hold)
  );
  assign ev_save      = sv_valid;

  // ---------------- VLIW Cache ----------------
  logic                lock_v;
  logic [LW-1:0]       lock_line, la_line, rd_line;
  logic [XLEN-1:0]     la_pc, pb_pc, rd_next;
  logic                la_hit, pb_hit;
  logic [HW-1:0]       rd_idx, rd_max;
  dinstr_t [WIDTH-1:0] rd_li;

  vliw_cache #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .LINES(LINES)) u_vc (
    .clk, .rst_n,
    .sv_valid, .sv_pc, .sv_idx, .sv_last, .sv_next_pc, .sv_li, .wr_hold(sv_hold),
    .lock_v, .lock_line,
    .la_pc, .la_hit, .la_line, .pb_pc, .pb_hit,
    .rd_line, .rd_idx, .rd_li, .rd_max, .rd_next
  );

  // ---------------- VLIW Engine ----------------
  logic            eng_start, eng_done;
  logic [XLEN-1:0] eng_start_pc, eng_done_pc;

  vliw_engine #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .LINES(LINES)) u_eng (
    .clk, .rst_n,
    .start(eng_start), .start_pc(eng_start_pc),
    .done(eng_done), .done_pc(eng_done_pc),
    .la_pc, .la_hit, .la_line, .rd_line, .rd_idx, .rd_li, .rd_max, .rd_next,
    .lock_v, .lock_line,
    .rf_ra(rf_ra[NR-1:3]), .rf_rdata(rf_rdata[NR-1:3]),
    .rf_we(rf_we[NW-1:2]), .rf_wa(rf_wa[NW-1:2]), .rf_wdata(rf_wdata[NW-1:2]),
    .dm_ra(dm_ra[NP-1:1]), .dm_wa(dm_wa[NP-1:1]), .dm_rdata(dm_rdata[NP-1:1]),
    .dm_we(dm_we[NP-1:1]), .dm_wdata(dm_wdata[NP-1:1]),
    .ev_li(ev_vliw_li), .ev_ops(ev_vliw_ops), .ev_block(ev_vliw_block),
    .ev_br_exit(ev_vliw_br_exit), .ev_chain(ev_vliw_chain)
  );

  // ---------------- Fetch Unit ----------------
  fetch_unit u_fu (
    .clk, .rst_n,
    .pp_e_valid, .pp_e_pc, .pp_adv(ev_pp_exec),
    .pp_restart, .pp_restart_pc, .pp_halt,
    .pb_pc, .pb_hit,
    .sched_flush,
    .eng_start, .eng_start_pc, .eng_done, .eng_done_pc,
    .vliw_mode, .ev_to_vliw, .ev_to_primary
  );

endmodule
