// fetch_unit: decides which engine of the DTSVLIW runs.
//
// The Primary Processor and the VLIW Engine never run at the same time; they
// share the machine state, so switching costs only the pipeline stages
// emptied in one and refilled in the other.
//
//  * While the Primary Processor runs, the address of the instruction in its
//    execute stage is probed in the VLIW Cache (pb_pc/pb_hit). On a hit the
//    instruction is not executed: the Primary Processor is halted, the
//    Scheduler Unit closes the block it is building (its next address is
//    the hit address) and the VLIW Engine starts at that address.
//  * When the VLIW Engine misses in the VLIW Cache it drains and reports the
//    last address it produced; the Primary Processor restarts there. The
//    first instruction that then reaches execute is the one that missed, so
//    it is not probed: probing resumes with the next one, and the Scheduler
//    Unit starts a new block at that address, chaining the blocks.
//
// After reset the Primary Processor starts at RESET_PC. Outputs are
// combinational except the mode and the probe-arming flag.
module fetch_unit
  import dts_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  // Primary Processor execute stage
  input  logic            pp_e_valid,
  input  logic [XLEN-1:0] pp_e_pc,
  input  logic            pp_adv,          // that instruction completes this cycle
  output logic            pp_restart,
  output logic [XLEN-1:0] pp_restart_pc,
  output logic            pp_halt,
  // VLIW Cache probe
  output logic [XLEN-1:0] pb_pc,
  input  logic            pb_hit,
  // Scheduler Unit
  output logic            sched_flush,
  // VLIW Engine
  output logic            eng_start,
  output logic [XLEN-1:0] eng_start_pc,
  input  logic            eng_done,
  input  logic [XLEN-1:0] eng_done_pc,
  output logic            vliw_mode,
  output logic            ev_to_vliw,
  output logic            ev_to_primary
);

  typedef enum logic [1:0] {M_RESET, M_PRIMARY, M_VLIW} mode_e;

  mode_e mode;
  logic  armed;
  logic  hit;

  assign pb_pc         = pp_e_pc;
  assign hit           = mode == M_PRIMARY && pp_e_valid && armed && pb_hit;
  assign pp_halt       = hit;
  assign sched_flush   = hit;
  assign eng_start     = hit;
  assign eng_start_pc  = pp_e_pc;
  assign pp_restart    = mode == M_RESET || (mode == M_VLIW && eng_done);
  assign pp_restart_pc = (mode == M_RESET) ? RESET_PC : eng_done_pc;
  assign vliw_mode     = mode == M_VLIW;
  assign ev_to_vliw    = hit;
  assign ev_to_primary = mode == M_VLIW && eng_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode  <= M_RESET;
      armed <= 1'b0;
    end else begin
      unique case (mode)
        M_RESET: begin
          mode  <= M_PRIMARY;
          armed <= 1'b0;
        end
        M_PRIMARY: begin
          if (hit)                      mode  <= M_VLIW;
          else if (pp_e_valid && pp_adv) armed <= 1'b1;
        end
        default: if (eng_done) begin
          mode  <= M_PRIMARY;
          armed <= 1'b0;
        end
      endcase
    end
  end

endmodule
