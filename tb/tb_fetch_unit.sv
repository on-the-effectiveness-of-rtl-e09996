// tb_fetch_unit: self-checking test of the Fetch Unit.
//
// Drives the Primary Processor's execute stage, the VLIW Cache probe and the
// VLIW Engine's done report by hand and checks, cycle by cycle:
//  * after reset the Primary Processor is restarted once at RESET_PC;
//  * a probe hit is ignored until one instruction has completed after a
//    restart (the first one is the address that missed);
//  * an armed hit halts the Primary Processor, closes the Scheduler Unit's
//    block and starts the VLIW Engine at that address, in the same cycle;
//  * while the VLIW Engine runs nothing else is requested, and its done
//    report restarts the Primary Processor at done_pc, after which probing is
//    disarmed again;
//  * switch counts match the number of hits and done reports driven.
module tb_fetch_unit;
  import dts_pkg::*;

  localparam logic [XLEN-1:0] RPC = 32'h1000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            pp_e_valid, pp_adv, pp_restart, pp_halt, pb_hit, sched_flush;
  logic [XLEN-1:0] pp_e_pc, pp_restart_pc, pb_pc, eng_start_pc, eng_done_pc;
  logic            eng_start, eng_done, vliw_mode, ev_to_vliw, ev_to_primary;

  fetch_unit #(.RESET_PC(RPC)) dut (
    .clk, .rst_n, .pp_e_valid, .pp_e_pc, .pp_adv, .pp_restart, .pp_restart_pc, .pp_halt,
    .pb_pc, .pb_hit, .sched_flush, .eng_start, .eng_start_pc, .eng_done, .eng_done_pc,
    .vliw_mode, .ev_to_vliw, .ev_to_primary
  );

  int checks = 0, failures = 0;
  int n_tov = 0, n_top = 0, exp_tov = 0, exp_top = 0;
  logic m_vliw, m_armed;             // model of the mode and the probe arming
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    n_tov += int'(ev_to_vliw);
    n_top += int'(ev_to_primary);
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // one cycle with the given execute stage and probe result; checks outputs
  task automatic cyc(input logic v, input logic [31:0] pc, input logic hit_in, input logic done_in,
                     input logic [31:0] dpc, input logic exp_hit, input logic exp_restart,
                     input logic [31:0] exp_rpc);
    pp_e_valid = v; pp_e_pc = pc; pp_adv = v; pb_hit = hit_in; eng_done = done_in; eng_done_pc = dpc;
    #1;
    chk("probe address", pb_pc, pc);
    chk("halt", 32'(pp_halt), 32'(exp_hit));
    chk("flush", 32'(sched_flush), 32'(exp_hit));
    chk("start", 32'(eng_start), 32'(exp_hit));
    if (exp_hit) chk("start pc", eng_start_pc, pc);
    chk("restart", 32'(pp_restart), 32'(exp_restart));
    if (exp_restart) chk("restart pc", pp_restart_pc, exp_rpc);
    if (exp_hit) pp_adv = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    pp_e_valid = 0; pp_e_pc = '0; pp_adv = 0; pb_hit = 0; eng_done = 0; eng_done_pc = '0;
    @(negedge clk);
    rst_n = 1'b1;
    #1;
    chk("restart after reset", 32'(pp_restart), 1);
    chk("reset pc", pp_restart_pc, RPC);
    @(negedge clk);
    chk("single restart", 32'(pp_restart), 0);
    chk("primary mode", 32'(vliw_mode), 0);
    // idle pipeline, then the first instruction hits: not armed yet
    cyc(0, '0, 0, 0, '0, 0, 0, '0);
    cyc(1, RPC, 1, 0, '0, 0, 0, '0);
    // second instruction hits: switch
    cyc(1, RPC + 4, 1, 0, '0, 1, 0, '0);
    exp_tov++;
    chk("vliw mode", 32'(vliw_mode), 1);
    // engine running: probes and stale execute contents are ignored
    for (int k = 0; k < 5; k++) cyc(1, RPC + 4, 1, 0, '0, 0, 0, '0);
    // engine done: restart at its address
    cyc(0, '0, 0, 1, 32'h2000, 0, 1, 32'h2000);
    exp_top++;
    chk("back to primary", 32'(vliw_mode), 0);
    // the missed address itself is not probed, the next one is
    cyc(1, 32'h2000, 1, 0, '0, 0, 0, '0);
    cyc(0, '0, 1, 0, '0, 0, 0, '0);                     // bubble keeps it armed, no hit without valid
    cyc(1, 32'h2004, 0, 0, '0, 0, 0, '0);
    cyc(1, 32'h2008, 1, 0, '0, 1, 0, '0);
    exp_tov++;
    // done again: restart there
    cyc(0, '0, 0, 1, 32'h3000, 0, 1, 32'h3000);
    exp_top++;
    // a done report in primary mode does nothing
    cyc(0, '0, 0, 1, 32'h3400, 0, 0, '0);
    chk("still primary", 32'(vliw_mode), 0);
    // random traffic: switches follow the rule
    m_vliw  = 1'b0;
    m_armed = 1'b0;
    for (int n = 0; n < 300; n++) begin
      automatic logic v = 1'($urandom), h = 1'($urandom);
      if (m_vliw) begin
        automatic logic dn = ($urandom_range(0, 3) == 0);
        cyc(v, 32'($urandom) & ~32'h3, h, dn, 32'h4000, 0, dn, 32'h4000);
        if (dn) begin exp_top++; m_vliw = 1'b0; m_armed = 1'b0; end
      end else begin
        cyc(v, 32'($urandom) & ~32'h3, h, 0, '0, v && h && m_armed, 0, '0);
        if (v && h && m_armed) begin exp_tov++; m_vliw = 1'b1; end
        else if (v) m_armed = 1'b1;
      end
    end
    chk("switches to VLIW", 32'(n_tov), 32'(exp_tov));
    chk("switches to primary", 32'(n_top), 32'(exp_top));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
