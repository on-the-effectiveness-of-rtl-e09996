// tb_vliw_cache: self-checking test of the VLIW Cache.
//
// A 2-wide, 4-high, 8-line cache is written through its save port one long
// instruction per cycle, as the Scheduler Unit does. Checked against values
// computed here:
//  * a block becomes visible (lookup and probe hit) only once its last long
//    instruction is written, and reading it back returns every slot, its last
//    index and its next address;
//  * lookups and probes miss for other addresses, including one that maps to
//    the same line;
//  * a block at a conflicting address replaces the old one, which then misses;
//  * wr_hold is raised, and nothing is written, while the line being saved
//    is locked by the VLIW Engine or is the one it is looking up;
//  * random blocks at random addresses, checked against a model of the
//    direct-mapped organisation.
module tb_vliw_cache;
  import dts_pkg::*;

  localparam int W = 2, H = 4, L = 8;
  localparam int LW = $clog2(L), HW = $clog2(H);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                sv_valid, sv_last, wr_hold, lock_v;
  logic [XLEN-1:0]     sv_pc, sv_next_pc, la_pc, pb_pc, rd_next;
  logic [HW-1:0]       sv_idx, rd_idx, rd_max;
  dinstr_t [W-1:0]     sv_li, rd_li;
  logic [LW-1:0]       lock_line, la_line, rd_line;
  logic                la_hit, pb_hit;

  vliw_cache #(.WIDTH(W), .HEIGHT(H), .LINES(L)) dut (
    .clk, .rst_n, .sv_valid, .sv_pc, .sv_idx, .sv_last, .sv_next_pc, .sv_li, .wr_hold,
    .lock_v, .lock_line, .la_pc, .la_hit, .la_line, .pb_pc, .pb_hit,
    .rd_line, .rd_idx, .rd_li, .rd_max, .rd_next
  );

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // a recognisable long instruction: slot s of long instruction i of block pc
  function automatic dinstr_t mk(input logic [31:0] pc, input int i, input int s, input int salt);
    dinstr_t d = DINSTR_NONE;
    d.valid = 1'b1;
    d.op    = OP_ALU;
    d.imm   = pc ^ (32'(i) << 8) ^ (32'(s) << 4) ^ 32'(salt);
    d.tag   = TAGW'(i + s);
    return d;
  endfunction

  // model of the cache contents
  logic            m_v   [L];
  logic [31:0]     m_pc  [L];
  int              m_max [L];
  logic [31:0]     m_nx  [L];
  int              m_salt[L];

  task automatic save_li(input logic [31:0] pc, input int i, input logic last,
                         input logic [31:0] nx, input int salt);
    sv_valid = 1'b1; sv_pc = pc; sv_idx = HW'(i); sv_last = last; sv_next_pc = nx;
    for (int s = 0; s < W; s++) sv_li[s] = mk(pc, i, s, salt);
    @(posedge clk);
    #1;
    sv_valid = 1'b0;
  endtask

  task automatic save_block(input logic [31:0] pc, input int n, input logic [31:0] nx, input int salt);
    int ln = int'(pc[LW+1:2]);
    for (int i = 0; i < n; i++) save_li(pc, i, i == n - 1, nx, salt);
    m_v[ln] = 1'b1; m_pc[ln] = pc; m_max[ln] = n - 1; m_nx[ln] = nx; m_salt[ln] = salt;
  endtask

  task automatic look(input logic [31:0] pc);
    int ln = int'(pc[LW+1:2]);
    logic exp_hit = m_v[ln] && m_pc[ln] == pc;
    la_pc = pc; pb_pc = pc;
    #1;
    chk($sformatf("lookup hit %h", pc), 32'(la_hit), 32'(exp_hit));
    chk($sformatf("probe hit %h", pc), 32'(pb_hit), 32'(exp_hit));
    if (exp_hit) begin
      chk("lookup line", 32'(la_line), 32'(ln));
      rd_line = LW'(ln);
      for (int i = 0; i <= m_max[ln]; i++) begin
        rd_idx = HW'(i);
        #1;
        for (int s = 0; s < W; s++)
          chk($sformatf("block %h li %0d slot %0d", pc, i, s), rd_li[s].imm, mk(pc, i, s, m_salt[ln]).imm);
        chk("max", 32'(rd_max), 32'(m_max[ln]));
        chk("next", rd_next, m_nx[ln]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < L; k++) m_v[k] = 1'b0;
    sv_valid = 0; sv_pc = '0; sv_idx = '0; sv_last = 0; sv_next_pc = '0; sv_li = '0;
    lock_v = 0; lock_line = '0; la_pc = '0; pb_pc = '0; rd_line = '0; rd_idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // ---- nothing is valid after reset
    for (int k = 0; k < L; k++) look(32'(4 * k));
    // ---- a block is visible only when complete
    save_li(32'h40, 0, 1'b0, 32'h80, 1);
    look(32'h40);
    save_li(32'h40, 1, 1'b0, 32'h80, 1);
    look(32'h40);
    save_li(32'h40, 2, 1'b1, 32'h80, 1);
    m_v[0] = 1'b1; m_pc[0] = 32'h40; m_max[0] = 2; m_nx[0] = 32'h80; m_salt[0] = 1;
    look(32'h40);
    look(32'h44);
    look(32'h40 + 32'(4 * L));                    // same line, other address
    // ---- conflicting block replaces it
    save_block(32'h40 + 32'(4 * L), 4, 32'h200, 2);
    look(32'h40);
    look(32'h40 + 32'(4 * L));
    // ---- writes held while the line is locked by the engine
    lock_v = 1'b1; lock_line = LW'(3);
    sv_valid = 1'b1; sv_pc = 32'h4c; sv_idx = '0; sv_last = 1'b1; sv_next_pc = 32'h50;
    for (int s = 0; s < W; s++) sv_li[s] = mk(32'h4c, 0, s, 9);
    la_pc = 32'h0;
    #1;
    chk("hold on locked line", 32'(wr_hold), 1);
    @(posedge clk);
    #1;
    sv_valid = 1'b0;
    look(32'h4c);                                 // not written
    // ... or the line being looked up
    lock_line = LW'(5);
    save_block(32'h04, 1, 32'h08, 3);             // line 1 is free to write
    sv_valid = 1'b1; sv_pc = 32'h24; sv_idx = '0; sv_last = 1'b1;
    la_pc = 32'h04;                               // hit on line 1, saving line 1 at 0x24
    #1;
    chk("hold on looked-up line", 32'(wr_hold), 1);
    sv_pc = 32'h08;
    #1;
    chk("no hold elsewhere", 32'(wr_hold), 0);
    sv_valid = 1'b0;
    lock_v = 1'b0;
    #1;
    look(32'h04);
    // ---- random blocks
    for (int n = 0; n < 200; n++) begin
      automatic logic [31:0] pc = 32'($urandom_range(0, 31)) << 2;
      save_block(pc, $urandom_range(1, H), 32'($urandom_range(0, 255)) << 2, n + 10);
      look(32'($urandom_range(0, 31)) << 2);
      look(pc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
