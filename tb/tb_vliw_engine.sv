// tb_vliw_engine: self-checking test of the VLIW Engine.
//
// Three blocks of long instructions, built by hand as the Scheduler Unit
// would build them, are written into a VLIW Cache (4 wide, 4 high, 16
// lines); a register file and a data memory complete the machine around the
// engine. The engine is started at the first block and must:
//  * run block A (0x100) and chain into block B (0x144) with no bubble;
//  * use results of the previous long instruction (register bypass, and a
//    load that reads a store still in write back);
//  * write a renamed result and move it to its architectural register with a
//    copy instruction;
//  * in block B, find a branch going the other way than recorded: the slots
//    of that long instruction with the branch's tag or a later one are not
//    written, the long instruction behind it is dropped, and block C
//    (0x188, the branch's exit) follows after exactly one bubble;
//  * miss on block C's next address (0x300), drain and report done with it.
// Final registers, condition codes and memory are compared with values
// worked out by hand below; so are the long-instruction timing and the
// event counts. A second start at block B alone checks a restart.
module tb_vliw_engine;
  import dts_pkg::*;

  localparam int W = 4, H = 4, L = 16;
  localparam int LW = $clog2(L), HW = $clog2(H);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // engine <-> cache
  logic                start, done, la_hit, lock_v;
  logic [XLEN-1:0]     start_pc, done_pc, la_pc, rd_next;
  logic [LW-1:0]       la_line, rd_line, lock_line;
  logic [HW-1:0]       rd_idx, rd_max;
  dinstr_t [W-1:0]     rd_li;
  // engine <-> register file and memory
  rid_t [3*W-1:0]            rf_ra;
  logic [3*W-1:0][XLEN-1:0]  rf_rdata;
  logic [2*W-1:0]            rf_we;
  rid_t [2*W-1:0]            rf_wa;
  logic [2*W-1:0][XLEN-1:0]  rf_wdata;
  logic [W-1:0][XLEN-1:0]    dm_ra, dm_wa, dm_rdata, dm_wdata;
  logic [W-1:0]              dm_we;
  logic                      ev_li, ev_block, ev_br_exit, ev_chain;
  logic [$clog2(W+1)-1:0]    ev_ops;
  // save port, driven here
  logic                sv_valid, sv_last, wr_hold;
  logic [XLEN-1:0]     sv_pc, sv_next_pc;
  logic [HW-1:0]       sv_idx;
  dinstr_t [W-1:0]     sv_li;
  logic [31:0][XLEN-1:0] arch_r;
  logic [3:0]          arch_icc;
  logic                pb_hit;

  vliw_engine #(.WIDTH(W), .HEIGHT(H), .LINES(L)) dut (
    .clk, .rst_n, .start, .start_pc, .done, .done_pc,
    .la_pc, .la_hit, .la_line, .rd_line, .rd_idx, .rd_li, .rd_max, .rd_next,
    .lock_v, .lock_line,
    .rf_ra, .rf_rdata, .rf_we, .rf_wa, .rf_wdata,
    .dm_ra, .dm_wa, .dm_rdata, .dm_we, .dm_wdata,
    .ev_li, .ev_ops, .ev_block, .ev_br_exit, .ev_chain
  );

  vliw_cache #(.WIDTH(W), .HEIGHT(H), .LINES(L)) u_vc (
    .clk, .rst_n, .sv_valid, .sv_pc, .sv_idx, .sv_last, .sv_next_pc, .sv_li, .wr_hold,
    .lock_v, .lock_line, .la_pc, .la_hit, .la_line, .pb_pc(32'h0), .pb_hit,
    .rd_line, .rd_idx, .rd_li, .rd_max, .rd_next
  );

  dts_regfile #(.NR(3 * W), .NW(2 * W)) u_rf (
    .clk, .rst_n, .ra(rf_ra), .rdata(rf_rdata), .we(rf_we), .wa(rf_wa), .wdata(rf_wdata),
    .arch_r, .arch_icc
  );

  data_mem #(.NP(W), .WORDS(64)) u_dm (
    .clk, .rst_n, .raddr(dm_ra), .waddr(dm_wa), .rdata(dm_rdata), .we(dm_we), .wdata(dm_wdata)
  );

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
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

  // ---------------- decoded-instruction builders ----------------
  function automatic rid_t ri(input int n);
    return rid_t'({RK_INT, 8'(n)});
  endfunction
  function automatic rid_t rn(input int n);
    return rid_t'({RK_RINT, 8'(n)});
  endfunction
  function automatic dinstr_t alu_i(input fn_e fn, input rid_t d, input rid_t a, input int imm,
                                    input logic cc, input int tag);
    dinstr_t x = DINSTR_NONE;
    x.valid = 1'b1; x.op = OP_ALU; x.fn = fn; x.use_imm = 1'b1; x.imm = 32'(imm);
    x.srca = a; x.va = 1'b1;
    x.dst = d; x.vd = !(d.kind == RK_INT && d.idx == 0);
    x.setcc = cc; x.vf = cc; x.dstf = rid_t'({RK_ICC, 8'd0});
    x.tag = TAGW'(tag);
    return x;
  endfunction
  function automatic dinstr_t alu_r(input fn_e fn, input rid_t d, input rid_t a, input rid_t b, input int tag);
    dinstr_t x = alu_i(fn, d, a, 0, 1'b0, tag);
    x.use_imm = 1'b0; x.srcb = b; x.vb = 1'b1;
    return x;
  endfunction
  function automatic dinstr_t st(input rid_t data, input int addr, input int tag);
    dinstr_t x = DINSTR_NONE;
    x.valid = 1'b1; x.op = OP_ST; x.use_imm = 1'b1; x.imm = 32'(addr);
    x.srca = ri(0); x.va = 1'b1; x.srcc = data; x.vc = 1'b1; x.tag = TAGW'(tag);
    return x;
  endfunction
  function automatic dinstr_t ld(input rid_t d, input int addr, input int tag);
    dinstr_t x = DINSTR_NONE;
    x.valid = 1'b1; x.op = OP_LD; x.use_imm = 1'b1; x.imm = 32'(addr);
    x.srca = ri(0); x.va = 1'b1; x.dst = d; x.vd = 1'b1; x.tag = TAGW'(tag);
    return x;
  endfunction
  function automatic dinstr_t br(input logic [3:0] cond, input logic taken, input int exitpc, input int tag);
    dinstr_t x = DINSTR_NONE;
    x.valid = 1'b1; x.op = OP_BR; x.cond = cond; x.taken = taken; x.exit_pc = 32'(exitpc);
    x.srca = rid_t'({RK_ICC, 8'd0}); x.va = 1'b1; x.tag = TAGW'(tag);
    return x;
  endfunction
  function automatic dinstr_t cp(input rid_t d, input rid_t s, input int tag);
    dinstr_t x = DINSTR_NONE;
    x.valid = 1'b1; x.op = OP_COPY; x.srca = s; x.va = 1'b1; x.dst = d; x.vd = 1'b1; x.tag = TAGW'(tag);
    return x;
  endfunction

  dinstr_t blk [3][H][W];
  int      blk_h [3];
  logic [31:0] blk_pc [3], blk_nx [3];

  task automatic build();
    for (int b = 0; b < 3; b++)
      for (int i = 0; i < H; i++)
        for (int s = 0; s < W; s++) blk[b][i][s] = DINSTR_NONE;
    // block A
    blk_pc[0] = 32'h100; blk_nx[0] = 32'h144; blk_h[0] = 4;
    blk[0][0][0] = alu_i(FN_OR, ri(1), ri(0), 5, 1'b0, 0);
    blk[0][0][1] = alu_i(FN_OR, ri(2), ri(0), 7, 1'b0, 0);
    blk[0][1][0] = alu_r(FN_ADD, ri(3), ri(1), ri(2), 0);            // bypass
    blk[0][1][1] = alu_i(FN_SUB, ri(0), ri(1), 5, 1'b1, 0);          // cmp r1, 5
    blk[0][2][0] = br(4'd1, 1'b1, 'h188, 1);                         // be, taken as built
    blk[0][2][1] = alu_i(FN_ADD, ri(4), ri(3), 1, 1'b0, 0);
    blk[0][2][2] = alu_i(FN_ADD, rn(0), ri(3), 100, 1'b0, 1);        // renamed
    blk[0][2][3] = st(ri(3), 8, 0);
    blk[0][3][0] = cp(ri(6), rn(0), 1);                              // copy
    blk[0][3][1] = ld(ri(5), 8, 0);                                  // store in write back
    // block B
    blk_pc[1] = 32'h144; blk_nx[1] = 32'h300; blk_h[1] = 3;
    blk[1][0][0] = alu_i(FN_SUB, ri(0), ri(1), 6, 1'b1, 0);          // cmp r1, 6
    blk[1][0][1] = alu_i(FN_ADD, ri(7), ri(7), 1, 1'b0, 0);
    blk[1][1][0] = alu_i(FN_ADD, ri(8), ri(0), 9, 1'b0, 1);          // after the branch
    blk[1][1][1] = br(4'd1, 1'b1, 'h188, 1);                         // be: now not taken
    blk[1][1][2] = alu_i(FN_ADD, ri(9), ri(0), 3, 1'b0, 0);          // before the branch
    blk[1][2][0] = alu_i(FN_OR, ri(10), ri(0), 1, 1'b0, 1);          // never runs
    // block C
    blk_pc[2] = 32'h188; blk_nx[2] = 32'h300; blk_h[2] = 2;
    blk[2][0][0] = alu_i(FN_OR, ri(11), ri(0), 'h55, 1'b0, 0);
    blk[2][1][0] = alu_r(FN_ADD, ri(12), ri(11), ri(9), 0);
  endtask

  task automatic save_all();
    for (int b = 0; b < 3; b++)
      for (int i = 0; i < blk_h[b]; i++) begin
        sv_valid = 1'b1; sv_pc = blk_pc[b]; sv_idx = HW'(i); sv_last = i == blk_h[b] - 1;
        sv_next_pc = blk_nx[b];
        for (int s = 0; s < W; s++) sv_li[s] = blk[b][i][s];
        @(negedge clk);
      end
    sv_valid = 1'b0;
  endtask

  // ---------------- observation ----------------
  int cyc, n_li, n_ops, n_block, n_brx, n_chain, n_done, first_li, last_li, gaps;
  logic [31:0] got_done_pc;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ev_li) begin
      if (n_li == 0) first_li = cyc;
      else if (cyc != last_li + 1) gaps += cyc - last_li - 1;
      last_li = cyc;
      n_li++;
    end
    n_ops   += int'(ev_ops);
    n_block += int'(ev_block);
    n_brx   += int'(ev_br_exit);
    n_chain += int'(ev_chain);
    if (done) begin n_done++; got_done_pc = done_pc; end
  end

  task automatic clear_counts();
    n_li = 0; n_ops = 0; n_block = 0; n_brx = 0; n_chain = 0; n_done = 0; gaps = 0;
    first_li = 0; last_li = 0;
  endtask

  task automatic go(input logic [31:0] pc);
    int t = 0;
    start = 1'b1; start_pc = pc;
    @(negedge clk);
    start = 1'b0;
    while (n_done == 0 && t < 200) begin @(negedge clk); t++; end
    @(negedge clk);
  endtask

  initial begin
    cyc = 0;
    clear_counts();
    start = 0; start_pc = '0;
    sv_valid = 0; sv_pc = '0; sv_idx = '0; sv_last = 0; sv_next_pc = '0; sv_li = '0;
    build();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    save_all();
    clear_counts();
    go(32'h100);
    chk("done once", 32'(n_done), 1);
    chk("done pc", got_done_pc, 32'h300);
    chk("r1", arch_r[1], 5);
    chk("r2", arch_r[2], 7);
    chk("r3 (bypass)", arch_r[3], 12);
    chk("r4", arch_r[4], 13);
    chk("r5 (load after store)", arch_r[5], 12);
    chk("r6 (renamed + copy)", arch_r[6], 112);
    chk("r7", arch_r[7], 1);
    chk("r8 (squashed, tag of the branch)", arch_r[8], 0);
    chk("r9 (kept, earlier tag)", arch_r[9], 3);
    chk("r10 (dropped long instruction)", arch_r[10], 0);
    chk("r11", arch_r[11], 'h55);
    chk("r12", arch_r[12], 'h58);
    chk("icc after cmp 5, 6", 32'(arch_icc), 32'b1001);
    chk("memory", u_dm.mem[2], 12);
    chk("long instructions", 32'(n_li), 8);
    chk("one bubble in all (branch exit only)", 32'(gaps), 1);
    chk("span", 32'(last_li - first_li), 8);
    chk("ops written back", 32'(n_ops), 14);
    chk("blocks entered", 32'(n_block), 3);
    chk("chained", 32'(n_chain), 1);
    chk("branch exits", 32'(n_brx), 1);
    // second run, from block B: r7 counts again, the exit is taken again
    clear_counts();
    go(32'h144);
    chk("restart done pc", got_done_pc, 32'h300);
    chk("restart r7", arch_r[7], 2);
    chk("restart long instructions", 32'(n_li), 4);
    chk("restart branch exits", 32'(n_brx), 1);
    // a start on a missing address drains at once and hands it back
    clear_counts();
    go(32'h200);
    chk("miss done pc", got_done_pc, 32'h200);
    chk("miss long instructions", 32'(n_li), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
