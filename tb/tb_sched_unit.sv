// tb_sched_unit: self-checking testbench of the Scheduler Unit.
//
// Part 1 feeds the vector-sum loop used to illustrate the algorithm to a
// list three instructions wide and four long instructions deep, and checks
// the steps that example is known for: instructions 1 and 2 share the first
// long instruction, instruction 3 opens a new one (it reads r8) and is
// installed on the fourth cycle, instruction 7 is split (a copy to r10 is
// left behind), and the second instance of instruction 5 carries the tag of
// the loop branch.
//
// Part 2 feeds a long random trace (ALU operations, condition codes, loads,
// stores, conditional branches) to a 4x4 list with random gaps, random
// block closing and random save stalls, collects every block sent to the
// cache, and runs each block in a model of the VLIW Engine written here:
// once with every branch going the recorded way, comparing the state with
// the plain sequential execution of the block's part of the trace, and once
// with one branch going the other way, comparing with the sequential
// execution up to that branch. Blocks must also never exceed 4x4 and the
// number of saved instructions must account for the whole trace.
module tb_sched_unit;
  import dts_pkg::*;

  localparam int W1 = 3, H1 = 4;
  localparam int W2 = 4, H2 = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- instruction builders ----------------
  function automatic dinstr_t mk_alu(input fn_e fn, input int rs1, input int rs2, input logic imm,
                                     input logic [31:0] k, input int rd, input logic cc);
    dinstr_t d = DINSTR_NONE;
    d.valid = 1'b1; d.op = OP_ALU; d.fn = fn; d.setcc = cc;
    d.srca = rid_int(5'(rs1)); d.va = 1'b1;
    d.srcb = rid_int(5'(rs2)); d.vb = !imm; d.use_imm = imm; d.imm = k;
    d.dst = rid_int(5'(rd)); d.vd = rd != 0;
    d.dstf = rid_icc(); d.vf = cc;
    return d;
  endfunction
  function automatic dinstr_t mk_ld(input int rs1, input int rs2, input int rd);
    dinstr_t d = mk_alu(FN_ADD, rs1, rs2, 1'b0, 0, rd, 1'b0);
    d.op = OP_LD;
    return d;
  endfunction
  function automatic dinstr_t mk_st(input int rs1, input logic [31:0] k, input int rsd);
    dinstr_t d = mk_alu(FN_ADD, rs1, 0, 1'b1, k, 0, 1'b0);
    d.op = OP_ST; d.srcc = rid_int(5'(rsd)); d.vc = 1'b1;
    return d;
  endfunction
  function automatic dinstr_t mk_br(input logic [3:0] cond, input logic tk, input logic [31:0] ex);
    dinstr_t d = DINSTR_NONE;
    d.valid = 1'b1; d.op = OP_BR; d.cond = cond; d.taken = tk; d.exit_pc = ex;
    d.srca = rid_icc(); d.va = 1'b1;
    return d;
  endfunction
  function automatic dinstr_t mk_nop();
    dinstr_t d = DINSTR_NONE;
    d.valid = 1'b1; d.op = OP_NOP;
    return d;
  endfunction

  // ================= part 1: the example loop, 3x4 =================
  logic    a_valid, a_ready, a_flush;
  dinstr_t a_instr;
  logic [31:0] a_pc, a_npc;
  logic    a_sv_valid, a_sv_last;
  logic [31:0] a_sv_pc, a_sv_next;
  logic [1:0]  a_sv_idx;
  dinstr_t [W1-1:0] a_sv_li;
  logic a_ev_tail, a_ev_new, a_ev_full, a_ev_stall, a_ev_hold;
  logic [H1-1:0] a_ev_move, a_ev_inst, a_ev_split;

  sched_unit #(.WIDTH(W1), .HEIGHT(H1)) dut_a (
    .clk, .rst_n, .in_valid(a_valid), .in_instr(a_instr), .in_pc(a_pc), .in_next_pc(a_npc),
    .in_ready(a_ready), .flush_req(a_flush),
    .sv_valid(a_sv_valid), .sv_pc(a_sv_pc), .sv_idx(a_sv_idx), .sv_last(a_sv_last),
    .sv_next_pc(a_sv_next), .sv_li(a_sv_li), .sv_hold(1'b0),
    .ev_ins_tail(a_ev_tail), .ev_ins_new(a_ev_new), .ev_move(a_ev_move),
    .ev_install(a_ev_inst), .ev_split(a_ev_split), .ev_full(a_ev_full), .ev_stall(a_ev_stall),
    .ev_hold(a_ev_hold)
  );

  dinstr_t a_blk [H1][W1];
  int      a_blk_n;
  bit      a_blk_done = 0;
  logic [31:0] a_blk_pc, a_blk_next;
  int      a_splits;
  always @(posedge clk) if (rst_n) begin
    if (a_sv_valid && !a_blk_done) begin
      for (int s = 0; s < W1; s++) a_blk[a_sv_idx][s] = a_sv_li[s];
      a_blk_n = int'(a_sv_idx) + 1;
      if (a_sv_last) begin
        a_blk_done = 1;
        a_blk_pc = a_sv_pc;
        a_blk_next = a_sv_next;
      end
    end
    a_splits += $countones(a_ev_split);
  end

  task automatic part1();
    dinstr_t tr [12];
    logic [31:0] pcs [12];
    bit tail_ev [12], new_ev [12], inst_ev [12];
    int n;
    // 1: or r0,0,r9  2: sethi hi(56),r8  3: or r8,8,r11  4: or r0,0,r10
    // 5: ld [r10+r11],r8  6: add r9,r8,r9  7: add r10,4,r10
    // 8: subcc r10,39,r0  9: ble loop  10: nop  then 5 again
    tr[0] = mk_alu(FN_OR, 0, 0, 1, 0, 9, 0);
    tr[1] = mk_alu(FN_PASS, 0, 0, 1, 32'h0000_0400 & 32'hffff_fc00, 8, 0);
    tr[2] = mk_alu(FN_OR, 8, 0, 1, 8, 11, 0);
    tr[3] = mk_alu(FN_OR, 0, 0, 1, 0, 10, 0);
    tr[4] = mk_ld(10, 11, 8);
    tr[5] = mk_alu(FN_ADD, 9, 8, 0, 0, 9, 0);
    tr[6] = mk_alu(FN_ADD, 10, 0, 1, 4, 10, 0);
    tr[7] = mk_alu(FN_SUB, 10, 0, 1, 39, 0, 1);
    tr[8] = mk_br(4'b0010, 1'b1, 32'h24);
    tr[9] = mk_nop();
    tr[10] = mk_ld(10, 11, 8);
    n = 11;
    for (int i = 0; i < n; i++) pcs[i] = 32'(4 * i);
    pcs[10] = 32'h10;
    a_splits = 0;
    a_blk_n = 0;
    for (int i = 0; i < n; i++) begin
      a_valid = 1'b1; a_instr = tr[i]; a_pc = pcs[i];
      a_npc = (i + 1 < n) ? pcs[i+1] : 32'h14;
      #1;
      tail_ev[i] = a_ev_tail; new_ev[i] = a_ev_new; inst_ev[i] = a_ev_inst[1];
      check(a_ready, "example: scheduler accepts every instruction");
      @(posedge clk);
      @(negedge clk);
    end
    a_valid = 1'b0;
    a_flush = 1'b1;
    @(posedge clk); @(negedge clk);
    a_flush = 1'b0;
    repeat (8) @(posedge clk);
    @(negedge clk);
    check(new_ev[0] && tail_ev[1], "example: instruction 1 opens the list, 2 joins it");
    check(new_ev[2], "example: instruction 3 needs a new long instruction (reads r8)");
    check(inst_ev[3], "example: instruction 3 installed in the fourth cycle");
    check(a_splits >= 1, "example: a split happened");
    begin
      bit copy_r10 = 0, add_ren = 0, ld2_tag = 0, br_ok = 0, has1 = 0, has2 = 0;
      int first_el1 = -1, first_el2 = -1;
      for (int e = 0; e < a_blk_n; e++)
        for (int s = 0; s < W1; s++) begin
          dinstr_t d = a_blk[e][s];
          if (!d.valid) continue;
          if (d.op == OP_COPY && d.vd && d.dst == rid_int(10)) copy_r10 = 1;
          if (d.op == OP_ALU && d.fn == FN_ADD && d.use_imm && d.imm == 4 && d.dst.kind == RK_RINT)
            add_ren = 1;
          if (d.op == OP_LD && d.tag == TAGW'(1)) ld2_tag = 1;
          if (d.op == OP_BR && d.tag == TAGW'(1)) br_ok = 1;
          if (d.op == OP_ALU && d.dst == rid_int(9) && d.fn == FN_OR) begin has1 = 1; first_el1 = e; end
          if (d.op == OP_ALU && d.dst == rid_int(8)) begin has2 = 1; first_el2 = e; end
        end
      check(a_blk_n >= 3 && a_blk_n <= H1, "example: one block of 3..4 long instructions saved");
      check(has1 && has2 && first_el1 == 0 && first_el2 == 0,
            "example: instructions 1 and 2 in the first long instruction");
      check(copy_r10, "example: instruction 7 split, copy to r10 left behind");
      check(add_ren, "example: instruction 7 moved up writing a renaming register");
      check(br_ok, "example: the loop branch establishes tag 1");
      check(ld2_tag, "example: second instance of instruction 5 carries tag 1");
      check(a_blk_done && a_blk_pc == 32'h0 && a_blk_next == 32'h14, "example: block address and next address");
    end
  endtask

  // ================= part 2: random traces, 4x4 =================
  logic    b_valid, b_ready, b_flush, b_hold;
  dinstr_t b_instr;
  logic [31:0] b_pc, b_npc;
  logic    b_sv_valid, b_sv_last;
  logic [31:0] b_sv_pc, b_sv_next;
  logic [1:0]  b_sv_idx;
  dinstr_t [W2-1:0] b_sv_li;
  logic b_ev_tail, b_ev_new, b_ev_full, b_ev_stall, b_ev_hold;
  logic [H2-1:0] b_ev_move, b_ev_inst, b_ev_split;

  sched_unit #(.WIDTH(W2), .HEIGHT(H2)) dut_b (
    .clk, .rst_n, .in_valid(b_valid), .in_instr(b_instr), .in_pc(b_pc), .in_next_pc(b_npc),
    .in_ready(b_ready), .flush_req(b_flush),
    .sv_valid(b_sv_valid), .sv_pc(b_sv_pc), .sv_idx(b_sv_idx), .sv_last(b_sv_last),
    .sv_next_pc(b_sv_next), .sv_li(b_sv_li), .sv_hold(b_hold),
    .ev_ins_tail(b_ev_tail), .ev_ins_new(b_ev_new), .ev_move(b_ev_move),
    .ev_install(b_ev_inst), .ev_split(b_ev_split), .ev_full(b_ev_full), .ev_stall(b_ev_stall),
    .ev_hold(b_ev_hold)
  );

  localparam int NTR = 3000;
  dinstr_t trace [NTR];
  int      seg_start [$];        // trace index where each block starts
  int      blk_cnt = 0;
  int      n_stall = 0, n_split = 0, n_full = 0, n_move = 0;

  // sequential reference state
  typedef struct {
    logic [31:0] r [32];
    logic [3:0]  icc;
    logic [31:0] m [8];
  } st_t;

  function automatic logic [35:0] ref_alu(input fn_e fn, input logic [31:0] a, input logic [31:0] b);
    logic [32:0] w;
    logic [31:0] r;
    logic v, c;
    v = 0; c = 0;
    case (fn)
      FN_ADD: begin w = a + b; r = w[31:0]; c = w[32]; v = (a[31] ~^ b[31]) & (a[31] ^ r[31]); end
      FN_SUB: begin w = {1'b0, a} - {1'b0, b}; r = w[31:0]; c = a < b; v = (a[31] ^ b[31]) & (a[31] ^ r[31]); end
      FN_AND: r = a & b;
      FN_OR:  r = a | b;
      FN_XOR: r = a ^ b;
      default: r = b;
    endcase
    return {r, r[31], r == 0, v, c};
  endfunction

  function automatic int maddr(input logic [31:0] a);
    return int'(a[4:2]);
  endfunction

  // one instruction, sequential semantics (architectural names only)
  function automatic void seq_step(inout st_t s, input dinstr_t d);
    logic [31:0] a, b, c;
    logic [35:0] res;
    a = (d.srca.idx[4:0] == 0) ? 0 : s.r[d.srca.idx[4:0]];
    b = d.use_imm ? d.imm : ((d.srcb.idx[4:0] == 0) ? 0 : s.r[d.srcb.idx[4:0]]);
    c = (d.srcc.idx[4:0] == 0) ? 0 : s.r[d.srcc.idx[4:0]];
    case (d.op)
      OP_ALU: begin
        res = ref_alu(d.fn, a, b);
        if (d.vd) s.r[d.dst.idx[4:0]] = res[35:4];
        if (d.vf) s.icc = res[3:0];
      end
      OP_LD: if (d.vd) s.r[d.dst.idx[4:0]] = s.m[maddr(a + b)];
      OP_ST: s.m[maddr(a + b)] = c;
      default: ;
    endcase
  endfunction

  // block execution, long instruction by long instruction; kill_tag = 0 means
  // every branch goes the recorded way, otherwise branch kill_tag goes the
  // other way
  function automatic void blk_run(inout st_t s, input dinstr_t blk [H2][W2], input int n,
                                  input int kill_tag);
    logic [31:0] ri [256];
    logic [3:0]  rfl [256];
    for (int i = 0; i < 256; i++) begin ri[i] = 0; rfl[i] = 0; end
    for (int e = 0; e < n; e++) begin
      logic [31:0] wv [2*W2];
      rid_t        wa [2*W2];
      bit          we [2*W2];
      bit          stw [W2];
      logic [31:0] sa [W2], sd [W2];
      bit          exit_now = 0;
      for (int sl = 0; sl < W2; sl++) if (blk[e][sl].valid && blk[e][sl].op == OP_BR &&
                                          kill_tag != 0 && int'(blk[e][sl].tag) == kill_tag)
        exit_now = 1;
      for (int sl = 0; sl < W2; sl++) begin
        dinstr_t d = blk[e][sl];
        logic [31:0] a, b, c;
        logic [35:0] res;
        we[2*sl] = 0; we[2*sl+1] = 0; stw[sl] = 0;
        wa[2*sl] = d.dst; wa[2*sl+1] = d.dstf;
        wv[2*sl] = 0; wv[2*sl+1] = 0;
        if (!d.valid) continue;
        if (exit_now && int'(d.tag) >= kill_tag) continue;
        a = rd(s, ri, rfl, d.srca);
        b = d.use_imm ? d.imm : rd(s, ri, rfl, d.srcb);
        c = rd(s, ri, rfl, d.srcc);
        case (d.op)
          OP_ALU: begin
            res = ref_alu(d.fn, a, b);
            we[2*sl] = d.vd; wv[2*sl] = res[35:4];
            we[2*sl+1] = d.vf; wv[2*sl+1] = {28'd0, res[3:0]};
          end
          OP_LD: begin we[2*sl] = d.vd; wv[2*sl] = s.m[maddr(a + b)]; end
          OP_ST: begin stw[sl] = 1; sa[sl] = a + b; sd[sl] = c; end
          OP_COPY: begin
            we[2*sl] = d.vd; wv[2*sl] = a;
            we[2*sl+1] = d.vf; wv[2*sl+1] = {28'd0, b[3:0]};
          end
          default: ;
        endcase
      end
      for (int q = 0; q < 2*W2; q++) if (we[q]) begin
        case (wa[q].kind)
          RK_INT:  if (wa[q].idx[4:0] != 0) s.r[wa[q].idx[4:0]] = wv[q];
          RK_ICC:  s.icc = wv[q][3:0];
          RK_RINT: ri[wa[q].idx] = wv[q];
          default: rfl[wa[q].idx] = wv[q][3:0];
        endcase
      end
      for (int sl = 0; sl < W2; sl++) if (stw[sl]) s.m[maddr(sa[sl])] = sd[sl];
      if (exit_now) return;
    end
  endfunction

  function automatic logic [31:0] rd(input st_t s, input logic [31:0] ri [256],
                                     input logic [3:0] rfl [256], input rid_t r);
    case (r.kind)
      RK_INT:  return (r.idx[4:0] == 0) ? 0 : s.r[r.idx[4:0]];
      RK_ICC:  return {28'd0, s.icc};
      RK_RINT: return ri[r.idx];
      default: return {28'd0, rfl[r.idx]};
    endcase
  endfunction

  function automatic bit same(input st_t x, input st_t y);
    for (int i = 0; i < 32; i++) if (x.r[i] !== y.r[i]) return 0;
    for (int i = 0; i < 8; i++) if (x.m[i] !== y.m[i]) return 0;
    return x.icc === y.icc;
  endfunction

  function automatic st_t rnd_state();
    st_t s;
    for (int i = 0; i < 32; i++) s.r[i] = (i == 0) ? 0 : $urandom;
    for (int i = 0; i < 8; i++) s.m[i] = $urandom;
    s.icc = 4'($urandom);
    return s;
  endfunction

  // collecting and checking blocks
  dinstr_t cur_blk [H2][W2];
  int      saved_instrs = 0, copies = 0;
  int      blocks_checked = 0, kill_checks = 0;

  task automatic check_block(input int n, input int first, input int last);
    st_t s0, s_seq, s_blk;
    int  nbr = 0;
    for (int e = 0; e < n; e++) for (int sl = 0; sl < W2; sl++)
      if (cur_blk[e][sl].valid && cur_blk[e][sl].op == OP_BR) nbr++;
    // all branches the recorded way
    s0 = rnd_state();
    s_seq = s0;
    for (int i = first; i < last; i++) seq_step(s_seq, trace[i]);
    s_blk = s0;
    blk_run(s_blk, cur_blk, n, 0);
    check(same(s_seq, s_blk), $sformatf("block %0d (trace %0d..%0d) matches sequential run",
                                        blocks_checked, first, last - 1));
    blocks_checked++;
    // one branch the other way
    if (nbr > 0) begin
      automatic int t = 1 + int'($urandom_range(nbr - 1, 0));
      automatic int seen = 0, stop = last;
      for (int i = first; i < last; i++)
        if (trace[i].op == OP_BR) begin
          seen++;
          if (seen == t) begin stop = i; break; end
        end
      s_seq = s0;
      for (int i = first; i < stop; i++) seq_step(s_seq, trace[i]);
      s_blk = s0;
      blk_run(s_blk, cur_blk, n, t);
      check(same(s_seq, s_blk), $sformatf("block %0d leaving at branch %0d matches", blocks_checked - 1, t));
      kill_checks++;
    end
  endtask

  int b_fed = 0;      // trace instructions accepted
  int b_blocks_in[$]; // [start,end) pairs
  always @(posedge clk) if (rst_n) begin
    if (b_sv_valid) begin
      for (int sl = 0; sl < W2; sl++) begin
        cur_blk[b_sv_idx][sl] = b_sv_li[sl];
        if (b_sv_li[sl].valid && b_sv_li[sl].op != OP_COPY) saved_instrs++;
        if (b_sv_li[sl].valid && b_sv_li[sl].op == OP_COPY) copies++;
      end
      if (b_sv_last) begin
        int first, last;
        first = seg_start.pop_front();
        last  = (seg_start.size() > 0) ? seg_start[0] : b_fed;
        check(int'(b_sv_idx) < H2, "block height within the list");
        check_block(int'(b_sv_idx) + 1, first, last);
        blk_cnt++;
      end
    end
    if (b_valid && b_ready) begin
      if (b_ev_full) seg_start.push_back(b_fed);
      b_fed++;
    end
    n_stall += b_ev_stall;
    n_full  += b_ev_full;
    n_split += $countones(b_ev_split);
    n_move  += $countones(b_ev_move);
  end

  function automatic dinstr_t rnd_instr();
    int k = $urandom_range(99, 0);
    int r1 = $urandom_range(7, 0), r2 = $urandom_range(7, 0), rd = $urandom_range(7, 1);
    fn_e fns [5] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR};
    if (k < 55) return mk_alu(fns[$urandom_range(4, 0)], r1, r2, $urandom_range(1, 0),
                              $urandom_range(15, 0), rd, $urandom_range(3, 0) == 0);
    if (k < 65) return mk_alu(FN_SUB, r1, r2, 1'b0, 0, 0, 1'b1);
    if (k < 75) return mk_ld(r1, r2, rd);
    if (k < 83) return mk_st(r1, $urandom_range(15, 0), r2);
    return mk_br(4'($urandom_range(15, 1)), $urandom_range(1, 0), 32'h100);
  endfunction

  task automatic part2();
    int i = 0;
    int since_close = 0;
    for (int t = 0; t < NTR; t++) trace[t] = rnd_instr();
    b_valid = 1'b0; b_flush = 1'b0; b_hold = 1'b0;
    while (i < NTR) begin
      @(negedge clk);
      b_hold = $urandom_range(9, 0) == 0;
      if (since_close > 0 && $urandom_range(30, 0) == 0) begin
        b_valid = 1'b0;
        b_flush = 1'b1;
        seg_start.push_back(b_fed);
        since_close = 0;
        @(posedge clk);
        @(negedge clk);
        b_flush = 1'b0;
      end
      if ($urandom_range(4, 0) == 0) begin
        b_valid = 1'b0;
        @(posedge clk);
        continue;
      end
      b_valid = 1'b1;
      b_instr = trace[i];
      b_pc = 32'(4 * i);
      b_npc = 32'(4 * i + 4);
      if (b_fed == 0 && seg_start.size() == 0) seg_start.push_back(0);
      #1;
      if (b_ready) begin i++; since_close++; end
      @(posedge clk);
    end
    @(negedge clk);
    b_valid = 1'b0;
    b_flush = 1'b1;
    seg_start.push_back(b_fed);
    @(negedge clk);
    b_flush = 1'b0;
    b_hold = 1'b0;
    repeat (3 * H2 + 4) @(posedge clk);
    @(negedge clk);
    void'(seg_start.pop_back());
    check(saved_instrs == NTR, $sformatf("every trace instruction saved once (%0d of %0d)", saved_instrs, NTR));
    check(kill_checks > 10, "branch exits exercised");
    check(n_full > 10 && n_split > 10 && n_move > 10 && n_stall > 0,
          $sformatf("mechanisms exercised: full=%0d split=%0d move=%0d stall=%0d",
                    n_full, n_split, n_move, n_stall));
    $display("random: %0d blocks, %0d copies, %0d ipb-cycles full=%0d splits=%0d moves=%0d stalls=%0d",
             blk_cnt, copies, NTR, n_full, n_split, n_move, n_stall);
  endtask

  initial begin
    a_valid = 1'b0; a_flush = 1'b0; a_instr = DINSTR_NONE; a_pc = 0; a_npc = 0;
    b_valid = 1'b0; b_flush = 1'b0; b_hold = 1'b0; b_instr = DINSTR_NONE; b_pc = 0; b_npc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    part1();
    part2();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

