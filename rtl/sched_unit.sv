// sched_unit: the Scheduler Unit of the DTSVLIW machine (the scheduling list).
//
// Every instruction the Primary Processor executes arrives here, one per
// cycle at most, and is packed into a block of long instructions that the
// VLIW Engine can later run in its place. The list has HEIGHT elements; each
// holds one long instruction of WIDTH slots and one candidate instruction.
//
// Per cycle, all in parallel and all judged on the state at the start of the
// cycle:
//  * Insertion. The incoming instruction is placed in the tail element if it
//    has no flow, output or resource (no free slot) dependency on the tail's
//    instructions, as the tail will be after this cycle's moves; otherwise in
//    a new element after the tail. It may share the tail with a branch that
//    precedes it: it then carries that branch's tag. The copy put into a slot is the companion; the candidate
//    remembers its slot. Nops and unconditional branches are not inserted.
//  * Moving up. A candidate in element i moves to i-1 when i is not the head,
//    i-1 has a free slot and the candidate does not read anything written in
//    i-1. If it also writes something written in i-1 (output dependency),
//    writes something read in i (anti dependency) or shares i with a branch
//    (control dependency), it is split: the conflicting result (all results
//    for a control dependency) is renamed to a fresh renaming register and
//    its companion in i becomes a copy instruction that stays there for good.
//  * Installing. A candidate that cannot move is dropped; its companion stays.
//  * Branches are installed where inserted and open a new tag; every later
//    instruction carries the newest tag. Tags count from 0 within a block
//    and are TAGW bits wide, enough for a block made only of branches.
//  * When the incoming instruction needs a new element and the block already
//    has HEIGHT elements, the block is closed and the instruction starts a
//    new one. A closed block is sent to the VLIW Cache one long instruction
//    per cycle (sv_*), oldest element first, while the new block fills the
//    freed elements of the circular list.
//
// Choices of this design: dependencies are judged against the state at the
// start of the cycle (conservative for instructions that leave an element in
// the same cycle); all memory accesses are taken to touch the same location;
// stores are never renamed, so a store that would need a split is installed;
// source operands of later instructions are redirected to a renaming register
// when the instruction that last wrote the architectural register was
// renamed; a block is also closed by flush_req (the machine switching to the
// VLIW Engine); in_ready drops only when a new element is needed and its
// previous block has not yet been saved.
//
// Timing: an instruction accepted in cycle t is in the list at t+1; a closed
// block's first long instruction is offered on sv_* in the same cycle it is
// closed at the earliest; sv_hold delays the saving.
module sched_unit
  import dts_pkg::*;
#(
  parameter int WIDTH  = 8,   // instructions per long instruction
  parameter int HEIGHT = 8    // long instructions per block
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // trace from the Primary Processor
  input  logic                  in_valid,
  input  dinstr_t               in_instr,
  input  logic [XLEN-1:0]       in_pc,
  input  logic [XLEN-1:0]       in_next_pc,
  output logic                  in_ready,
  input  logic                  flush_req,
  // saving blocks to the VLIW Cache
  output logic                  sv_valid,
  output logic [XLEN-1:0]       sv_pc,
  output logic [$clog2(HEIGHT)-1:0] sv_idx,
  output logic                  sv_last,
  output logic [XLEN-1:0]       sv_next_pc,
  output dinstr_t [WIDTH-1:0]   sv_li,
  input  logic                  sv_hold,
  // events, for statistics
  output logic                  ev_ins_tail,
  output logic                  ev_ins_new,
  output logic [HEIGHT-1:0]     ev_move,
  output logic [HEIGHT-1:0]     ev_install,
  output logic [HEIGHT-1:0]     ev_split,
  output logic                  ev_full,
  output logic                  ev_stall,
  output logic                  ev_hold
);

  localparam int EW = $clog2(HEIGHT);
  localparam int SW = $clog2(WIDTH);
  localparam int QW = 8;       // sequence number of an instruction in its block

  typedef enum logic [1:0] {E_FREE, E_CUR, E_SAVE} est_e;

  // ---------------- state ----------------
  dinstr_t [HEIGHT-1:0][WIDTH-1:0] li;
  logic    [HEIGHT-1:0]            cv;            // candidate valid
  dinstr_t [HEIGHT-1:0]            cand;
  logic    [HEIGHT-1:0][SW-1:0]    cslot;
  logic    [HEIGHT-1:0][QW-1:0]    cseq;
  est_e    [HEIGHT-1:0]            est;
  logic    [HEIGHT-1:0]            elast;         // last element of its block
  logic    [HEIGHT-1:0][XLEN-1:0]  epc, enext;    // block address / next address

  logic [EW-1:0]   head, tail, alloc_ptr, save_ptr;
  logic [EW:0]     cur_len;                       // elements in the current block
  logic            blk_open;                      // current block has an address
  logic [XLEN-1:0] blk_pc, blk_next;
  logic [TAGW-1:0] cur_tag;

  // every branch of a block gets its own tag, so the tags must not wrap
  if (WIDTH * HEIGHT >= 2 ** TAGW) begin : g_tag_check
    $error("sched_unit: a block of %0d instructions needs more than %0d tag bits", WIDTH * HEIGHT, TAGW);
  end
  logic [RIDX_W:0] ren_i, ren_f;                  // renaming registers used
  logic [QW-1:0]   seq;
  logic [EW-1:0]   save_idx;
  // last writer of each architectural position and its renamed location
  logic [32:0][QW-1:0] lw_seq;
  logic [32:0]         map_v;
  rid_t [32:0]         map_r;

  // ---------------- helpers ----------------
  function automatic logic wr_i(input dinstr_t d);
    return d.valid && d.vd;
  endfunction
  function automatic logic wr_f(input dinstr_t d);
    return d.valid && d.vf;
  endfunction
  function automatic logic reads(input dinstr_t d, input rid_t r);
    return d.valid && ((d.va && d.srca == r) || (d.vb && d.srcb == r) ||
                       (d.vc && d.srcc == r));
  endfunction
  function automatic logic dep_flow(input dinstr_t c, input dinstr_t s);
    return s.valid && ((wr_i(s) && reads(c, s.dst)) || (wr_f(s) && reads(c, s.dstf)) ||
                       (c.op == OP_LD && s.op == OP_ST));
  endfunction
  function automatic logic dep_out_i(input dinstr_t c, input dinstr_t s);
    return wr_i(c) && wr_i(s) && c.dst == s.dst;
  endfunction
  function automatic logic dep_out_f(input dinstr_t c, input dinstr_t s);
    return wr_f(c) && wr_f(s) && c.dstf == s.dstf;
  endfunction
  function automatic logic dep_anti_i(input dinstr_t c, input dinstr_t s);
    return wr_i(c) && reads(s, c.dst);
  endfunction
  function automatic logic dep_anti_f(input dinstr_t c, input dinstr_t s);
    return wr_f(c) && reads(s, c.dstf);
  endfunction
  function automatic logic [5:0] arch_pos(input rid_t r);
    return (r.kind == RK_ICC) ? 6'd32 : {1'b0, r.idx[4:0]};
  endfunction
  function automatic rid_t remap(input rid_t r, input logic [32:0] mv,
                                 input rid_t [32:0] mr);
    if (r.kind == RK_INT && mv[{1'b0, r.idx[4:0]}]) return mr[{1'b0, r.idx[4:0]}];
    if (r.kind == RK_ICC && mv[32])         return mr[32];
    return r;
  endfunction

  // ---------------- moving up: one decision per element ----------------
  logic    [HEIGHT-1:0]            mv, inst, spl;
  logic    [HEIGHT-1:0]            need_i, need_f;     // renaming wanted
  logic    [HEIGHT-1:0][SW-1:0]    tslot;              // free slot in the element above
  dinstr_t [HEIGHT-1:0]            moved;              // candidate after a possible split
  dinstr_t [HEIGHT-1:0]            copyi;              // what its old slot becomes
  logic    [HEIGHT-1:0]            has_free;
  logic    [HEIGHT-1:0][SW-1:0]    first_free;

  always_comb begin
    for (int e = 0; e < HEIGHT; e++) begin
      has_free[e]   = 1'b0;
      first_free[e] = '0;
      for (int s = WIDTH - 1; s >= 0; s--) begin
        if (!li[e][s].valid) begin
          has_free[e]   = 1'b1;
          first_free[e] = SW'(s);
        end
      end
    end
  end

  // Elements are visited from the head down, like the carry of an adder: a
  // candidate may follow, in the same cycle, a candidate that leaves the
  // element above. If that one is split, the copy left behind is what
  // remains above, and operands it renamed are read from the new name.
  function automatic rid_t fwd(input rid_t r, input dinstr_t x, input dinstr_t xm,
                               input logic ri, input logic rf);
    if (ri && r == x.dst)  return xm.dst;
    if (rf && r == x.dstf) return xm.dstf;
    return r;
  endfunction

  always_comb begin
    logic [RIDX_W:0] ai, af;
    ai = ren_i;
    af = ren_f;
    mv = '0; inst = '0; spl = '0; need_i = '0; need_f = '0;
    tslot = '0; moved = '0; copyi = '0;
    for (int j = 0; j < HEIGHT; j++) begin
      automatic int      k = (int'(head) + j) % HEIGHT;
      automatic int      p = (k == 0) ? HEIGHT - 1 : k - 1;
      automatic logic    pmv = j > 0 && mv[p];    // the candidate above leaves
      automatic dinstr_t c = cand[k];
      automatic dinstr_t cr = cand[k];
      logic flow, oi, of, om, anti_i, anti_f, anti_m, ctrl, can_up, st_blk;
      if (pmv) begin
        cr.srca = fwd(c.srca, cand[p], moved[p], need_i[p], need_f[p]);
        cr.srcb = fwd(c.srcb, cand[p], moved[p], need_i[p], need_f[p]);
        cr.srcc = fwd(c.srcc, cand[p], moved[p], need_i[p], need_f[p]);
      end
      flow = 1'b0; oi = 1'b0; of = 1'b0; om = 1'b0;
      anti_i = 1'b0; anti_f = 1'b0; anti_m = 1'b0; ctrl = 1'b0;
      for (int s = 0; s < WIDTH; s++) begin
        automatic dinstr_t ab = (pmv && SW'(s) == cslot[p]) ? copyi[p] : li[p][s];
        flow |= dep_flow(cr, ab);
        oi   |= dep_out_i(cr, ab);
        of   |= dep_out_f(cr, ab);
        om   |= cr.op == OP_ST && ab.valid && ab.op == OP_ST;
        if (SW'(s) != cslot[k]) begin
          anti_i |= dep_anti_i(c, li[k][s]);
          anti_f |= dep_anti_f(c, li[k][s]);
          anti_m |= c.op == OP_ST && li[k][s].valid && li[k][s].op == OP_LD;
          ctrl   |= li[k][s].valid && li[k][s].op == OP_BR;
        end
      end
      can_up    = cv[k] && est[k] == E_CUR && j > 0 && est[p] == E_CUR && has_free[p];
      st_blk    = c.op == OP_ST && (om || anti_m || ctrl);
      need_i[k] = wr_i(c) && !is_renamed(c.dst)  && (oi || anti_i || ctrl);
      need_f[k] = wr_f(c) && !is_renamed(c.dstf) && (of || anti_f || ctrl);
      mv[k]     = can_up && !flow && !st_blk &&
                  !(need_i[k] && ai >= (RIDX_W+1)'(NREN)) && !(need_f[k] && af >= (RIDX_W+1)'(NREN));
      inst[k]   = cv[k] && est[k] == E_CUR && !mv[k];
      spl[k]    = mv[k] && (need_i[k] || need_f[k]);
      if (!mv[k]) begin
        need_i[k] = 1'b0;
        need_f[k] = 1'b0;
      end
      tslot[k]  = first_free[p];
      moved[k]  = cr;
      copyi[k]  = DINSTR_NONE;
      if (spl[k]) begin
        copyi[k].valid = 1'b1;
        copyi[k].op    = OP_COPY;
        copyi[k].fn    = FN_PASS;
        copyi[k].tag   = c.tag;
        if (need_i[k]) begin
          moved[k].dst.kind = RK_RINT;
          moved[k].dst.idx  = ai[RIDX_W-1:0];
          copyi[k].dst  = c.dst;  copyi[k].vd = 1'b1;
          copyi[k].srca = moved[k].dst; copyi[k].va = 1'b1;
          ai = ai + 1'b1;
        end
        if (need_f[k]) begin
          moved[k].dstf.kind = RK_RFLG;
          moved[k].dstf.idx  = af[RIDX_W-1:0];
          copyi[k].dstf = c.dstf; copyi[k].vf = 1'b1;
          copyi[k].srcb = moved[k].dstf; copyi[k].vb = 1'b1;
          af = af + 1'b1;
        end
      end
    end
  end

  // ---------------- insertion ----------------
  logic    in_take, in_ins, in_tail_ok, in_need_new, alloc_ok, in_full;
  dinstr_t ins, insr;
  logic    saving;

  // The saver may take the head of the current block in the very cycle the
  // block is closed, so a full list can accept the instruction that opens
  // the next block without waiting.
  logic closing, save_cur;
  assign closing  = flush_req || (in_valid && in_full);
  assign save_cur = est[save_ptr] == E_CUR && closing;
  assign saving   = (est[save_ptr] == E_SAVE || save_cur) && !sv_hold;

  // the tail as it will be after this cycle's moves: the incoming
  // instruction is later in the trace than the tail's candidate
  dinstr_t [WIDTH-1:0] tl;
  logic                tl_free;
  logic [SW-1:0]       tl_slot;
  logic                tmv;
  assign tmv = cv[tail] && mv[tail];

  always_comb begin
    logic dep;
    tl_free = 1'b0;
    tl_slot = '0;
    for (int s = WIDTH - 1; s >= 0; s--) begin
      tl[s] = (tmv && SW'(s) == cslot[tail]) ? copyi[tail] : li[tail][s];
      if (!tl[s].valid) begin
        tl_free = 1'b1;
        tl_slot = SW'(s);
      end
    end
    insr = in_instr;
    insr.srca = remap(in_instr.srca, map_v, map_r);
    insr.srcb = remap(in_instr.srcb, map_v, map_r);
    insr.srcc = remap(in_instr.srcc, map_v, map_r);
    if (tmv) begin
      insr.srca = fwd(insr.srca, cand[tail], moved[tail], need_i[tail], need_f[tail]);
      insr.srcb = fwd(insr.srcb, cand[tail], moved[tail], need_i[tail], need_f[tail]);
      insr.srcc = fwd(insr.srcc, cand[tail], moved[tail], need_i[tail], need_f[tail]);
    end
    in_ins   = in_valid && in_instr.valid && in_instr.op != OP_NOP;
    dep = !tl_free;
    for (int s = 0; s < WIDTH; s++) begin
      dep |= dep_flow(insr, tl[s]) || dep_out_i(insr, tl[s]) ||
             dep_out_f(insr, tl[s]) ||
             (insr.op == OP_ST && tl[s].valid && tl[s].op == OP_ST);
    end
    in_tail_ok  = cur_len != '0 && !dep;
    in_need_new = in_ins && !in_tail_ok;
    in_full     = in_need_new && cur_len == (EW+1)'(HEIGHT);
  end

  always_comb begin
    alloc_ok    = est[alloc_ptr] == E_FREE || (saving && save_ptr == alloc_ptr);
    in_ready    = !(in_need_new && !alloc_ok);
    in_take     = in_valid && in_ready;
    // a block-opening instruction sees no renaming of the closed block
    ins = in_full ? in_instr : insr;
    if (in_instr.op == OP_BR) ins.tag = in_full ? TAGW'(1) : cur_tag + TAGW'(1);
    else                      ins.tag = in_full ? TAGW'(0) : cur_tag;
  end

  // ---------------- saving ----------------
  assign sv_valid   = saving;
  assign sv_pc      = save_cur ? blk_pc : epc[save_ptr];
  assign sv_next_pc = save_cur ? (flush_req ? blk_next : in_pc) : enext[save_ptr];
  assign sv_idx     = save_idx;
  assign sv_last    = save_cur ? save_ptr == tail : elast[save_ptr];
  assign sv_li      = li[save_ptr];

  // ---------------- events ----------------
  assign ev_ins_tail = in_take && in_ins && in_tail_ok;
  assign ev_ins_new  = in_take && in_need_new;
  assign ev_full     = in_take && in_full;
  assign ev_stall    = in_valid && !in_ready;
  assign ev_hold     = (est[save_ptr] == E_SAVE || save_cur) && sv_hold;
  assign ev_move     = flush_req || ev_full ? '0 : mv;
  assign ev_install  = flush_req || ev_full ? '0 : inst;
  assign ev_split    = flush_req || ev_full ? '0 : spl;

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < HEIGHT; k++) li[k] <= '0;
      cv        <= '0;
      cand      <= '0;
      cslot     <= '0;
      cseq      <= '0;
      est       <= {HEIGHT{E_FREE}};
      elast     <= '0;
      epc       <= '0;
      enext     <= '0;
      head      <= '0;
      tail      <= '0;
      alloc_ptr <= '0;
      save_ptr  <= '0;
      save_idx  <= '0;
      cur_len   <= '0;
      blk_open  <= 1'b0;
      blk_pc    <= '0;
      blk_next  <= '0;
      cur_tag   <= '0;
      ren_i     <= '0;
      ren_f     <= '0;
      seq       <= '0;
      lw_seq    <= '0;
      map_v     <= '0;
      map_r     <= '0;
    end else begin
      logic close;
      // saving one element of a closed block
      if (saving) begin
        est[save_ptr] <= E_FREE;
        save_ptr      <= save_ptr + 1'b1;
        save_idx      <= sv_last ? '0 : save_idx + 1'b1;
      end

      close = flush_req || (in_take && in_full);

      if (close) begin
        // freeze the current block and hand it to the saver
        for (int e = 0; e < HEIGHT; e++) begin
          if (est[e] == E_CUR && !(saving && EW'(e) == save_ptr)) begin
            est[e]   <= E_SAVE;
            cv[e]    <= 1'b0;
            epc[e]   <= blk_pc;
            enext[e] <= flush_req ? blk_next : in_pc;
            elast[e] <= EW'(e) == tail;
          end
        end
        cur_len  <= '0;
        blk_open <= 1'b0;
        cur_tag  <= '0;
        ren_i    <= '0;
        ren_f    <= '0;
        seq      <= '0;
        map_v    <= '0;
      end else begin
        // candidates move up or are installed
        for (int k = 0; k < HEIGHT; k++) begin
          automatic int p = (k == 0) ? HEIGHT - 1 : k - 1;
          if (mv[k]) begin
            li[k][cslot[k]]    <= copyi[k];
            li[p][tslot[k]]    <= moved[k];
            cand[p]            <= moved[k];
            cslot[p]           <= tslot[k];
            cseq[p]            <= cseq[k];
            cv[p]              <= 1'b1;
            if (need_i[k] && lw_seq[arch_pos(cand[k].dst)] == cseq[k]) begin
              map_v[arch_pos(cand[k].dst)] <= 1'b1;
              map_r[arch_pos(cand[k].dst)] <= moved[k].dst;
            end
            if (need_f[k] && lw_seq[32] == cseq[k]) begin
              map_v[32] <= 1'b1;
              map_r[32] <= moved[k].dstf;
            end
          end
        end
        // every candidate moves or is installed; an element keeps a candidate
        // only if the one below moved into it
        for (int k = 0; k < HEIGHT; k++) cv[k] <= mv[(k == HEIGHT - 1) ? 0 : k + 1];
        ren_i <= ren_i + (RIDX_W+1)'($countones(need_i & mv));
        ren_f <= ren_f + (RIDX_W+1)'($countones(need_f & mv));
      end

      // the trace instruction
      if (in_take) begin
        if (!blk_open || close && !flush_req) begin
          blk_pc   <= in_pc;
          blk_open <= 1'b1;
        end
        blk_next <= in_next_pc;
        if (in_ins) begin
          automatic logic [EW-1:0] e;
          automatic logic [SW-1:0] sl;
          if (in_need_new) begin
            e  = alloc_ptr;
            sl = '0;
            for (int s = 0; s < WIDTH; s++) li[e][s] <= DINSTR_NONE;
            est[e]    <= E_CUR;
            alloc_ptr <= alloc_ptr + 1'b1;
            tail      <= e;
            if (in_full || cur_len == '0) begin
              head    <= e;
              cur_len <= (EW+1)'(1);
            end else begin
              cur_len <= cur_len + 1'b1;
            end
          end else begin
            e  = tail;
            sl = tl_slot;
          end
          li[e][sl] <= ins;
          cand[e]   <= ins;
          cslot[e]  <= sl;
          cseq[e]   <= in_full ? '0 : seq;
          cv[e]     <= ins.op != OP_BR;
          seq       <= in_full ? QW'(1) : seq + 1'b1;
          if (ins.op == OP_BR) cur_tag <= (in_full ? TAGW'(0) : cur_tag) + TAGW'(1);
          if (wr_i(ins)) begin
            lw_seq[arch_pos(ins.dst)] <= in_full ? '0 : seq;
            map_v[arch_pos(ins.dst)]  <= 1'b0;
          end
          if (wr_f(ins)) begin
            lw_seq[32] <= in_full ? '0 : seq;
            map_v[32]  <= 1'b0;
          end
        end
      end
    end
  end

  // one trace instruction and one block closing at a time
  assert property (@(posedge clk) disable iff (!rst_n) !(flush_req && in_valid));

endmodule
