// tb_dtsvliw_top: end-to-end test of the whole DTSVLIW machine at its
// default size (8x8 blocks, 8192-line VLIW Cache).
//
// A small SPARC program is assembled here into the instruction memory: it
// fills an array with a loop, then sums it in a second loop that also counts
// the elements with bit 1 set through a data-dependent branch, and ends in a
// `ba .` self-loop. The loops make the machine schedule blocks, save them,
// find them again, switch to the VLIW Engine and back, chain blocks, and
// leave blocks through branches that go the other way than when the block
// was built. An instruction-level model of the same subset, written here
// independently of the RTL, runs the same program; when the machine reaches
// the final self-loop its architectural registers and the array in data
// memory must match the model.
//
// Every mechanism is counted (taken-branch bubbles, insertions into the tail
// and into a new long instruction, moves, installs, splits, full blocks,
// saves, block entries, chains, branch exits, switches in both directions);
// each one that never happened is a failure. Saver holds and scheduler
// stalls are reported only. The machine must also run the program in fewer
// cycles than the Primary Processor alone needs for it.
module tb_dtsvliw_top;
  import dts_pkg::*;

  localparam int N        = 48;         // array elements
  localparam int BASE     = 'h100;      // array address
  localparam int MAXCYC   = 40000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  prog_we = 1'b0;
  logic [XLEN-1:0]       prog_addr = '0;
  logic [31:0]           prog_data = '0;
  logic [31:0][XLEN-1:0] arch_r;
  logic [3:0]            arch_icc;
  logic                  vliw_mode, pp_e_valid;
  logic [XLEN-1:0]       pp_e_pc;
  logic ev_pp_exec, ev_pp_taken, ev_illegal, ev_ins_tail, ev_ins_new;
  logic [7:0] ev_move, ev_install, ev_split;
  logic ev_block_full, ev_sched_stall, ev_save, ev_save_hold;
  logic ev_vliw_li, ev_vliw_block, ev_vliw_br_exit, ev_vliw_chain, ev_to_vliw, ev_to_primary;
  logic [3:0] ev_vliw_ops;

  dtsvliw_top dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .arch_r, .arch_icc, .vliw_mode, .pp_e_valid, .pp_e_pc,
    .ev_pp_exec, .ev_pp_taken, .ev_illegal, .ev_ins_tail, .ev_ins_new,
    .ev_move, .ev_install, .ev_split, .ev_block_full, .ev_sched_stall,
    .ev_save, .ev_save_hold, .ev_vliw_li, .ev_vliw_ops, .ev_vliw_block,
    .ev_vliw_br_exit, .ev_vliw_chain, .ev_to_vliw, .ev_to_primary
  );

  int checks = 0, failures = 0;
  int cycles = 0;

  initial begin
    repeat (MAXCYC + 2000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- assembler ----------------
  localparam logic [5:0] ADD = 6'o00, AND = 6'o01, OR = 6'o02, XOR = 6'o03, SUB = 6'o04,
                         ADDCC = 6'o20, ANDCC = 6'o21, SUBCC = 6'o24, SLL = 6'o45;
  localparam logic [3:0] BE = 4'd1, BL = 4'd3, BA = 4'd8;

  function automatic logic [31:0] ri(input logic [5:0] op3, input int rd, input int rs1, input int imm);
    return {2'b10, 5'(rd), op3, 5'(rs1), 1'b1, 13'(imm)};
  endfunction
  function automatic logic [31:0] rr(input logic [5:0] op3, input int rd, input int rs1, input int rs2);
    return {2'b10, 5'(rd), op3, 5'(rs1), 1'b0, 8'd0, 5'(rs2)};
  endfunction
  function automatic logic [31:0] ldr(input int rd, input int rs1, input int rs2);
    return {2'b11, 5'(rd), 6'o00, 5'(rs1), 1'b0, 8'd0, 5'(rs2)};
  endfunction
  function automatic logic [31:0] str(input int rd, input int rs1, input int rs2);
    return {2'b11, 5'(rd), 6'o04, 5'(rs1), 1'b0, 8'd0, 5'(rs2)};
  endfunction
  function automatic logic [31:0] bcc(input logic [3:0] c, input int from, input int to);
    return {2'b00, 1'b0, c, 3'b010, 22'((to - from) / 4)};
  endfunction

  logic [31:0] prog [0:63];
  int          plen;
  int          end_pc;

  task automatic assemble();
    int p = 0;
    prog[p++] = ri(OR, 1, 0, 0);            // 00 i = 0
    prog[p++] = ri(OR, 2, 0, 0);            // 04 sum = 0
    prog[p++] = ri(OR, 3, 0, BASE);         // 08 base
    prog[p++] = ri(OR, 6, 0, 0);            // 0c count = 0
    prog[p++] = ri(SLL, 4, 1, 2);           // 10 init: off = i << 2
    prog[p++] = rr(ADD, 5, 1, 1);           // 14 v = 2i
    prog[p++] = rr(ADD, 5, 5, 1);           // 18 v = 3i
    prog[p++] = ri(ADD, 5, 5, 1);           // 1c v = 3i + 1
    prog[p++] = str(5, 3, 4);               // 20 a[i] = v
    prog[p++] = ri(ADD, 1, 1, 1);           // 24 i++
    prog[p++] = ri(SUBCC, 0, 1, N);         // 28
    prog[p++] = bcc(BL, 'h2c, 'h10);        // 2c bl init
    prog[p++] = ri(OR, 1, 0, 0);            // 30 i = 0
    prog[p++] = ri(SLL, 4, 1, 2);           // 34 loop: off = i << 2
    prog[p++] = ldr(5, 3, 4);               // 38 v = a[i]
    prog[p++] = rr(ADD, 2, 2, 5);           // 3c sum += v
    prog[p++] = ri(ANDCC, 0, 5, 2);         // 40 test bit 1
    prog[p++] = bcc(BE, 'h44, 'h4c);        // 44 be skip
    prog[p++] = ri(ADD, 6, 6, 1);           // 48 count++
    prog[p++] = ri(ADD, 1, 1, 1);           // 4c skip: i++
    prog[p++] = ri(SUBCC, 0, 1, N);         // 50
    prog[p++] = bcc(BL, 'h54, 'h34);        // 54 bl loop
    prog[p++] = rr(XOR, 7, 2, 6);           // 58 r7 = sum ^ count
    prog[p++] = rr(SUB, 8, 6, 2);           // 5c r8 = count - sum
    prog[p++] = bcc(BA, 'h60, 'h60);        // 60 ba .
    plen   = p;
    end_pc = 'h60;
  endtask

  // ---------------- reference model ----------------
  logic [31:0] m_r [0:31];
  logic [3:0]  m_icc;
  logic [31:0] m_mem [0:1023];
  int          m_steps;

  task automatic model_run();
    int pc = 0;
    m_steps = 0;
    for (int k = 0; k < 32; k++) m_r[k] = '0;
    for (int k = 0; k < 1024; k++) m_mem[k] = '0;
    m_icc = '0;
    while (pc != end_pc) begin
      logic [31:0] w, a, b, r;
      logic [32:0] s;
      logic [5:0]  op3;
      int          rd;
      logic        n, z, v, c, t;
      w  = prog[pc / 4];
      rd = int'(w[29:25]);
      m_steps++;
      if (w[31:30] == 2'b00) begin
        {n, z, v, c} = m_icc;
        case (w[27:25])
          3'd1:    t = z;
          3'd3:    t = n ^ v;
          default: t = 1'b0;
        endcase
        if (w[28]) t = !t;
        if (t) pc = pc + 4 * int'($signed(w[21:0]));
        else   pc = pc + 4;
        continue;
      end
      op3 = w[24:19];
      a   = m_r[w[18:14]];
      b   = w[13] ? {{19{w[12]}}, w[12:0]} : m_r[w[4:0]];
      if (w[31:30] == 2'b11) begin
        if (op3 == 6'o00) begin
          if (rd != 0) m_r[rd] = m_mem[((a + b) >> 2) % 1024];
        end else m_mem[((a + b) >> 2) % 1024] = m_r[rd];
      end else begin
        s = '0; v = 1'b0;
        case (op3[3:0])
          4'o00: begin s = {1'b0, a} + {1'b0, b}; r = s[31:0];
                       v = (a[31] == b[31]) && (r[31] != a[31]); end
          4'o01: r = a & b;
          4'o02: r = a | b;
          4'o03: r = a ^ b;
          4'o04: begin s = {1'b0, a} - {1'b0, b}; r = s[31:0];
                       v = (a[31] != b[31]) && (r[31] != a[31]); end
          default: r = a << b[4:0];
        endcase
        if (rd != 0) m_r[rd] = r;
        if (op3[4] && op3 != SLL) m_icc = {r[31], r == 0, v, s[32]};
      end
      pc = pc + 4;
    end
  endtask

  // ---------------- event counters ----------------
  int c_taken, c_tail, c_new, c_move, c_install, c_split, c_full, c_stall, c_save, c_hold;
  int c_li, c_ops, c_block, c_brx, c_chain, c_tov, c_top, c_pp, c_ill;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    c_pp      += int'(ev_pp_exec);
    c_taken   += int'(ev_pp_taken);
    c_ill     += int'(ev_illegal);
    c_tail    += int'(ev_ins_tail);
    c_new     += int'(ev_ins_new);
    c_move    += $countones(ev_move);
    c_install += $countones(ev_install);
    c_split   += $countones(ev_split);
    c_full    += int'(ev_block_full);
    c_stall   += int'(ev_sched_stall);
    c_save    += int'(ev_save);
    c_hold    += int'(ev_save_hold);
    c_li      += int'(ev_vliw_li);
    c_ops     += int'(ev_vliw_ops);
    c_block   += int'(ev_vliw_block);
    c_brx     += int'(ev_vliw_br_exit);
    c_chain   += int'(ev_vliw_chain);
    c_tov     += int'(ev_to_vliw);
    c_top     += int'(ev_to_primary);
  end

  task automatic expect_cnt(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end
  endtask

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s = %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    int t_end;
    assemble();
    model_run();
    // load the program while in reset
    repeat (2) @(negedge clk);
    for (int k = 0; k < plen; k++) begin
      prog_we = 1'b1; prog_addr = 32'(4 * k); prog_data = prog[k];
      @(negedge clk);
    end
    prog_we = 1'b0;
    rst_n = 1'b1;
    // run until the Primary Processor reaches the final self-loop
    t_end = 0;
    while (t_end == 0 && cycles < MAXCYC) begin
      @(negedge clk);
      if (pp_e_valid && pp_e_pc == 32'(end_pc)) t_end = cycles;
    end
    checks++;
    if (t_end == 0) begin
      failures++;
      $display("FAIL: program did not reach its end in %0d cycles", MAXCYC);
    end
    repeat (4) @(negedge clk);
    for (int k = 1; k < 32; k++) expect_eq($sformatf("r%0d", k), arch_r[k], m_r[k]);
    expect_eq("icc", {28'd0, arch_icc}, {28'd0, m_icc});
    for (int k = 0; k < N; k++)
      expect_eq($sformatf("mem[%0d]", k), dut.u_dmem.mem[BASE / 4 + k], m_mem[BASE / 4 + k]);
    // the Primary Processor alone takes one cycle per instruction plus two per taken branch
    checks++;
    if (t_end >= m_steps) begin
      failures++;
      $display("FAIL: %0d cycles, not faster than %0d instructions one per cycle", t_end, m_steps);
    end
    expect_eq("illegal instructions", 32'(c_ill), 32'd0);
    expect_cnt("taken-branch bubble", c_taken);
    expect_cnt("insert into tail", c_tail);
    expect_cnt("insert into new long instruction", c_new);
    expect_cnt("move", c_move);
    expect_cnt("install", c_install);
    expect_cnt("split", c_split);
    expect_cnt("block full", c_full);
    expect_cnt("save", c_save);
    expect_cnt("VLIW long instruction", c_li);
    expect_cnt("VLIW block entry", c_block);
    expect_cnt("branch exit", c_brx);
    expect_cnt("block chaining", c_chain);
    expect_cnt("switch to VLIW Engine", c_tov);
    expect_cnt("switch to Primary Processor", c_top);
    $display("program: %0d instructions, machine: %0d cycles (%0d on the Primary Processor, %0d long instructions, %0d ops)",
             m_steps, t_end, c_pp, c_li, c_ops);
    $display("events: taken=%0d tail=%0d new=%0d move=%0d install=%0d split=%0d full=%0d save=%0d hold=%0d stall=%0d",
             c_taken, c_tail, c_new, c_move, c_install, c_split, c_full, c_save, c_hold, c_stall);
    $display("events: block=%0d chain=%0d brexit=%0d to_vliw=%0d to_primary=%0d",
             c_block, c_chain, c_brx, c_tov, c_top);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
