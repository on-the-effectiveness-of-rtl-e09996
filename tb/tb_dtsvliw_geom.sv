// tb_dtsvliw_geom: the vector-sum loop used to illustrate the scheduling
// algorithm, run on the three untyped block geometries that were evaluated:
// 4x4, 8x8 and 16x16, each with a VLIW Cache of the same 3072-Kbyte
// capacity (32768, 8192 and 2048 lines of 6-byte decoded instructions).
//
// The program first fills an array of X words with a short loop, then sums
// it with the loop of the example:
//     or r0,0,r9 ; sethi hi(a),r8 ; or r8,lo(a),r11 ; or r0,0,r10
//   loop: ld [r10+r11],r8 ; add r9,r8,r9 ; add r10,4,r10 ;
//         subcc r10,4*X-1,r0 ; ble loop
// (without the delay-slot nop: this machine has no delay slots), and ends in
// a `ba .` self-loop. The three machines run side by side from the same
// reset. For each one the sum, the index and the condition codes must equal
// the values computed here, the VLIW Engine must have run long instructions,
// and the whole run must take fewer cycles than the instruction count. The
// instructions per cycle of each geometry are printed.
module tb_dtsvliw_geom;
  import dts_pkg::*;

  localparam int X      = 64;           // array elements
  localparam int A      = 'h400;        // array address
  localparam int MAXCYC = 20000;
  localparam int G      = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            prog_we = 1'b0;
  logic [XLEN-1:0] prog_addr = '0;
  logic [31:0]     prog_data = '0;

  logic [G-1:0][31:0][XLEN-1:0] arch_r;
  logic [G-1:0][3:0]            arch_icc;
  logic [G-1:0]                 pp_e_valid, ev_vliw_li, ev_pp_exec;
  logic [G-1:0][XLEN-1:0]       pp_e_pc;

  dtsvliw_top #(.WIDTH(4), .HEIGHT(4), .LINES(32768)) g4 (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .arch_r(arch_r[0]), .arch_icc(arch_icc[0]), .vliw_mode(), .pp_e_valid(pp_e_valid[0]), .pp_e_pc(pp_e_pc[0]),
    .ev_pp_exec(ev_pp_exec[0]), .ev_pp_taken(), .ev_illegal(), .ev_ins_tail(), .ev_ins_new(),
    .ev_move(), .ev_install(), .ev_split(), .ev_block_full(), .ev_sched_stall(),
    .ev_save(), .ev_save_hold(), .ev_vliw_li(ev_vliw_li[0]), .ev_vliw_ops(), .ev_vliw_block(),
    .ev_vliw_br_exit(), .ev_vliw_chain(), .ev_to_vliw(), .ev_to_primary()
  );

  dtsvliw_top #(.WIDTH(8), .HEIGHT(8), .LINES(8192)) g8 (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .arch_r(arch_r[1]), .arch_icc(arch_icc[1]), .vliw_mode(), .pp_e_valid(pp_e_valid[1]), .pp_e_pc(pp_e_pc[1]),
    .ev_pp_exec(ev_pp_exec[1]), .ev_pp_taken(), .ev_illegal(), .ev_ins_tail(), .ev_ins_new(),
    .ev_move(), .ev_install(), .ev_split(), .ev_block_full(), .ev_sched_stall(),
    .ev_save(), .ev_save_hold(), .ev_vliw_li(ev_vliw_li[1]), .ev_vliw_ops(), .ev_vliw_block(),
    .ev_vliw_br_exit(), .ev_vliw_chain(), .ev_to_vliw(), .ev_to_primary()
  );

  dtsvliw_top #(.WIDTH(16), .HEIGHT(16), .LINES(2048)) g16 (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .arch_r(arch_r[2]), .arch_icc(arch_icc[2]), .vliw_mode(), .pp_e_valid(pp_e_valid[2]), .pp_e_pc(pp_e_pc[2]),
    .ev_pp_exec(ev_pp_exec[2]), .ev_pp_taken(), .ev_illegal(), .ev_ins_tail(), .ev_ins_new(),
    .ev_move(), .ev_install(), .ev_split(), .ev_block_full(), .ev_sched_stall(),
    .ev_save(), .ev_save_hold(), .ev_vliw_li(ev_vliw_li[2]), .ev_vliw_ops(), .ev_vliw_block(),
    .ev_vliw_br_exit(), .ev_vliw_chain(), .ev_to_vliw(), .ev_to_primary()
  );

  int checks = 0, failures = 0;
  int cycles = 0;

  initial begin
    repeat (MAXCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program ----------------
  localparam logic [5:0] ADD = 6'o00, OR = 6'o02, SUBCC = 6'o24, SLL = 6'o45;
  function automatic logic [31:0] ri(input logic [5:0] op3, input int rd, input int rs1, input int imm);
    return {2'b10, 5'(rd), op3, 5'(rs1), 1'b1, 13'(imm)};
  endfunction
  function automatic logic [31:0] rr(input logic [5:0] op3, input int rd, input int rs1, input int rs2);
    return {2'b10, 5'(rd), op3, 5'(rs1), 1'b0, 8'd0, 5'(rs2)};
  endfunction
  function automatic logic [31:0] ldst(input logic st, input int rd, input int rs1, input int rs2);
    return {2'b11, 5'(rd), st ? 6'o04 : 6'o00, 5'(rs1), 1'b0, 8'd0, 5'(rs2)};
  endfunction
  function automatic logic [31:0] bcc(input logic [3:0] c, input int from, input int to);
    return {2'b00, 1'b0, c, 3'b010, 22'((to - from) / 4)};
  endfunction

  logic [31:0] prog [0:31];
  int plen;
  localparam int END_PC = 'h48;

  task automatic assemble();
    int p = 0;
    // fill: a[k] = 5k + 3
    prog[p++] = ri(OR, 1, 0, 0);                 // 00 k4 = 0
    prog[p++] = ri(OR, 2, 0, 3);                 // 04 v = 3
    prog[p++] = ri(OR, 3, 0, A);                 // 08 base
    prog[p++] = ldst(1'b1, 2, 3, 1);             // 0c fill: st v, [base + k4]
    prog[p++] = ri(ADD, 2, 2, 5);                // 10 v += 5
    prog[p++] = ri(ADD, 1, 1, 4);                // 14 k4 += 4
    prog[p++] = ri(SUBCC, 0, 1, 4 * X - 1);      // 18
    prog[p++] = bcc(4'd2, 'h1c, 'h0c);           // 1c ble fill
    // the example loop
    prog[p++] = ri(OR, 9, 0, 0);                 // 20 sum = 0
    prog[p++] = {2'b00, 5'd8, 3'b100, 22'(A >> 10)}; // 24 sethi hi(a), r8
    prog[p++] = ri(OR, 11, 8, A & 'h3ff);        // 28 r11 = a
    prog[p++] = ri(OR, 10, 0, 0);                // 2c r10 = 4i = 0
    prog[p++] = ldst(1'b0, 8, 10, 11);           // 30 loop: ld [r10 + r11], r8
    prog[p++] = rr(ADD, 9, 9, 8);                // 34 sum += r8
    prog[p++] = ri(ADD, 10, 10, 4);              // 38 r10 += 4
    prog[p++] = ri(SUBCC, 0, 10, 4 * X - 1);     // 3c
    prog[p++] = bcc(4'd2, 'h40, 'h30);           // 40 ble loop
    prog[p++] = ri(OR, 0, 0, 0);                 // 44 nop
    prog[p++] = bcc(4'd8, 'h48, 'h48);           // 48 ba .
    plen = p;
  endtask

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  int t_end [G];
  int n_li [G];
  int n_pp [G];
  always @(posedge clk) if (rst_n) begin
    cycles++;
    for (int g = 0; g < G; g++) begin
      n_li[g] += int'(ev_vliw_li[g]);
      n_pp[g] += int'(ev_pp_exec[g]);
      if (t_end[g] == 0 && pp_e_valid[g] && pp_e_pc[g] == 32'(END_PC)) t_end[g] = cycles;
    end
  end

  initial begin
    string names [G] = '{"4x4", "8x8", "16x16"};
    int n_instr, exp_sum;
    for (int g = 0; g < G; g++) begin t_end[g] = 0; n_li[g] = 0; n_pp[g] = 0; end
    assemble();
    // work out the expected results: fill loop 5 per element, 4 + 5 per element in the sum loop
    exp_sum = 0;
    for (int k = 0; k < X; k++) exp_sum += 5 * k + 3;
    n_instr = 3 + 5 * X + 4 + 5 * X + 1;
    repeat (2) @(negedge clk);
    for (int k = 0; k < plen; k++) begin
      prog_we = 1'b1; prog_addr = 32'(4 * k); prog_data = prog[k];
      @(negedge clk);
    end
    prog_we = 1'b0;
    rst_n = 1'b1;
    while ((t_end[0] == 0 || t_end[1] == 0 || t_end[2] == 0) && cycles < MAXCYC) @(negedge clk);
    repeat (4) @(negedge clk);
    for (int g = 0; g < G; g++) begin
      chk({names[g], ": reached the end"}, 32'(t_end[g] != 0), 1);
      chk({names[g], ": sum (r9)"}, arch_r[g][9], 32'(exp_sum));
      chk({names[g], ": index (r10)"}, arch_r[g][10], 32'(4 * X));
      chk({names[g], ": array address (r11)"}, arch_r[g][11], 32'(A));
      chk({names[g], ": last element (r8)"}, arch_r[g][8], 32'(5 * (X - 1) + 3));
      chk({names[g], ": fill index (r1)"}, arch_r[g][1], 32'(4 * X));
      // subcc 4X - (4X-1) = 1: N=0 Z=0 V=0 C=0
      chk({names[g], ": icc"}, 32'(arch_icc[g]), 0);
      checks++;
      if (n_li[g] == 0) begin failures++; $display("FAIL %s: the VLIW Engine never ran", names[g]); end
      checks++;
      if (t_end[g] >= n_instr) begin
        failures++;
        $display("FAIL %s: %0d cycles for %0d instructions", names[g], t_end[g], n_instr);
      end
      $display("%s: %0d instructions in %0d cycles (IPC %0d.%02d), %0d on the Primary Processor, %0d long instructions",
               names[g], n_instr, t_end[g], n_instr / t_end[g], (100 * n_instr / t_end[g]) % 100, n_pp[g], n_li[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
