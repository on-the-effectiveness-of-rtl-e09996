// tb_primary_proc: self-checking test of the Primary Processor.
//
// The pipeline runs a small SPARC program (a Fibonacci loop that stores,
// reloads and folds each value, then sethi, shifts and a data-dependent
// branch) from a memory kept here, with the register file and data memory
// modelled here too. An instruction-level model of the subset, written
// independently of the RTL, gives the expected final registers, memory and
// the expected instruction stream. The test runs the program three times:
//  1. with the Scheduler Unit always ready: every completed instruction must
//     follow the previous one after one cycle, or after three when the
//     previous one was a taken branch (the 2-cycle bubble);
//  2. with the Scheduler Unit randomly not ready (stalls);
//  3. with a halt in the middle followed by a restart at the halted address,
//     as the Fetch Unit does around a VLIW run.
// In each run the stream handed to the Scheduler Unit (address, next
// address, direction and exit of branches) must equal the model's trace and
// the final state must equal the model's.
module tb_primary_proc;
  import dts_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 restart, halt;
  logic [XLEN-1:0]      restart_pc, im_addr, dm_addr, dm_rdata, dm_wdata;
  logic [31:0]          im_data;
  rid_t [2:0]           rf_ra;
  logic [2:0][XLEN-1:0] rf_rdata;
  logic [1:0]           rf_we;
  rid_t [1:0]           rf_wa;
  logic [1:0][XLEN-1:0] rf_wdata;
  logic                 dm_we, sc_valid, sc_ready, e_valid, ev_exec, ev_taken, ev_illegal;
  dinstr_t              sc_instr;
  logic [XLEN-1:0]      sc_pc, sc_next_pc, e_pc;

  primary_proc dut (
    .clk, .rst_n, .restart, .restart_pc, .halt, .im_addr, .im_data,
    .rf_ra, .rf_rdata, .rf_we, .rf_wa, .rf_wdata,
    .dm_addr, .dm_rdata, .dm_we, .dm_wdata,
    .sc_valid, .sc_instr, .sc_pc, .sc_next_pc, .sc_ready,
    .e_valid, .e_pc, .ev_exec, .ev_taken, .ev_illegal
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

  // ---------------- program ----------------
  localparam logic [5:0] ADD = 6'o00, OR = 6'o02, XOR = 6'o03, SUB = 6'o04,
                         ANDCC = 6'o21, SUBCC = 6'o24, SRL = 6'o46, SRA = 6'o47;
  function automatic logic [31:0] ri(input logic [5:0] op3, input int rd, input int rs1, input int imm);
    return {2'b10, 5'(rd), op3, 5'(rs1), 1'b1, 13'(imm)};
  endfunction
  function automatic logic [31:0] rr(input logic [5:0] op3, input int rd, input int rs1, input int rs2);
    return {2'b10, 5'(rd), op3, 5'(rs1), 1'b0, 8'd0, 5'(rs2)};
  endfunction
  function automatic logic [31:0] mem_i(input logic st, input int rd, input int rs1, input int imm);
    return {2'b11, 5'(rd), st ? 6'o04 : 6'o00, 5'(rs1), 1'b1, 13'(imm)};
  endfunction
  function automatic logic [31:0] bcc(input logic [3:0] c, input int from, input int to);
    return {2'b00, 1'b0, c, 3'b010, 22'((to - from) / 4)};
  endfunction

  localparam int END_PC = 'h4c;
  logic [31:0] prog [0:31];

  initial begin
    for (int k = 0; k < 32; k++) prog[k] = '0;
    prog['h00/4] = ri(OR, 1, 0, 10);
    prog['h04/4] = ri(OR, 2, 0, 0);
    prog['h08/4] = ri(OR, 3, 0, 1);
    prog['h0c/4] = ri(OR, 4, 0, 'h80);
    prog['h10/4] = rr(ADD, 5, 2, 3);          // loop: t = a + b
    prog['h14/4] = ri(OR, 2, 3, 0);           // a = b
    prog['h18/4] = ri(OR, 3, 5, 0);           // b = t
    prog['h1c/4] = mem_i(1'b1, 5, 4, 0);      // st t, [p]
    prog['h20/4] = ri(ADD, 4, 4, 4);          // p += 4
    prog['h24/4] = mem_i(1'b0, 6, 4, -4);     // ld [p - 4]
    prog['h28/4] = rr(XOR, 7, 7, 6);          // fold
    prog['h2c/4] = ri(SUBCC, 1, 1, 1);        // n--
    prog['h30/4] = bcc(4'd9, 'h30, 'h10);     // bne loop
    prog['h34/4] = {2'b00, 5'd8, 3'b100, 22'h2af37b};   // sethi
    prog['h38/4] = ri(SRA, 9, 8, 4);
    prog['h3c/4] = ri(SRL, 10, 8, 4);
    prog['h40/4] = ri(ANDCC, 0, 7, 1);
    prog['h44/4] = bcc(4'd1, 'h44, 'h4c);     // be end
    prog['h48/4] = rr(SUB, 11, 0, 7);
    prog['h4c/4] = bcc(4'd8, 'h4c, 'h4c);     // end: ba .
  end

  // ---------------- reference model ----------------
  logic [31:0] m_r [32];
  logic [3:0]  m_icc;
  logic [31:0] m_mem [64];
  int          t_n;
  logic [31:0] t_pc [256], t_next [256];
  logic        t_br [256], t_taken [256];

  task automatic model_run();
    int pc = 0;
    t_n = 0;
    for (int k = 0; k < 32; k++) m_r[k] = '0;
    for (int k = 0; k < 64; k++) m_mem[k] = '0;
    m_icc = '0;
    while (pc != END_PC) begin
      logic [31:0] w, a, b, r;
      logic [32:0] s;
      logic        n, z, v, c, t;
      int          rd, nx;
      w = prog[pc / 4]; rd = int'(w[29:25]);
      nx = pc + 4;
      t_pc[t_n] = pc; t_br[t_n] = 1'b0; t_taken[t_n] = 1'b0;
      if (w[31:30] == 2'b00 && w[24:22] == 3'b100) begin
        if (rd != 0) m_r[rd] = {w[21:0], 10'd0};
      end else if (w[31:30] == 2'b00) begin
        {n, z, v, c} = m_icc;
        case (w[27:25])
          3'd0: t = 1'b0;
          3'd1: t = z;
          default: t = n ^ v;
        endcase
        if (w[28]) t = !t;
        t_br[t_n] = w[28:25] != 4'd8 && w[28:25] != 4'd0;
        t_taken[t_n] = t;
        if (t) nx = pc + 4 * int'($signed(w[21:0]));
      end else begin
        a = m_r[w[18:14]];
        b = w[13] ? {{19{w[12]}}, w[12:0]} : m_r[w[4:0]];
        if (w[31:30] == 2'b11) begin
          if (w[24:19] == 6'o00) begin if (rd != 0) m_r[rd] = m_mem[((a + b) >> 2) % 64]; end
          else m_mem[((a + b) >> 2) % 64] = m_r[rd];
        end else begin
          s = '0; v = 1'b0;
          case (w[24:19])
            6'o00, 6'o20: begin s = {1'b0, a} + {1'b0, b}; r = s[31:0];
                               v = (a[31] == b[31]) && (r[31] != a[31]); end
            6'o04, 6'o24: begin s = {1'b0, a} - {1'b0, b}; r = s[31:0];
                               v = (a[31] != b[31]) && (r[31] != a[31]); end
            6'o02:        r = a | b;
            6'o03:        r = a ^ b;
            6'o21:        r = a & b;
            6'o46:        r = a >> b[4:0];
            default:      r = $signed(a) >>> b[4:0];
          endcase
          if (rd != 0) m_r[rd] = r;
          if (w[23]) m_icc = {r[31], r == 0, v, s[32]};
        end
      end
      t_next[t_n] = nx;
      t_n++;
      pc = nx;
    end
  endtask

  // ---------------- environment: memories and register file ----------------
  logic [31:0] r [32];
  logic [3:0]  icc;
  logic [31:0] dmem [64];
  logic        rand_ready;

  assign im_data  = prog[im_addr[6:2]];
  assign dm_rdata = dmem[dm_addr[7:2]];
  always_comb
    for (int p = 0; p < 3; p++)
      rf_rdata[p] = (rf_ra[p].kind == RK_ICC) ? {28'd0, icc} : r[rf_ra[p].idx[4:0]];

  always @(posedge clk) begin
    for (int p = 0; p < 2; p++) if (rf_we[p]) begin
      if (rf_wa[p].kind == RK_ICC) icc <= rf_wdata[p][3:0];
      else if (rf_wa[p].idx[4:0] != 0) r[rf_wa[p].idx[4:0]] <= rf_wdata[p];
    end
    if (dm_we) dmem[dm_addr[7:2]] <= dm_wdata;
  end

  // ---------------- stream checker ----------------
  int  pos, last_exec, cyc;
  logic last_taken, check_timing;
  int  n_taken, n_stall;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (sc_valid && sc_ready) begin
      if (pos < t_n) begin
        chk($sformatf("stream %0d pc", pos), sc_pc, t_pc[pos]);
        chk($sformatf("stream %0d next", pos), sc_next_pc, t_next[pos]);
        if (t_br[pos]) begin
          chk($sformatf("stream %0d taken", pos), 32'(sc_instr.taken), 32'(t_taken[pos]));
          chk($sformatf("stream %0d exit", pos), sc_instr.exit_pc,
              t_taken[pos] ? t_pc[pos] + 4 : t_pc[pos] + 4 * int'($signed(prog[t_pc[pos] / 4][21:0])));
        end
        if (check_timing && pos > 0)
          chk($sformatf("stream %0d spacing", pos), 32'(cyc - last_exec), last_taken ? 3 : 1);
        last_taken = t_next[pos] != t_pc[pos] + 4;
        last_exec  = cyc;
      end
      pos++;
    end
    n_taken += int'(ev_taken);
    n_stall += int'(sc_valid && !sc_ready);
  end

  always @(negedge clk) sc_ready <= rand_ready ? 1'($urandom_range(0, 2) != 0) : 1'b1;

  task automatic run(input string name, input logic rnd, input int halt_at);
    int n = 0;
    logic halted = 1'b0;
    for (int k = 0; k < 32; k++) r[k] = '0;
    for (int k = 0; k < 64; k++) dmem[k] = '0;
    icc = '0;
    rand_ready = rnd; check_timing = !rnd && halt_at < 0;
    pos = 0; cyc = 0; n_taken = 0; n_stall = 0;
    halt = 1'b0; restart = 1'b0; restart_pc = '0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    while (!(e_valid && e_pc == END_PC) && n < 2000) begin
      if (n == halt_at) begin
        // halt whatever is in execute, then resume from that address
        halt = 1'b1;
        restart_pc = e_valid ? e_pc : (pos < t_n ? t_pc[pos] : END_PC);
        @(negedge clk);
        halt = 1'b0;
        repeat (3) @(negedge clk);
        restart = 1'b1;
        @(negedge clk);
        restart = 1'b0;
        halted = 1'b1;
      end
      @(negedge clk);
      n++;
    end
    repeat (3) @(negedge clk);
    chk({name, ": reached the end"}, 32'(e_valid && e_pc == END_PC), 1);
    chk({name, ": every instruction handed over"}, 32'(pos >= t_n), 1);
    for (int k = 1; k < 32; k++) chk($sformatf("%s: r%0d", name, k), r[k], m_r[k]);
    chk({name, ": icc"}, 32'(icc), 32'(m_icc));
    for (int k = 0; k < 64; k++) chk($sformatf("%s: mem %0d", name, k), dmem[k], m_mem[k]);
    if (rnd) begin
      checks++;
      if (n_stall == 0) begin failures++; $display("FAIL %s: no stall happened", name); end
    end
    if (halt_at >= 0) chk({name, ": halted"}, 32'(halted), 1);
    $display("%s: %0d instructions, %0d cycles, %0d taken, %0d stall cycles", name, t_n, cyc, n_taken, n_stall);
  endtask

  initial begin
    restart = 0; halt = 0; restart_pc = '0; rand_ready = 0;
    model_run();
    repeat (2) @(negedge clk);
    run("ready", 1'b0, -1);
    run("stalls", 1'b1, -1);
    run("halt", 1'b0, 37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
