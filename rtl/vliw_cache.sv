// vliw_cache: the VLIW Cache of the DTSVLIW.
//
// Each line holds one block of long instructions built by the Scheduler Unit.
// A line stores only two instruction addresses: the address of the first
// instruction scheduled in the block (its tag: the need to execute that
// instruction is what lets the VLIW Engine run the block) and the address of
// the instruction that follows the block. It also stores the index of its
// last long instruction, which the VLIW Engine compares with its line index
// to know when the block ends. Branch exits carry their own target inside
// the branch instruction, so no other address is stored.
//
// Organisation (this design's choice): direct mapped, indexed by the word
// address of the block's first instruction; a line is written one long
// instruction per cycle through the save port (sv_*): the first write clears
// the line's valid bit and sets its tag, the last one records the last index
// and the next address and sets the valid bit. wr_hold asks the Scheduler
// Unit to wait while the line it would overwrite is the one the VLIW Engine
// is executing (lock_v/lock_line) or the one it is looking up.
//
// Ports: lookup (la_pc -> la_hit, la_line) for the VLIW Engine's next block,
// probe (pb_pc -> pb_hit) for the Fetch Unit while the Primary Processor
// runs, and a read port (rd_line, rd_idx) returning one long instruction
// plus the line's last index and next address. All reads are combinational.
//
// LINES defaults to 8192: the 3072 KB evaluated divided by blocks of 8x8
// decoded instructions of 6 bytes each.
module vliw_cache
  import dts_pkg::*;
#(
  parameter int WIDTH  = 8,
  parameter int HEIGHT = 8,
  parameter int LINES  = 8192
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // save port
  input  logic                       sv_valid,
  input  logic [XLEN-1:0]            sv_pc,
  input  logic [$clog2(HEIGHT)-1:0]  sv_idx,
  input  logic                       sv_last,
  input  logic [XLEN-1:0]            sv_next_pc,
  input  dinstr_t [WIDTH-1:0]        sv_li,
  output logic                       wr_hold,
  input  logic                       lock_v,
  input  logic [$clog2(LINES)-1:0]   lock_line,
  // lookup
  input  logic [XLEN-1:0]            la_pc,
  output logic                       la_hit,
  output logic [$clog2(LINES)-1:0]   la_line,
  input  logic [XLEN-1:0]            pb_pc,
  output logic                       pb_hit,
  // read
  input  logic [$clog2(LINES)-1:0]   rd_line,
  input  logic [$clog2(HEIGHT)-1:0]  rd_idx,
  output dinstr_t [WIDTH-1:0]        rd_li,
  output logic [$clog2(HEIGHT)-1:0]  rd_max,
  output logic [XLEN-1:0]            rd_next
);

  localparam int LW = $clog2(LINES);
  localparam int HW = $clog2(HEIGHT);

  typedef dinstr_t [WIDTH-1:0] li_t;

  logic [LINES-1:0]  valid;
  logic [XLEN-1:0]   tagm  [LINES];
  logic [HW-1:0]     maxm  [LINES];
  logic [XLEN-1:0]   nextm [LINES];
  li_t               data  [LINES*HEIGHT];

  function automatic logic [LW-1:0] line_of(input logic [XLEN-1:0] pc);
    return pc[LW+1:2];
  endfunction

  logic [LW-1:0] wl;
  assign wl      = line_of(sv_pc);
  assign wr_hold = lock_v && (lock_line == wl || (la_hit && la_line == wl));

  assign la_line = line_of(la_pc);
  assign la_hit  = valid[la_line] && tagm[la_line] == la_pc;
  assign pb_hit  = valid[line_of(pb_pc)] && tagm[line_of(pb_pc)] == pb_pc;

  assign rd_li   = data[{rd_line, rd_idx}];
  assign rd_max  = maxm[rd_line];
  assign rd_next = nextm[rd_line];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else if (sv_valid && !wr_hold) begin
      if (sv_idx == '0) valid[wl] <= 1'b0;
      if (sv_last)      valid[wl] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (sv_valid && !wr_hold) begin
      data[{wl, sv_idx}] <= sv_li;
      if (sv_idx == '0) tagm[wl] <= sv_pc;
      if (sv_last) begin
        maxm[wl]  <= sv_idx;
        nextm[wl] <= sv_next_pc;
      end
    end
  end

endmodule
