// data_mem: the data cache of the DTSVLIW, modelled as a perfect cache: a
// word-addressed memory that always hits, as in the machine's evaluation.
//
// NP ports, one per unit that can access data in a cycle (the Primary
// Processor plus one per VLIW slot); each has a read address and a write
// address, as a load and a store of different pipeline stages may use one
// port in the same cycle. Reads are combinational, writes happen on the
// rising clock edge; a write and a read of one word in
// the same cycle return the old word. Byte addresses are taken modulo the
// memory size and their two low bits are ignored (word accesses only).
// Contents reset to zero. The size is this design's choice.
module data_mem
  import dts_pkg::*;
#(
  parameter int NP    = 9,
  parameter int WORDS = 1024
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NP-1:0][XLEN-1:0]    raddr,
  input  logic [NP-1:0][XLEN-1:0]    waddr,
  output logic [NP-1:0][XLEN-1:0]    rdata,
  input  logic [NP-1:0]              we,
  input  logic [NP-1:0][XLEN-1:0]    wdata
);

  localparam int AW = $clog2(WORDS);

  logic [XLEN-1:0] mem [WORDS];

  always_comb
    for (int p = 0; p < NP; p++) rdata[p] = mem[raddr[p][AW+1:2]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < WORDS; w++) mem[w] <= '0;
    end else begin
      for (int p = 0; p < NP; p++)
        if (we[p]) mem[waddr[p][AW+1:2]] <= wdata[p];
    end
  end

endmodule
