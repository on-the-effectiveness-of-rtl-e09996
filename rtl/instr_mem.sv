// instr_mem: the Instruction Cache of the DTSVLIW, modelled as a perfect
// cache: a word-addressed read-only program memory that always hits.
//
// One combinational read port, used by the Primary Processor's fetch stage.
// The program is written through a load port (load_we/load_addr/load_data)
// before the machine runs; addresses are byte addresses, the two low bits
// are ignored and the word index wraps at the memory size. The size is this
// design's choice.
module instr_mem
  import dts_pkg::*;
#(
  parameter int WORDS = 1024
) (
  input  logic            clk,
  input  logic [XLEN-1:0] addr,
  output logic [31:0]     rdata,
  input  logic            load_we,
  input  logic [XLEN-1:0] load_addr,
  input  logic [31:0]     load_data
);

  localparam int AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  assign rdata = mem[addr[AW+1:2]];

  always_ff @(posedge clk)
    if (load_we) mem[load_addr[AW+1:2]] <= load_data;

endmodule
