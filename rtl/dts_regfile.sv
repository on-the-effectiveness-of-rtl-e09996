// dts_regfile: the machine state registers of the DTSVLIW, shared by the
// Primary Processor and the VLIW Engine.
//
// Holds the 32 architectural integer registers (r0 reads as zero and ignores
// writes), the integer condition codes, NREN integer renaming registers and
// NREN condition-code renaming registers. Both engines address it with
// register identifiers (dts_pkg::rid_t), so an architectural register and a
// renaming register are reached through the same ports; the two engines never
// run at the same time, so the ports of the idle one simply stay quiet.
//
// NR read ports are combinational; NW write ports write on the rising clock
// edge. Condition-code positions keep the low 4 bits of the written value.
// Two ports never write the same position in one cycle (the scheduler never
// puts two writers of one position in a long instruction); if they did, the
// higher-numbered port would win. Everything resets to zero.
module dts_regfile
  import dts_pkg::*;
#(
  parameter int NR = 3,
  parameter int NW = 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  rid_t      [NR-1:0]        ra,
  output logic      [NR-1:0][XLEN-1:0] rdata,
  input  logic      [NW-1:0]        we,
  input  rid_t      [NW-1:0]        wa,
  input  logic      [NW-1:0][XLEN-1:0] wdata,
  output logic      [31:0][XLEN-1:0] arch_r,   // architectural state, for observation
  output logic      [3:0]           arch_icc
);

  logic [31:0][XLEN-1:0]   r;
  logic [3:0]              icc;
  logic [NREN-1:0][XLEN-1:0] rint;
  logic [NREN-1:0][3:0]    rflg;

  always_comb begin
    for (int p = 0; p < NR; p++) begin
      unique case (ra[p].kind)
        RK_INT:  rdata[p] = (ra[p].idx[4:0] == 5'd0) ? '0 : r[ra[p].idx[4:0]];
        RK_ICC:  rdata[p] = {28'd0, icc};
        RK_RINT: rdata[p] = rint[ra[p].idx];
        default: rdata[p] = {28'd0, rflg[ra[p].idx]};
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r    <= '0;
      icc  <= '0;
      rint <= '0;
      rflg <= '0;
    end else begin
      for (int p = 0; p < NW; p++) begin
        if (we[p]) begin
          unique case (wa[p].kind)
            RK_INT:  if (wa[p].idx[4:0] != 5'd0) r[wa[p].idx[4:0]] <= wdata[p];
            RK_ICC:  icc <= wdata[p][3:0];
            RK_RINT: rint[wa[p].idx] <= wdata[p];
            default: rflg[wa[p].idx] <= wdata[p][3:0];
          endcase
        end
      end
    end
  end

  assign arch_r   = r;
  assign arch_icc = icc;

endmodule
