// tb_dts_regfile: self-checking test of the shared register file.
//
// Four read and three write ports are driven with random register ids of
// all four kinds (integer, condition codes, integer renaming, flag renaming)
// for 3000 cycles. A model of the four arrays, kept here, predicts every
// read: a write is seen from the next cycle on, %g0 stays zero, flag
// registers hold four bits, and of two writes to one register in a cycle
// the higher port wins. The observation ports are compared with the model
// at the end, and reset must clear everything.
module tb_dts_regfile;
  import dts_pkg::*;

  localparam int NR = 4, NW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  rid_t [NR-1:0]             ra;
  logic [NR-1:0][XLEN-1:0]   rdata;
  logic [NW-1:0]             we;
  rid_t [NW-1:0]             wa;
  logic [NW-1:0][XLEN-1:0]   wdata;
  logic [31:0][XLEN-1:0]     arch_r;
  logic [3:0]                arch_icc;

  dts_regfile #(.NR(NR), .NW(NW)) dut (.clk, .rst_n, .ra, .rdata, .we, .wa, .wdata, .arch_r, .arch_icc);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [XLEN-1:0] m_r [32];
  logic [3:0]      m_icc;
  logic [XLEN-1:0] m_ri [NREN];
  logic [3:0]      m_rf [NREN];

  function automatic logic [XLEN-1:0] model_rd(input rid_t a);
    case (a.kind)
      RK_INT:  return m_r[a.idx[4:0]];
      RK_ICC:  return {28'd0, m_icc};
      RK_RINT: return m_ri[a.idx];
      default: return {28'd0, m_rf[a.idx]};
    endcase
  endfunction

  function automatic rid_t rnd_id();
    rid_t x;
    x.kind = rkind_e'($urandom_range(0, 3));
    // mostly a few registers so writes and reads meet often
    x.idx  = ($urandom_range(0, 3) == 0) ? 8'($urandom) : 8'($urandom_range(0, 7));
    if (x.kind == RK_INT) x.idx[7:5] = '0;
    if (x.kind == RK_ICC) x.idx = '0;
    return x;
  endfunction

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 32; k++) m_r[k] = '0;
    for (int k = 0; k < NREN; k++) begin m_ri[k] = '0; m_rf[k] = '0; end
    m_icc = '0;
    we = '0; wa = '0; wdata = '0; ra = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < NR; p++) ra[p] = rnd_id();
      for (int p = 0; p < NW; p++) begin
        we[p] = 1'($urandom);
        wa[p] = rnd_id();
        wdata[p] = $urandom;
      end
      #1;
      for (int p = 0; p < NR; p++) chk($sformatf("read port %0d", p), rdata[p], model_rd(ra[p]));
      @(posedge clk);
      for (int p = 0; p < NW; p++) if (we[p]) begin
        case (wa[p].kind)
          RK_INT:  if (wa[p].idx[4:0] != 0) m_r[wa[p].idx[4:0]] = wdata[p];
          RK_ICC:  m_icc = wdata[p][3:0];
          RK_RINT: m_ri[wa[p].idx] = wdata[p];
          default: m_rf[wa[p].idx] = wdata[p][3:0];
        endcase
      end
    end
    @(negedge clk);
    we = '0;
    for (int k = 0; k < 32; k++) chk($sformatf("arch_r[%0d]", k), arch_r[k], m_r[k]);
    chk("arch_icc", {28'd0, arch_icc}, {28'd0, m_icc});
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    ra[0] = rid_t'({RK_RINT, 8'd3});
    ra[1] = rid_t'({RK_RFLG, 8'd5});
    #1;
    chk("reset arch", 32'(arch_r != '0), 0);
    chk("reset rint", rdata[0], 0);
    chk("reset rflg", rdata[1], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
