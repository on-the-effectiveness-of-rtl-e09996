// tb_data_mem: self-checking test of the multi-ported data memory.
//
// Three ports read and write random word addresses of a 64-word memory for
// 2000 cycles. A model array kept here predicts each read: reads are
// combinational, a write is seen from the next cycle on, and of two writes
// to one word in a cycle the higher port wins. Reset must clear the memory.
module tb_data_mem;
  import dts_pkg::*;

  localparam int NP = 3, WORDS = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NP-1:0][XLEN-1:0] raddr, waddr, rdata, wdata;
  logic [NP-1:0]           we;

  data_mem #(.NP(NP), .WORDS(WORDS)) dut (.clk, .rst_n, .raddr, .waddr, .rdata, .we, .wdata);

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [XLEN-1:0] m [WORDS];

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < WORDS; k++) m[k] = '0;
    raddr = '0; waddr = '0; wdata = '0; we = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        raddr[p] = 32'($urandom_range(0, 15)) << 2;
        waddr[p] = 32'($urandom_range(0, 15)) << 2;
        wdata[p] = $urandom;
        we[p]    = 1'($urandom);
      end
      #1;
      for (int p = 0; p < NP; p++) chk($sformatf("port %0d", p), rdata[p], m[raddr[p][7:2]]);
      @(posedge clk);
      for (int p = 0; p < NP; p++) if (we[p]) m[waddr[p][7:2]] = wdata[p];
    end
    @(negedge clk);
    we = '0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 16; k++) begin
      raddr[0] = 32'(k) << 2;
      #1;
      chk("after reset", rdata[0], 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
