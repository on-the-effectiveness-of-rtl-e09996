// tb_instr_mem: self-checking test of the instruction memory.
//
// A 64-word memory is loaded through its load port with a pattern computed
// here (word k holds k * 0x9e3779b1), then read back in random order through
// the fetch port; a second load over part of it must replace exactly those
// words. Reads are combinational; a load is visible the cycle after.
module tb_instr_mem;
  import dts_pkg::*;

  localparam int WORDS = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [XLEN-1:0] addr, load_addr;
  logic [31:0]     rdata, load_data;
  logic            load_we;

  instr_mem #(.WORDS(WORDS)) dut (.clk, .addr, .rdata, .load_we, .load_addr, .load_data);

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] m [WORDS];

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load(input int k, input logic [31:0] v);
    load_we = 1'b1; load_addr = 32'(k) << 2; load_data = v;
    @(negedge clk);
    load_we = 1'b0;
    m[k] = v;
  endtask

  initial begin
    load_we = 1'b0; load_addr = '0; load_data = '0; addr = '0;
    @(negedge clk);
    for (int k = 0; k < WORDS; k++) load(k, 32'(k) * 32'h9e3779b1);
    for (int n = 0; n < 300; n++) begin
      automatic int k = $urandom_range(0, WORDS - 1);
      addr = 32'(k) << 2;
      #1;
      chk($sformatf("word %0d", k), rdata, m[k]);
    end
    for (int k = 8; k < 16; k++) load(k, ~m[k]);
    for (int k = 0; k < WORDS; k++) begin
      addr = 32'(k) << 2;
      #1;
      chk($sformatf("reload word %0d", k), rdata, m[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
