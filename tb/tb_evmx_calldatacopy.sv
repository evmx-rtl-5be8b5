// Test of CALLDATACOPY: copies into a byte model of MEM, one byte per
// cycle; checks contents, zero fill past the call data size and the
// size+1 cycle duration from start to done.
module tb_evmx_calldatacopy;
  import evmx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, mem_we;
  logic [2047:0] ext_data;
  logic [8:0] cd_size = 9'd200;
  logic [15:0] dst = 0, mem_waddr;
  word_t src = '0;
  logic [16:0] size = 0;
  logic [7:0] mem_wdata;
  byte unsigned cd [256];
  byte unsigned mem [65536];
  int checks = 0, failures = 0;
  evmx_calldatacopy dut (.*);
  always @(posedge clk) if (mem_we) mem[mem_waddr] <= mem_wdata;
  initial begin
    #1000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 256; i++) begin cd[i] = 8'($urandom | 1); ext_data[2047 - 8*i -: 8] = cd[i]; end
    for (int t = 0; t < 10; t++) begin
      int n, s, d0, cyc;
      n = $urandom % 80; s = $urandom % 240; d0 = $urandom % 30000;
      for (int i = 0; i < n; i++) mem[d0 + i] = 8'hee;
      dst = 16'(d0); src = 256'(s); size = 17'(n); start = 1; @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      @(negedge clk);
      for (int i = 0; i < n; i++) begin
        checks++;
        if (mem[d0 + i] != ((s + i < 200) ? cd[s + i] : 8'h00)) begin failures++; $display("FAIL byte %0d", i); end
      end
      checks++;
      if (cyc != n + 1) begin failures++; $display("FAIL cycles %0d for %0d", cyc, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
