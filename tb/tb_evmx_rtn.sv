// Test of the return-data memory: byte writes, 32-bit big-endian read-out
// with one cycle of latency.
module tb_evmx_rtn;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [15:0] waddr = 0;
  logic [7:0] wdata = 0;
  logic [13:0] raddr = 0;
  logic [31:0] ret_val;
  int checks = 0, failures = 0;
  evmx_rtn dut (.*);
  initial begin
    #1000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin waddr = 16'(1000 + i); wdata = 8'(i * 3 + 1); we = 1; @(negedge clk); end
    we = 0;
    for (int w = 0; w < 16; w++) begin
      logic [31:0] e;
      for (int k = 0; k < 4; k++) e[31 - 8*k -: 8] = 8'((4*w + k) * 3 + 1);
      raddr = 14'(250 + w); @(negedge clk);
      checks++; if (ret_val != e) begin failures++; $display("FAIL word %0d %h exp %h", w, ret_val, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
