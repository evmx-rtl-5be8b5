// Test of MEM: zero after reset, byte writes and one-cycle reads, the
// highest-word tracking used for memory gas, and zeroing of touched bytes by
// `clear` (with `ready` low for exactly touched-words x 32 cycles).
module tb_evmx_mem;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, ready, re = 0, we = 0, touch = 0;
  logic [15:0] raddr = 0, waddr = 0;
  logic [7:0] rdata, wdata = 0;
  logic [16:0] touch_end = 0;
  logic [12:0] active_words;
  int checks = 0, failures = 0;
  evmx_mem dut (.*);
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic rd(input int a, output logic [7:0] d);
    raddr = 16'(a); re = 1; @(negedge clk); re = 0; d = rdata;
  endtask
  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] d; int n;
    repeat (2) @(negedge clk); rst_n = 1;
    while (!ready) @(negedge clk);
    rd(36863, d); chk(d == 0, "last byte zero after reset");
    rd(100, d);   chk(d == 0, "byte 100 zero after reset");
    for (int i = 0; i < 70; i++) begin waddr = 16'(i); wdata = 8'(i + 1); we = 1; @(negedge clk); end
    we = 0;
    for (int i = 0; i < 70; i++) begin rd(i, d); chk(d == 8'(i + 1), "read back"); end
    touch_end = 17'd70; touch = 1; @(negedge clk); touch = 0;
    chk(active_words == 3, $sformatf("70 bytes = 3 words, got %0d", active_words));
    touch_end = 17'd32; touch = 1; @(negedge clk); touch = 0;
    chk(active_words == 3, "a smaller touch does not shrink");
    clear = 1; @(negedge clk); clear = 0; n = 0;
    while (!ready) begin n++; @(negedge clk); end
    chk(n == 96, $sformatf("clear took %0d cycles", n));
    chk(active_words == 0, "words reset");
    for (int i = 0; i < 70; i++) begin rd(i, d); chk(d == 0, "cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
