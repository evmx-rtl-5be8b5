// Test of the program counter: clear, increment, jump load (priority over
// increment), the code limit and the end / target-in-range flags.
module tb_evmx_pc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, inc = 0, load = 0, limit_we = 0, at_end, tgt_ok;
  logic [255:0] target = '0;
  logic [15:0] limit_in = 0, limit;
  logic [14:0] pc;
  int checks = 0, failures = 0;
  evmx_pc dut (.*);
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    limit_we = 1; limit_in = 16'd200; clear = 1; @(negedge clk); limit_we = 0; clear = 0;
    chk(pc == 0 && limit == 200, "cleared, limit set");
    inc = 1; repeat (130) @(negedge clk); inc = 0;
    chk(pc == 130, $sformatf("pc after 130 steps %0d", pc));
    target = 256'd150; #1; chk(tgt_ok, "target 150 inside code");
    target = 256'd200; #1; chk(!tgt_ok, "target 200 outside code");
    target = {1'b1, 255'd3}; #1; chk(!tgt_ok, "huge target outside code");
    target = 256'd7; load = 1; inc = 1; @(negedge clk); load = 0; inc = 0;
    chk(pc == 7, "load wins over inc");
    chk(!at_end, "pc 7 not at end");
    target = 256'd199; load = 1; @(negedge clk); load = 0; chk(!at_end, "pc 199 not at end");
    inc = 1; @(negedge clk); inc = 0; chk(at_end, "pc 200 at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
