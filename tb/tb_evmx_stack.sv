// Test of the stack against a queue model: random pushes, pops, replace-
// top, DUP-style reads and SWAP-style pokes at depth 0..15, and filling to
// the full 1024 words.
module tb_evmx_stack;
  import evmx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, push = 0, pop = 0, poke = 0;
  word_t push_data = '0, wr_data = '0, rd_data, top;
  logic [3:0] wr_idx = 0, rd_idx = 0;
  logic [10:0] count;
  int checks = 0, failures = 0;
  word_t model[$];
  evmx_stack dut (.*);
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic word_t rnd(); return {$urandom, $urandom, 192'(0), $urandom}; endfunction
  initial begin
    #10000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < 2000; i++) begin
      int act; act = $urandom % 4;
      if (model.size() < 16) act = 0;
      case (act)
        0: if (model.size() < 1024) begin push_data = rnd(); push = 1; model.push_back(push_data); end
        1: begin pop = 1; void'(model.pop_back()); end
        2: begin push_data = rnd(); push = 1; pop = 1; model[model.size()-1] = push_data; end
        default: begin wr_idx = 4'($urandom); wr_data = rnd(); poke = 1;
                       model[model.size()-1-wr_idx] = wr_data; end
      endcase
      @(negedge clk); push = 0; pop = 0; poke = 0;
      rd_idx = 4'($urandom); #1;
      chk(count == 11'(model.size()), "count");
      if (model.size() > 15) begin
        chk(top == model[model.size()-1], "top");
        chk(rd_data == model[model.size()-1-rd_idx], "read at depth");
      end
    end
    while (model.size() < 1024) begin push_data = rnd(); push = 1; model.push_back(push_data); @(negedge clk); end
    push = 0; #1;
    chk(count == 11'd1024, "full at 1024");
    chk(top == model[1023], "top when full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
