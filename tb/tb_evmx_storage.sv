// Test of contract storage: unknown keys read 0, host preload, engine write
// and read one cycle later, tag check between keys sharing an entry, the
// collision flag, clear, and the 32-bit oStore read-out of a whole value.
module tb_evmx_storage;
  import evmx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, rd = 0, wr = 0, collide, host_we = 0, o_valid;
  logic [47:0] key = 0, host_key = 0, o_key;
  word_t wval = '0, rval, host_val = '0;
  logic [9:0] ostore_idx = 0;
  logic [2:0] ostore_sel = 0;
  logic [31:0] o_store;
  int checks = 0, failures = 0;
  evmx_storage dut (.*);
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic sload(input logic [47:0] k, output word_t v);
    key = k; rd = 1; @(negedge clk); rd = 0; v = rval;
  endtask
  initial begin
    #1000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    word_t v, big;
    repeat (2) @(negedge clk); rst_n = 1;
    clear = 1; @(negedge clk); clear = 0;
    sload(48'h123, v); chk(v == 0, "empty key reads 0");
    host_key = 48'h0000_0001_0003; host_val = 256'h77; host_we = 1; @(negedge clk); host_we = 0;
    sload(48'h0000_0001_0003, v); chk(v == 256'h77, "preloaded value");
    sload(48'h0000_0000_0003, v); chk(v == 0, "other tag on same entry reads 0");
    big = {8{32'hA5A5_0000}} ^ {256'h0123456789abcdef};
    key = 48'h2a; wval = big; wr = 1; #1; chk(!collide, "free entry"); @(negedge clk); wr = 0;
    sload(48'h2a, v); chk(v == big, "written value");
    key = 48'h0000_0002_0003; wval = 256'h5; wr = 1; #1; chk(collide, "collision flagged"); @(negedge clk); wr = 0;
    sload(48'h0000_0001_0003, v); chk(v == 256'h77, "collision did not overwrite");
    key = 48'h0000_0001_0003; wval = 256'h99; wr = 1; #1; chk(!collide, "same key overwrites"); @(negedge clk); wr = 0;
    sload(48'h0000_0001_0003, v); chk(v == 256'h99, "overwritten");
    for (int s = 0; s < 8; s++) begin
      ostore_idx = 10'h2a; ostore_sel = 3'(s); @(negedge clk);
      chk(o_store == big[255 - 32*s -: 32] && o_valid && o_key == 48'h2a, "oStore slice");
    end
    clear = 1; @(negedge clk); clear = 0;
    sload(48'h2a, v); chk(v == 0, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
