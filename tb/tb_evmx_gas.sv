// Test of the gas module: static gas from the table (Table-I opcodes MLOAD,
// MSTORE, KECCAK256, EXP, SHR, MUL), extra dynamic gas, memory expansion
// cost 3a + floor(a^2/512) charged incrementally, and the out-of-gas flag.
module tb_evmx_gas;
  import evmx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, charge = 0, oog;
  gas_t gval = 0, extra = 0, gas_left;
  logic [7:0] op = 0;
  logic [10:0] mem_words = 0;
  int checks = 0, failures = 0;
  evmx_gas #(.MW(11)) dut (.*);
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic longint cm(input longint a); return 3*a + (a*a)/512; endfunction
  task automatic charge_op(input logic [7:0] o, input longint x);
    op = o; extra = x; charge = 1; @(negedge clk); charge = 0; extra = 0;
  endtask
  initial begin
    #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint g;
    repeat (2) @(negedge clk); rst_n = 1;
    gval = 64'd1_000_000; load = 1; @(negedge clk); load = 0; g = 1_000_000;
    chk(gas_left == g, "loaded");
    charge_op(8'h51, 0); g -= 3;  chk(gas_left == g, "MLOAD 3");
    charge_op(8'h52, 0); g -= 3;  chk(gas_left == g, "MSTORE 3");
    charge_op(8'h20, 12); g -= 42; chk(gas_left == g, "KECCAK256 30 + extra");
    charge_op(8'h0A, 0); g -= 10; chk(gas_left == g, "EXP 10");
    charge_op(8'h1C, 0); g -= 3;  chk(gas_left == g, "SHR 3");
    charge_op(8'h02, 0); g -= 5;  chk(gas_left == g, "MUL 5");
    mem_words = 11'd1; @(negedge clk); g -= cm(1); chk(gas_left == g, "1 word");
    mem_words = 11'd23; @(negedge clk); g -= cm(23) - cm(1); chk(gas_left == g, "23 words (736 bytes)");
    mem_words = 11'd100; @(negedge clk); g -= cm(100) - cm(23); chk(gas_left == g, $sformatf("100 words %0d", gas_left));
    @(negedge clk); chk(gas_left == g, "no second charge for same size");
    chk(!oog, "not out of gas");
    gval = 64'd10; load = 1; @(negedge clk); load = 0;
    charge_op(8'h54, 0); chk(oog && gas_left == 0, "SLOAD 100 exceeds 10");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
