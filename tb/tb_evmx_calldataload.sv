// Test of CALLDATALOAD: 32-byte windows at random offsets, including ones
// that run past the call data size (zero fill) and offsets beyond it.
module tb_evmx_calldataload;
  import evmx_pkg::*;
  logic [2047:0] ext_data;
  logic [8:0] cd_size;
  word_t offset, data;
  int checks = 0, failures = 0;
  byte unsigned cd [256];
  evmx_calldataload dut (.*);
  initial begin
    for (int i = 0; i < 256; i++) begin cd[i] = 8'($urandom); ext_data[2047 - 8*i -: 8] = cd[i]; end
    for (int t = 0; t < 200; t++) begin
      word_t e;
      cd_size = 9'($urandom % 257);
      offset = (t == 0) ? {1'b1, 255'd0} : 256'($urandom % 300);
      #1;
      for (int i = 0; i < 32; i++)
        e[255 - 8*i -: 8] = (offset + i < cd_size) ? cd[offset + i] : 8'h00;
      checks++;
      if (data !== e) begin failures++; $display("FAIL off %0d size %0d", offset, cd_size); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
