// Test of the bytecode memory: loads 3 RAM words (384 bytes) through the
// 256-bit port, then walks the PC through them byte by byte and checks
// every byte against the loaded pattern, that crossing from one BUFF word to
// the next costs no cycle (op valid on every step), and that a jump to a
// byte of another word costs exactly one cycle. Finally it fills all 256
// words (32 KiB, 1024 chunks at one chunk per cycle) and reads a byte of
// every word back.
module tb_evmx_bcm;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load_start = 0, bc_valid = 0, op_valid;
  logic [255:0] bytecode_in = '0;
  logic [14:0] pc = 0;
  logic [7:0] op;
  int checks = 0, failures = 0;
  evmx_bcm dut (.*);

  function automatic logic [7:0] pat(input int i); return 8'(i * 13 + (i >> 8) + 1); endfunction

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int stalls;
    repeat (3) @(negedge clk); rst_n = 1;
    load_start = 1; @(negedge clk); load_start = 0;
    for (int c = 0; c < 12; c++) begin
      for (int i = 0; i < 32; i++) bytecode_in[255 - 8*i -: 8] = pat(c*32 + i);
      bc_valid = 1; @(negedge clk);
    end
    bc_valid = 0;
    // first access misses: one stall
    pc = 0; stalls = 0;
    while (!op_valid) begin stalls++; @(negedge clk); end
    chk(stalls == 1, $sformatf("first fetch stalls %0d", stalls));
    for (int i = 0; i < 384; i++) begin
      pc = 15'(i); #1;
      chk(op_valid, $sformatf("op valid at pc %0d", i));
      chk(op == pat(i), $sformatf("byte at pc %0d: %h exp %h", i, op, pat(i)));
      @(negedge clk);
    end
    // far jump back to word 0
    pc = 15'd5; #1; stalls = 0;
    while (!op_valid) begin stalls++; @(negedge clk); #1; end
    chk(stalls == 1, $sformatf("jump stalls %0d", stalls));
    chk(op == pat(5), "byte after jump");
    // full capacity: 32 KiB in 1024 chunks, one chunk per cycle, then a
    // byte of every word, the last one included
    load_start = 1; @(negedge clk); load_start = 0;
    for (int c = 0; c < 1024; c++) begin
      for (int i = 0; i < 32; i++) bytecode_in[255 - 8*i -: 8] = pat(c*32 + i) ^ 8'h5a;
      bc_valid = 1; @(negedge clk);
    end
    bc_valid = 0;
    for (int w = 0; w < 256; w++) begin
      int a;
      a = 128*w + ((w * 37) % 128);
      pc = 15'(a); #1;
      while (!op_valid) begin @(negedge clk); #1; end
      chk(op == (pat(a) ^ 8'h5a), $sformatf("full load: byte at %0d", a));
    end
    pc = 15'd32767; #1;
    while (!op_valid) begin @(negedge clk); #1; end
    chk(op == (pat(32767) ^ 8'h5a), "full load: last byte");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
