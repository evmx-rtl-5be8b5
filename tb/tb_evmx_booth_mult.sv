// Self-checking test of the Booth multiplier: edge cases (0, 1, powers of
// two) must finish one cycle after start, general operands N+1 cycles after
// start; every product is compared with the low 256 bits of a*b.
module tb_evmx_booth_mult;
  logic clk = 0, rst_n = 0, start = 0;
  logic [255:0] a, b, p;
  logic busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  evmx_booth_mult #(.N(256)) dut (.*);

  task automatic run(input logic [255:0] x, input logic [255:0] y, input int exp_cyc);
    int cyc;
    logic [255:0] ref_p;
    ref_p = x * y;
    a = x; b = y; start = 1;
    @(posedge clk); #1 start = 0; cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (p !== ref_p) begin failures++; $display("MUL mismatch %h * %h = %h exp %h", x, y, p, ref_p); end
    if (exp_cyc > 0) begin
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("MUL cycles %0d exp %0d", cyc, exp_cyc); end
    end
  endtask

  function automatic logic [255:0] rnd256();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    #100000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1; @(posedge clk); #1;
    run(0, 256'h1234, 1);
    run(256'h1, 256'hdeadbeef, 1);
    run(256'h77, 256'h1, 1);
    run(256'h1 << 224, 256'h5555_aaaa_1234, 1);
    run(256'h3, 256'h5, 257);
    run(256'h7, {256{1'b1}}, 257);
    for (int i = 0; i < 20; i++) run(rnd256(), rnd256(), 257);
    for (int i = 0; i < 10; i++) run({$urandom} | 3, rnd256(), 257);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
