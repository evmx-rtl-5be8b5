// Self-checking test of the non-restoring divider: edge cases (divisor 0,
// 1, larger than the dividend, a power of two; dividend 0) finish one cycle
// after start, general cases N+2 cycles after start; quotient and remainder
// are compared with the simulator's / and %.
module tb_evmx_div;
  logic clk = 0, rst_n = 0, start = 0;
  logic [255:0] dividend, divisor, quot, rem;
  logic busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  evmx_div #(.N(256)) dut (.*);

  task automatic run(input logic [255:0] x, input logic [255:0] y, input int exp_cyc);
    int cyc;
    logic [255:0] rq, rr;
    rq = (y == 0) ? 0 : x / y;
    rr = (y == 0) ? 0 : x % y;
    dividend = x; divisor = y; start = 1;
    @(posedge clk); #1 start = 0; cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (quot !== rq || rem !== rr) begin
      failures++; $display("DIV mismatch %h / %h -> %h r %h exp %h r %h", x, y, quot, rem, rq, rr);
    end
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("DIV cycles %0d exp %0d", cyc, exp_cyc); end
  endtask

  function automatic logic [255:0] rnd256();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    #100000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [255:0] x, y;
    repeat (3) @(posedge clk); #1 rst_n = 1; @(posedge clk); #1;
    run(256'h1234, 0, 1);
    run(0, 256'h1234, 1);
    run(256'hdead, 1, 1);
    run(256'h10, 256'h11, 1);
    run(rnd256(), 256'h1 << 224, 1);
    run(256'd100, 256'd7, 258);
    run(256'd100, 256'd10, 258);
    for (int i = 0; i < 30; i++) begin
      x = rnd256(); y = rnd256() >> ($urandom % 250);
      if (y < 2 || y > x || (y & (y - 1)) == 0) y = 256'd3;
      run(x, y, 258);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
