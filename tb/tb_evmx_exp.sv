// Self-checking test of the exponentiation unit: edge cases (exponent 0,
// base 0/1/2) and general cases, each compared with a square-and-multiply
// reference computed here with the simulator's own multiplication.
module tb_evmx_exp;
  logic clk = 0, rst_n = 0, start = 0;
  logic [255:0] base, expo, r;
  logic busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  evmx_exp #(.N(256)) dut (.*);

  function automatic logic [255:0] ref_pow(input logic [255:0] x, input logic [255:0] e);
    logic [255:0] acc;
    acc = 1;
    for (int i = 255; i >= 0; i--) begin
      acc = acc * acc;
      if (e[i]) acc = acc * x;
    end
    return acc;
  endfunction

  task automatic run(input logic [255:0] x, input logic [255:0] e, input int max_cyc);
    int cyc;
    base = x; expo = e; start = 1;
    @(posedge clk); #1 start = 0; cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (r !== ref_pow(x, e)) begin failures++; $display("EXP mismatch %h ** %h = %h", x, e, r); end
    checks++;
    if (cyc > max_cyc) begin failures++; $display("EXP cycles %0d > %0d", cyc, max_cyc); end
  endtask

  initial begin
    #200000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1; @(posedge clk); #1;
    run(256'h1234, 0, 1);
    run(0, 256'h5, 1);
    run(1, 256'h99, 1);
    run(2, 256'd224, 1);
    run(2, 256'd300, 1);
    run(256'd3, 256'd5, 3 * 270);
    run(256'd10, 256'd18, 5 * 270);
    run(256'h1_0000_0001, 256'd3, 2 * 270);
    run({$urandom, $urandom, $urandom}, 256'd77, 7 * 270);
    run(256'hffff_ffff_ffff_ffff_ffff_ffff_ffff_ffff_ffff_ffff_ffff_ffff_ffff_ffff_ffff_fffd, 256'd1000, 10 * 270);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
