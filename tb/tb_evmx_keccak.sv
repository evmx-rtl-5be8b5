// Self-checking test of the Keccak-256 unit. Two published digests (the
// empty string and "abc") anchor the test; random messages of 1 to 128
// bytes are then compared with a reference model written here from the
// Keccak specification, using the published round-constant and rotation
// tables (not computed like the unit does). Each digest must arrive 25
// cycles after start.
module tb_evmx_keccak;
  logic clk = 0, rst_n = 0, start = 0;
  logic [1023:0] msg;
  logic [7:0] len;
  logic busy, done;
  logic [255:0] digest;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  evmx_keccak #(.MAX_BYTES(128)) dut (.*);

  localparam logic [63:0] RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};
  // rotation offsets r[x][y], lane index x + 5y
  localparam int ROT [25] = '{ 0,  1, 62, 28, 27,
                              36, 44,  6, 55, 20,
                               3, 10, 43, 25, 39,
                              41, 45, 15, 21,  8,
                              18,  2, 61, 56, 14};

  function automatic logic [63:0] rol(input logic [63:0] v, input int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic logic [255:0] ref_keccak(input logic [1023:0] m, input int l);
    logic [63:0] s [25];
    logic [63:0] c [5];
    logic [63:0] b [25];
    byte unsigned blk [136];
    logic [255:0] out;
    for (int i = 0; i < 136; i++) blk[i] = (i < l) ? m[1023 - 8*i -: 8] : 8'h00;
    blk[l] ^= 8'h01;
    blk[135] ^= 8'h80;
    for (int i = 0; i < 25; i++) s[i] = '0;
    for (int i = 0; i < 17; i++)
      for (int k = 0; k < 8; k++) s[i][8*k +: 8] = blk[8*i + k];
    for (int r = 0; r < 24; r++) begin
      for (int x = 0; x < 5; x++) c[x] = s[x] ^ s[x+5] ^ s[x+10] ^ s[x+15] ^ s[x+20];
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) s[x + 5*y] ^= c[(x + 4) % 5] ^ rol(c[(x + 1) % 5], 1);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) b[y + 5*((2*x + 3*y) % 5)] = rol(s[x + 5*y], ROT[x + 5*y]);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) s[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
      s[0] ^= RC[r];
    end
    for (int i = 0; i < 32; i++) out[255 - 8*i -: 8] = s[i / 8][8*(i % 8) +: 8];
    return out;
  endfunction

  task automatic run(input logic [1023:0] m, input int l, input logic [255:0] expd);
    int cyc;
    msg = m; len = 8'(l); start = 1;
    @(posedge clk); #1 start = 0; cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (digest !== expd) begin failures++; $display("KEC mismatch len %0d: %h", l, digest); end
    checks++;
    if (cyc != 25) begin failures++; $display("KEC cycles %0d", cyc); end
  endtask

  initial begin
    #1000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [1023:0] m;
    repeat (3) @(posedge clk); #1 rst_n = 1; @(posedge clk); #1;
    run('0, 0, 256'hc5d2460186f7233c927e7db2dcc703c0e500b653ca82273b7bfad8045d85a470);
    m = '0; m[1023 -: 24] = "abc";
    checks++;
    if (ref_keccak(m, 3) !== 256'h4e03657aea45a94fc7d47ba826c8d667c0d1e6e33a64a036ec44f58fa12d6c45) begin
      failures++; $display("reference model disagrees with the published digest");
    end
    run(m, 3, 256'h4e03657aea45a94fc7d47ba826c8d667c0d1e6e33a64a036ec44f58fa12d6c45);
    for (int t = 0; t < 30; t++) begin
      int l;
      l = (t == 0) ? 128 : (t == 1) ? 127 : 1 + $urandom % 128;
      for (int i = 0; i < 32; i++) m[32*i +: 32] = $urandom;
      for (int i = l; i < 128; i++) m[1023 - 8*i -: 8] = $urandom;   // bytes past len must not matter
      run(m, l, ref_keccak(m, l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
