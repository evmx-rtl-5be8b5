// Test of the CAT / RPL / ADDR logic, hashed by the Keccak unit, against
// published results: the CREATE2 example with zero sender, zero salt and
// init code 0x00, and CREATE from a known sender with nonces 0, 1 and a
// multi-byte nonce checked for its encoding bytes.
module tb_evmx_create_fmt;
  import evmx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sel_create2 = 0;
  addr_t s_addr = '0;
  logic [63:0] nonce = 0;
  word_t salt = '0, d = '0, digest, new_addr;
  logic [1023:0] msg, kmsg = '0;
  logic [7:0] len, klen = 0;
  logic kstart = 0, kbusy, kdone;
  int checks = 0, failures = 0;
  evmx_create_fmt dut (.*);
  evmx_keccak u_k (.clk, .rst_n, .start(kstart), .msg(kmsg), .len(klen), .busy(kbusy), .done(kdone), .digest(digest));
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic hash(input logic [1023:0] m, input logic [7:0] l);
    kmsg = m; klen = l; kstart = 1; @(negedge clk); kstart = 0;
    while (!kdone) @(negedge clk);
  endtask
  initial begin
    #1000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [1023:0] m;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    // CREATE2: d = keccak(0x00)
    m = '0; hash(m, 8'd1); d = digest;
    sel_create2 = 1; s_addr = '0; salt = '0; #1;
    chk(len == 85 && msg[1023 -: 8] == 8'hff, "CAT prefix and length");
    hash(msg, len); #1;
    chk(new_addr == 256'h4d1a2e2bb4f88f0250f26ffff098b0b30b26bf38, $sformatf("CREATE2 %h", new_addr));
    // CREATE
    sel_create2 = 0; s_addr = 160'h6ac7ea33f8831ea9dcc53393aaa88b25a785dbf0; nonce = 0; #1;
    chk(len == 23 && msg[1023 -: 16] == 16'hd694 && msg[1023 - 8*22 -: 8] == 8'h80, "RLP nonce 0");
    hash(msg, len); #1;
    chk(new_addr == 256'hcd234a471b72ba2f1ccf0a70fcaba648a5eecd8d, $sformatf("CREATE n0 %h", new_addr));
    nonce = 1; #1; hash(msg, len); #1;
    chk(new_addr == 256'h343c43a37d37dff08ae8c4a11544c718abb4fcf8, $sformatf("CREATE n1 %h", new_addr));
    nonce = 64'h0102; #1;
    chk(len == 25 && msg[1023 -: 8] == 8'hd8 && msg[1023 - 8*22 -: 24] == 24'h820102, "RLP two-byte nonce");
    nonce = 64'h7f; #1;
    chk(len == 23 && msg[1023 - 8*22 -: 8] == 8'h7f, "RLP small nonce");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
