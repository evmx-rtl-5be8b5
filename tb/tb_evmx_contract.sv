// Workload test: a small compiled-style contract run as a series of
// transactions on the full-size engine.
//
// The contract starts with the usual compiler prologue (free-memory pointer
// store, CALLDATASIZE / ISZERO / PUSH2 0x00EE / JUMPI to a fallback routine)
// and dispatches on the 4-byte function selector taken from the call data
// with CALLDATALOAD and SHR, like compiled Solidity code does:
//   set(uint256)  stores its argument in slot 0
//   get()         returns slot 0 as a 32-byte word
//   increment()   adds 1 to slot 0
//   (no data)     fallback at byte 0xEE, in the second 128-byte code word:
//                 multiplies slot 0 by 10
//   other         REVERT with no data
// Storage persists between transactions; memory is cleared by the engine.
// Results, halt reasons and gas used (worked out by hand from the fee
// schedule, with SLOAD/SSTORE at a flat 100) are checked per transaction.
module tb_evmx_contract;
  import evmx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load_start = 0, bc_valid = 0, start = 0, str_clear = 0, str_host_we = 0;
  logic [255:0] bytecode_in = '0;
  logic [15:0] code_len = 0;
  gas_t gval = 0, gas_left;
  logic busy, done, o_valid;
  halt_e halt;
  logic [16:0] ret_len;
  addr_t s_addr = 160'hc0ffee, caller = 160'hbeef;
  word_t val = '0;
  logic [63:0] s_nonce = 0;
  logic [2047:0] ext_data = '0;
  logic [8:0] cd_size = 0;
  logic [47:0] str_host_key = 0, o_key;
  word_t str_host_val = 0;
  logic [9:0] ostore_idx = 0;
  logic [2:0] ostore_sel = 0;
  logic [31:0] o_store, ret_val;
  logic [13:0] ret_raddr = 0;

  evmx_top dut (.*);

  int checks = 0, failures = 0;
  byte unsigned prog [256];
  int stalls = 0;

  localparam logic [31:0] SEL_SET = 32'h60fe47b1, SEL_GET = 32'h6d4ce63c, SEL_INC = 32'hd09de08a;
  localparam gas_t GAS_LIMIT = 64'd30000;

  always @(posedge clk) if (busy && dut.u_cu.jumped && !dut.u_bcm.op_valid) stalls++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // place bytes at an address
  function automatic void put(input int at, input logic [7:0] b []);
    foreach (b[i]) prog[at + i] = b[i];
  endfunction

  function automatic void dispatch_entry(input int at, input logic [31:0] sel, input logic [15:0] dest);
    put(at, '{8'h80, 8'h63, sel[31:24], sel[23:16], sel[15:8], sel[7:0], 8'h14, 8'h61, dest[15:8], dest[7:0], 8'h57});
  endfunction

  task automatic load_code();
    for (int i = 0; i < 256; i++) prog[i] = 8'hfe;                // INVALID filler
    put(8'h00, '{8'h60, 8'h60, 8'h60, 8'h40, 8'h52,                 // mstore(0x40, 0x60)
                 8'h36, 8'h15, 8'h61, 8'h00, 8'hee, 8'h57,          // if no data: goto 0xEE
                 8'h60, 8'h00, 8'h35, 8'h60, 8'he0, 8'h1c});        // selector = cd[0:4]
    dispatch_entry(8'h11, SEL_SET, 16'h0036);
    dispatch_entry(8'h1c, SEL_GET, 16'h003e);
    dispatch_entry(8'h27, SEL_INC, 16'h004a);
    put(8'h32, '{8'h60, 8'h00, 8'h80, 8'hfd});                      // revert(0, 0)
    put(8'h36, '{8'h5b, 8'h60, 8'h04, 8'h35, 8'h60, 8'h00, 8'h55, 8'h00});          // set
    put(8'h3e, '{8'h5b, 8'h60, 8'h00, 8'h54, 8'h60, 8'h80, 8'h52,
                 8'h60, 8'h20, 8'h60, 8'h80, 8'hf3});                               // get
    put(8'h4a, '{8'h5b, 8'h60, 8'h00, 8'h54, 8'h60, 8'h01, 8'h01, 8'h60, 8'h00, 8'h55, 8'h00}); // increment
    put(8'hee, '{8'h5b, 8'h60, 8'h00, 8'h54, 8'h60, 8'h0a, 8'h02, 8'h60, 8'h00, 8'h55, 8'h00}); // fallback
    @(negedge clk) load_start = 1; @(negedge clk) load_start = 0;
    for (int c = 0; c < 8; c++) begin
      for (int i = 0; i < 32; i++) bytecode_in[255 - 8*i -: 8] = prog[32*c + i];
      bc_valid = 1; @(negedge clk);
    end
    bc_valid = 0; code_len = 16'd249;
  endtask

  task automatic call(input logic [31:0] sel, input bit has_sel, input word_t arg, input bit has_arg);
    ext_data = '0; cd_size = 0;
    if (has_sel) begin ext_data[2047 -: 32] = sel; cd_size = 4; end
    if (has_arg) begin ext_data[2015 -: 256] = arg; cd_size = 36; end
    gval = GAS_LIMIT;
    start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
  endtask

  task automatic slot0(output word_t v);
    ostore_idx = 0;
    for (int s = 0; s < 8; s++) begin
      ostore_sel = 3'(s); @(negedge clk);
      v[255 - 32*s -: 32] = o_store;
    end
  endtask

  task automatic ret_word(output word_t v);
    for (int w = 0; w < 8; w++) begin
      ret_raddr = 14'(w); @(negedge clk);
      v[255 - 32*w -: 32] = ret_val;
    end
  endtask

  initial begin
    #20000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t v;
    repeat (3) @(negedge clk); rst_n = 1;
    str_clear = 1; @(negedge clk); str_clear = 0;
    load_code();

    call(SEL_SET, 1, 256'd41, 1);
    chk(halt == HALT_STOP, $sformatf("set: halt %s", halt.name()));
    chk(GAS_LIMIT - gas_left == 180, $sformatf("set: gas used %0d", GAS_LIMIT - gas_left));
    slot0(v); chk(v == 41, $sformatf("set: slot0 %0d", v));

    call(SEL_INC, 1, '0, 0);
    chk(halt == HALT_STOP, "increment: STOP");
    slot0(v); chk(v == 42, $sformatf("increment: slot0 %0d", v));

    call(SEL_GET, 1, '0, 0);
    chk(halt == HALT_RETURN && ret_len == 32, $sformatf("get: halt %s len %0d", halt.name(), ret_len));
    chk(GAS_LIMIT - gas_left == 214, $sformatf("get: gas used %0d", GAS_LIMIT - gas_left));
    ret_word(v); chk(v == 42, $sformatf("get: returned %0d", v));

    stalls = 0;
    call('0, 0, '0, 0);
    chk(halt == HALT_STOP, "fallback: STOP");
    chk(GAS_LIMIT - gas_left == 251, $sformatf("fallback: gas used %0d", GAS_LIMIT - gas_left));
    chk(stalls == 1, $sformatf("fallback: one fetch stall for the jump into the second code word, saw %0d", stalls));
    slot0(v); chk(v == 420, $sformatf("fallback: slot0 %0d", v));

    call(32'hdeadbeef, 1, '0, 0);
    chk(halt == HALT_REVERT && ret_len == 0, $sformatf("unknown selector: halt %s", halt.name()));
    chk(GAS_LIMIT - gas_left == 120, $sformatf("unknown selector: gas used %0d", GAS_LIMIT - gas_left));
    slot0(v); chk(v == 420, "unknown selector leaves storage");

    call(SEL_GET, 1, '0, 0);
    ret_word(v); chk(halt == HALT_RETURN && v == 420, $sformatf("get after fallback: %0d", v));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
