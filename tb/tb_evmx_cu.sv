// Opcode-level test of the EVMx control unit, run inside the full engine.
//
// One program uses every opcode of the document's opcode benchmark (ADD,
// SUB, EQ, AND, OR, ADDRESS, CALLER, CALLVALUE, POP, MLOAD, MSTORE, SLOAD,
// PUSH1, SWAP1, DUP1). The test measures, for each, the cycles from its
// decode to the next decode and compares them with the benchmark's
// execution times at 142 MHz (ADD 28 ns = 4 cycles ... MLOAD 259 ns = 37
// cycles). It checks the returned data, the storage state and, on a second
// program, the exact gas used including memory expansion.
module tb_evmx_cu;
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
  addr_t s_addr = 160'h1111, caller = 160'h2222;
  word_t val = 256'd100;
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
  byte unsigned prog[$];
  longint cyc = 0;
  always @(posedge clk) cyc++;

  // decode-to-decode latency of each opcode
  int lat [256];
  logic [7:0] last_op; longint last_cyc; logic have_last = 0;
  always @(posedge clk) if (rst_n && dut.u_cu.fetch_ok) begin
    if (have_last) lat[last_op] = int'(cyc - last_cyc);
    last_op = dut.op; last_cyc = cyc; have_last = 1;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input gas_t g);
    int nch;
    @(negedge clk) load_start = 1; @(negedge clk) load_start = 0;
    nch = (prog.size() + 31) / 32; nch = ((nch + 3) / 4) * 4;
    for (int c = 0; c < nch; c++) begin
      for (int i = 0; i < 32; i++)
        bytecode_in[255 - 8*i -: 8] = (c*32 + i < prog.size()) ? prog[c*32 + i] : 8'h00;
      bc_valid = 1; @(negedge clk);
    end
    bc_valid = 0; code_len = 16'(prog.size()); gval = g; have_last = 0;
    start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
  endtask


  task automatic read_ret(input int byte_off, output word_t w);
    for (int k = 0; k < 8; k++) begin
      ret_raddr = 14'(byte_off / 4 + k); @(negedge clk);
      w[255 - 32*k -: 32] = ret_val;
    end
  endtask

  initial begin
    #5000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t w, e;
    repeat (3) @(negedge clk); rst_n = 1;
    while (busy || !dut.u_mem.ready) @(negedge clk);

    // ---- program 1: the benchmark opcodes ----
    prog = '{8'h60,8'h05, 8'h60,8'h07, 8'h01,            // PUSH1 5, PUSH1 7, ADD -> 12
             8'h60,8'h03, 8'h90, 8'h03,                  // PUSH1 3, SWAP1, SUB -> 9
             8'h80, 8'h14,                               // DUP1, EQ -> 1
             8'h60,8'h01, 8'h16,                         // AND -> 1
             8'h60,8'h0c, 8'h17,                         // OR -> 13
             8'h30, 8'h50, 8'h33, 8'h50, 8'h34, 8'h01,   // ADDRESS POP CALLER POP CALLVALUE ADD -> 113
             8'h60,8'h00, 8'h52,                         // MSTORE [0]
             8'h60,8'h00, 8'h51,                         // MLOAD [0]
             8'h60,8'h20, 8'h52,                         // MSTORE [0x20]
             8'h60,8'h2a, 8'h60,8'h07, 8'h55,            // SSTORE key 7 = 0x2a
             8'h60,8'h07, 8'h54,                         // SLOAD 7
             8'h60,8'h40, 8'h52,                         // MSTORE [0x40]
             8'h60,8'h60, 8'h60,8'h00, 8'hf3};           // RETURN 0, 0x60
    run(64'd100000);
    chk(halt == HALT_RETURN, "program 1 ends with RETURN");
    chk(ret_len == 16'h60, "return length");
    read_ret(0, w);  chk(w == 256'd113, $sformatf("word0 %h", w));
    read_ret(32, w); chk(w == 256'd113, $sformatf("word1 %h", w));
    read_ret(64, w); chk(w == 256'h2a, $sformatf("word2 %h", w));
    ostore_idx = 10'd7; ostore_sel = 3'd7; @(negedge clk);
    chk(o_valid && o_store == 32'h2a && o_key == 48'd7, "storage slot 7 holds 0x2a");
    // latencies in cycles from the opcode benchmark at 142 MHz
    chk(lat[8'h01] == 4,  $sformatf("ADD %0d", lat[8'h01]));
    chk(lat[8'h03] == 4,  $sformatf("SUB %0d", lat[8'h03]));
    chk(lat[8'h14] == 4,  $sformatf("EQ %0d", lat[8'h14]));
    chk(lat[8'h16] == 4,  $sformatf("AND %0d", lat[8'h16]));
    chk(lat[8'h17] == 4,  $sformatf("OR %0d", lat[8'h17]));
    chk(lat[8'h30] == 1,  $sformatf("ADDRESS %0d", lat[8'h30]));
    chk(lat[8'h33] == 1,  $sformatf("CALLER %0d", lat[8'h33]));
    chk(lat[8'h34] == 1,  $sformatf("CALLVALUE %0d", lat[8'h34]));
    chk(lat[8'h50] == 1,  $sformatf("POP %0d", lat[8'h50]));
    chk(lat[8'h51] == 37, $sformatf("MLOAD %0d", lat[8'h51]));
    chk(lat[8'h52] == 35, $sformatf("MSTORE %0d", lat[8'h52]));
    chk(lat[8'h54] == 3,  $sformatf("SLOAD %0d", lat[8'h54]));
    chk(lat[8'h60] == 2,  $sformatf("PUSH1 %0d", lat[8'h60]));
    chk(lat[8'h90] == 4,  $sformatf("SWAP1 %0d", lat[8'h90]));
    chk(lat[8'h80] == 3,  $sformatf("DUP1 %0d", lat[8'h80]));

    // ---- program 2: exact gas, PUSH1 PUSH1 MSTORE STOP = 3+3+3+3(memory) ----
    prog = '{8'h60,8'h2a, 8'h60,8'h00, 8'h52, 8'h00};
    run(64'd1000);
    chk(halt == HALT_STOP, "program 2 ends with STOP");
    chk(gas_left == 64'd988, $sformatf("gas left %0d", gas_left));

    // ---- program 3: ISZERO/NOT/SHR/BYTE and PUSH32 ----
    prog = '{8'h7f};
    for (int i = 0; i < 32; i++) prog.push_back(8'(i + 1));          // PUSH32 0x0102..20
    prog = {prog, 8'h60,8'h08, 8'h1c,                                // SHR 8
                  8'h19,                                             // NOT
                  8'h60,8'h00, 8'h52,
                  8'h60,8'h00, 8'h15, 8'h60,8'h20, 8'h52,           // ISZERO(0)=1 -> [0x20]
                  8'h60,8'h40, 8'h60,8'h00, 8'hf3};
    run(64'd100000);
    e = '0; for (int i = 0; i < 32; i++) e[255 - 8*i -: 8] = 8'(i + 1);
    e = ~(e >> 8);
    read_ret(0, w);  chk(w == e, $sformatf("PUSH32/SHR/NOT %h", w));
    read_ret(32, w); chk(w == 256'd1, "ISZERO");
    chk(lat[8'h7f] == 33, $sformatf("PUSH32 %0d", lat[8'h7f]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
