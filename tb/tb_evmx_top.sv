// End-to-end test of the EVMx engine at its full default size.
//
// Assembles EVM programs here, loads them through the 256-bit bytecode port
// and checks return data, storage and halt reasons against values computed
// independently in the testbench (native arithmetic, a byte-level memory
// model, and published Keccak-256, CREATE and CREATE2 results). The programs
// make each mechanism of the design happen: sequential refill of BUFF
// through the bypass multiplexer, the read stall after a far jump, taken and
// untaken JUMPI, iterative and single-cycle MUL/DIV, EXP, signed division,
// KECCAK256, CREATE, CREATE2, CALLDATALOAD/COPY, forward and backward
// MCOPY, memory expansion, SLOAD of preloaded storage, a storage collision,
// RETURN, REVERT and every error halt. Each mechanism is counted; one that
// never happens counts as a failure.
module tb_evmx_top;
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
  word_t val = 256'd0;
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

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_BYPASS, M_READAHEAD, M_JUMP_STALL, M_JUMPI_TAKEN, M_JUMPI_FALL,
    M_MUL_ITER, M_MUL_EDGE, M_DIV_ITER, M_DIV_EDGE, M_EXP, M_KECCAK,
    M_CREATE, M_CREATE2, M_CDLOAD, M_CDCOPY, M_MCOPY_FWD, M_MCOPY_BACK,
    M_MEM_GROW, M_SLOAD_HIT, M_COLLIDE, M_RETURN, M_REVERT, M_OOG,
    M_INVALID, M_STACK, M_BADJUMP, M_NUM
  } mech_e;
  int mech [M_NUM];
  logic mul_go, div_go;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_bcm.op_valid && !dut.u_bcm.buff_hit && dut.u_bcm.ro_hit && dut.u_bcm.pc[6:0] == 0)
      mech[M_BYPASS]++;
    if (dut.u_bcm.rd_en && dut.u_bcm.op_valid) mech[M_READAHEAD]++;
    if (dut.u_cu.jumped && !dut.u_bcm.op_valid) mech[M_JUMP_STALL]++;
    if (dut.u_cu.pc_load && dut.u_cu.op_q == OP_JUMPI) mech[M_JUMPI_TAKEN]++;
    if (dut.u_cu.pc_inc && dut.u_cu.op_q == OP_JUMPI && dut.u_cu.r2 == 0 && !dut.u_cu.fetch_ok) mech[M_JUMPI_FALL]++;
    mul_go = dut.u_alu.u_mul.start; div_go = dut.u_alu.u_div.start;
    if (dut.u_alu.u_mul.busy && dut.u_alu.u_mul.cnt == 0 && !dut.u_alu.u_exp.busy) mech[M_MUL_ITER]++;
    if (dut.u_alu.u_div.busy && dut.u_alu.u_div.cnt == 0 && dut.u_alu.u_div.state == 1) mech[M_DIV_ITER]++;
    if (dut.u_alu.u_exp.done) mech[M_EXP]++;
    if (dut.u_kec.start) mech[M_KECCAK]++;
    if (dut.u_cu.fetch_ok && dut.op == OP_CREATE) mech[M_CREATE]++;
    if (dut.u_cu.fetch_ok && dut.op == OP_CREATE2) mech[M_CREATE2]++;
    if (dut.u_cu.fetch_ok && dut.op == OP_CDLOAD) mech[M_CDLOAD]++;
    if (dut.u_cdc.start) mech[M_CDCOPY]++;
    if (dut.u_cu.mem_we && dut.u_cu.op_q == OP_MCOPY) begin
      if (dut.u_cu.mcp_back) mech[M_MCOPY_BACK]++; else mech[M_MCOPY_FWD]++;
    end
    if (dut.u_mem.touch && dut.u_mem.touch_words > dut.u_mem.active_words) mech[M_MEM_GROW]++;
    if (dut.u_str.rd) begin
      @(negedge clk);
      if (dut.u_str.hit_q) mech[M_SLOAD_HIT]++;
    end
  end
  // edge-case completions: done one cycle after start
  logic mul_start_q = 0, div_start_q = 0;
  always @(posedge clk) begin
    if (mul_start_q && dut.u_alu.u_mul.done && !dut.u_alu.u_exp.busy) mech[M_MUL_EDGE]++;
    if (div_start_q && dut.u_alu.u_div.done) mech[M_DIV_EDGE]++;
    mul_start_q <= dut.u_alu.u_mul.start;
    div_start_q <= dut.u_alu.u_div.start;
  end

  function automatic void count_halt(halt_e h);
    case (h)
      HALT_RETURN:  mech[M_RETURN]++;
      HALT_REVERT:  mech[M_REVERT]++;
      HALT_OOG:     mech[M_OOG]++;
      HALT_INVALID: mech[M_INVALID]++;
      HALT_STACK:   mech[M_STACK]++;
      HALT_BADJUMP: mech[M_BADJUMP]++;
      default: ;
    endcase
  endfunction

  // ---------------- program building ----------------
  function automatic void emit(input logic [7:0] b); prog.push_back(b); endfunction
  function automatic void push1(input logic [7:0] v); emit(8'h60); emit(v); endfunction
  function automatic void push2(input logic [15:0] v); emit(8'h61); emit(v[15:8]); emit(v[7:0]); endfunction
  function automatic void push32(input word_t v);
    emit(8'h7f); for (int i = 0; i < 32; i++) emit(v[255 - 8*i -: 8]);
  endfunction
  function automatic void mstore_at(input logic [7:0] off); push1(off); emit(OP_MSTORE); endfunction
  function automatic void ret(input logic [7:0] off, input logic [7:0] len);
    push1(len); push1(off); emit(OP_RETURN);
  endfunction

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
    bc_valid = 0; code_len = 16'(prog.size()); gval = g;
    start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    count_halt(halt);
  endtask

  task automatic read_ret(input int byte_off, output word_t w);
    for (int k = 0; k < 8; k++) begin
      ret_raddr = 14'(byte_off / 4 + k); @(negedge clk);
      w[255 - 32*k -: 32] = ret_val;
    end
  endtask

  function automatic word_t rnd256();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    #50000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t w, e, ma, mb, dn, dd, n7;
    byte unsigned cd [100];
    byte unsigned mm [256];
    int loop_pc, body_len;
    repeat (3) @(negedge clk); rst_n = 1;
    while (busy || !dut.u_mem.ready) @(negedge clk);

    // ============ A: arithmetic, loop, far jump, BUFF refill ============
    ma = rnd256(); mb = rnd256() | 256'h3; dn = rnd256(); dd = (rnd256() >> 100) | 256'h3;
    n7 = -256'sd7;
    prog = {};
    push2(16'h0100); emit(OP_JUMP);
    while (prog.size() < 16'h100) emit(8'h00);
    emit(OP_JUMPDEST);
    push32(mb); push32(ma); emit(OP_MUL); mstore_at(8'h00);            // iterative MUL
    push32(dd); push32(dn); emit(OP_DIV); mstore_at(8'h20);            // iterative DIV
    push32(256'h1 << 224); push32(dn); emit(OP_DIV); mstore_at(8'h40); // power-of-two DIV
    push1(8'd13); push1(8'd7); emit(OP_EXP); mstore_at(8'h60);         // EXP
    push1(8'd3); push32(n7); emit(OP_SDIV); mstore_at(8'h80);          // SDIV -> -2
    push1(8'd3); push32(n7); emit(OP_SMOD); mstore_at(8'ha0);          // SMOD -> -1
    push1(8'd1); push32(ma); emit(OP_MUL); mstore_at(8'hc0);           // edge-case MUL
    // loop: acc = 5+4+3+2+1
    push1(8'd0); push1(8'd5);
    loop_pc = prog.size(); emit(OP_JUMPDEST);
    emit(8'h80); emit(8'h91); emit(OP_ADD); emit(8'h90);               // DUP1 SWAP2 ADD SWAP1
    push1(8'd1); emit(8'h90); emit(OP_SUB);                            // i-1
    emit(8'h80); push2(16'(loop_pc)); emit(OP_JUMPI);
    emit(OP_POP); mstore_at(8'he0);
    // "abc" at 0x100 and its hash
    push1("a"); push2(16'h0100); emit(OP_MSTORE8);
    push1("b"); push2(16'h0101); emit(OP_MSTORE8);
    push1("c"); push2(16'h0102); emit(OP_MSTORE8);
    push1(8'd3); push2(16'h0100); emit(OP_KECCAK256); push2(16'h0120); emit(OP_MSTORE);
    body_len = prog.size();
    push1(8'h40); push2(16'h0100); emit(OP_RETURN);                    // return 0x100..0x13f
    run(64'd10_000_000);
    chk(prog.size() > 16'h180, "program A spans three BUFF words");
    chk(halt == HALT_RETURN, $sformatf("A halts with RETURN (%s)", halt.name()));
    read_ret(32, w);
    chk(w == 256'h4e03657aea45a94fc7d47ba826c8d667c0d1e6e33a64a036ec44f58fa12d6c45, $sformatf("KECCAK256(abc) %h", w));
    // same program returning the arithmetic results at 0x00..0xff
    while (prog.size() > body_len) void'(prog.pop_back());
    push2(16'h0100); push1(8'h00); emit(OP_RETURN);
    run(64'd10_000_000);
    chk(halt == HALT_RETURN, "A2 halts with RETURN");
    read_ret(8'h00, w); chk(w == ma * mb, "MUL");
    read_ret(8'h20, w); chk(w == dn / dd, "DIV");
    read_ret(8'h40, w); chk(w == dn >> 224, "DIV by 2^224");
    read_ret(8'h60, w); chk(w == 256'd96889010407, $sformatf("EXP 7^13 %0d", w));
    read_ret(8'h80, w); chk(w == -256'sd2, "SDIV");
    read_ret(8'ha0, w); chk(w == -256'sd1, "SMOD");
    read_ret(8'hc0, w); chk(w == ma, "MUL by 1");
    read_ret(8'he0, w); chk(w == 256'd15, $sformatf("loop sum %0d", w));

    // ============ B: CREATE2 (sender 0, salt 0, init code 0x00) ============
    s_addr = '0;
    prog = {};
    push1(8'h00); push1(8'h00); emit(OP_MSTORE8);
    push1(8'h00); push1(8'h01); push1(8'h00); push1(8'h00); emit(OP_CREATE2);
    mstore_at(8'h00); ret(8'h00, 8'h20);
    run(64'd1_000_000);
    read_ret(0, w);
    chk(halt == HALT_RETURN && w == 256'h4d1a2e2bb4f88f0250f26ffff098b0b30b26bf38, $sformatf("CREATE2 address %h", w));

    // ============ C: CREATE twice (nonce 0 then 1) ============
    s_addr = 160'h6ac7ea33f8831ea9dcc53393aaa88b25a785dbf0; s_nonce = 0;
    prog = {};
    push1(8'h00); push1(8'h00); push1(8'h00); emit(OP_CREATE); mstore_at(8'h00);
    push1(8'h00); push1(8'h00); push1(8'h00); emit(OP_CREATE); mstore_at(8'h20);
    ret(8'h00, 8'h40);
    run(64'd1_000_000);
    read_ret(0, w);  chk(w == 256'hcd234a471b72ba2f1ccf0a70fcaba648a5eecd8d, $sformatf("CREATE nonce 0 %h", w));
    read_ret(32, w); chk(w == 256'h343c43a37d37dff08ae8c4a11544c718abb4fcf8, $sformatf("CREATE nonce 1 %h", w));

    // ============ D: call data and MCOPY against a byte model ============
    for (int i = 0; i < 100; i++) begin cd[i] = 8'(i * 7 + 3); ext_data[2047 - 8*i -: 8] = cd[i]; end
    cd_size = 9'd100;
    for (int i = 0; i < 256; i++) mm[i] = 0;
    prog = {};
    push1(8'd90); emit(OP_CDLOAD); mstore_at(8'h00);
    for (int i = 0; i < 32; i++) mm[i] = (90 + i < 100) ? cd[90 + i] : 8'h00;
    push1(8'd40); push1(8'd4); push1(8'h20); emit(OP_CDCOPY);
    for (int i = 0; i < 40; i++) mm[8'h20 + i] = cd[4 + i];
    push1(8'd16); push1(8'h20); push1(8'h30); emit(OP_MCOPY);       // overlapping, dst > src
    begin byte unsigned t [16]; for (int i = 0; i < 16; i++) t[i] = mm[8'h20 + i];
          for (int i = 0; i < 16; i++) mm[8'h30 + i] = t[i]; end
    push1(8'd8); push1(8'h00); push1(8'h60); emit(OP_MCOPY);        // disjoint, dst > src
    for (int i = 0; i < 8; i++) mm[8'h60 + i] = mm[i];
    push1(8'd4); push1(8'h48); push1(8'h40); emit(OP_MCOPY);        // overlapping, dst < src
    begin byte unsigned t [4]; for (int i = 0; i < 4; i++) t[i] = mm[8'h48 + i];
          for (int i = 0; i < 4; i++) mm[8'h40 + i] = t[i]; end
    emit(OP_CDSIZE); mstore_at(8'h80);
    for (int i = 0; i < 32; i++) mm[8'h80 + i] = (i == 31) ? 8'd100 : 8'd0;
    ret(8'h00, 8'ha0);
    run(64'd1_000_000);
    chk(halt == HALT_RETURN && ret_len == 16'ha0, "D halts with RETURN");
    for (int k = 0; k < 5; k++) begin
      read_ret(32*k, w);
      for (int i = 0; i < 32; i++) e[255 - 8*i -: 8] = mm[32*k + i];
      chk(w == e, $sformatf("call data / MCOPY word %0d: %h exp %h", k, w, e));
    end

    // ============ E: storage preload, SLOAD, collision ============
    str_clear = 1; @(negedge clk); str_clear = 0;
    str_host_we = 1; str_host_key = 48'h0000_0000_0405; str_host_val = 256'hbeef; @(negedge clk);
    str_host_we = 0;
    prog = {};
    push2(16'h0405); emit(OP_SLOAD); mstore_at(8'h00);
    push1(8'h11); push2(16'h0805); emit(OP_SSTORE);                    // same entry, other key
    ret(8'h00, 8'h20);
    run(64'd1_000_000);
    chk(halt == HALT_INVALID, $sformatf("storage collision halts (%s)", halt.name()));
    if (halt == HALT_INVALID) mech[M_COLLIDE]++;
    prog = {};
    push2(16'h0405); emit(OP_SLOAD); mstore_at(8'h00); ret(8'h00, 8'h20);
    run(64'd1_000_000);
    read_ret(0, w); chk(w == 256'hbeef, "SLOAD of preloaded key");

    // ============ F: error halts ============
    prog = {}; push1(1); push1(1); emit(OP_ADD); emit(OP_STOP);
    run(64'd8);  chk(halt == HALT_OOG, "out of gas");
    prog = {}; emit(8'hfe);
    run(64'd100); chk(halt == HALT_INVALID, "invalid opcode");
    prog = {}; emit(OP_ADD);
    run(64'd100); chk(halt == HALT_STACK, "stack underflow");
    prog = {}; push1(8'h04); emit(OP_JUMP); emit(0); emit(0); emit(0);
    run(64'd100); chk(halt == HALT_BADJUMP, "jump to non-JUMPDEST");
    prog = {}; push1(8'hab); push1(0); emit(OP_MSTORE8); push1(1); push1(0); emit(OP_REVERT);
    run(64'd100);
    chk(halt == HALT_REVERT && ret_len == 1, "REVERT with one byte");
    ret_raddr = 0; @(negedge clk); chk(ret_val[31:24] == 8'hab, "revert data");
    prog = {}; push2(16'hffff); emit(OP_MLOAD); emit(OP_STOP);
    run(64'd100000); chk(halt == HALT_OOG, "memory beyond MEM");
    prog = {}; push1(1);
    run(64'd100); chk(halt == HALT_REVERT, "running past the code");

    // ---------------- mechanism coverage ----------------
    for (int m = 0; m < M_NUM; m++) begin
      mech_e me; me = mech_e'(m);
      $display("mechanism %-14s %0d", me.name(), mech[m]);
      chk(mech[m] > 0, $sformatf("mechanism %s never happened", me.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
