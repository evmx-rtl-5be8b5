// EVMx top level: a single-core Ethereum Virtual Machine in hardware.
//
// The engine executes EVM bytecode exactly in program order, one opcode at a
// time, like a small RISC-style processor built around the EVM's own
// resources: bytecode memory (BCM) with its 128-byte fetch buffer, program
// counter, gas module, 1024-word stack, byte-addressable memory, contract
// storage, return-data memory, an ALU with iterative multiply/divide/
// exponent units, a Keccak-256 unit with the CREATE/CREATE2 address logic,
// and the CALLDATALOAD/CALLDATACOPY units. The control unit steers them.
//
// Host sequence (all on one clock `clk`, active-low reset `rst_n`):
//   1. pulse `load_start`, then stream the bytecode 256 bits per cycle on
//      `bytecode_in` with `bc_valid` (pad the last 1024-bit word);
//   2. optionally `str_clear` and preload storage entries with `str_host_we`;
//   3. set `code_len`, `gval` (gas limit), the environment inputs and
//      `ext_data`/`cd_size` (transaction input data), and pulse `start`;
//   4. wait for `done`; `halt` says why execution ended, `ret_len` bytes of
//      return data are read 32 bits at a time on `ret_val` (address
//      `ret_raddr`, one cycle latency), the storage state on `o_store`.
// The block set and the data paths follow the document's block diagram;
// the host-side handshake is this design's choice.
module evmx_top
  import evmx_pkg::*;
#(
  parameter int unsigned CODE_WORDS  = 256,     // BCM RAM words of 1024 bits
  parameter int unsigned STACK_DEPTH = 1024,
  parameter int unsigned MEM_BYTES   = 36864,   // 288 kb
  parameter int unsigned STR_DEPTH   = 1024,
  parameter int unsigned CD_BYTES    = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // bytecode loading
  input  logic                          load_start,
  input  logic                          bc_valid,
  input  logic [255:0]                  bytecode_in,
  input  logic [15:0]                   code_len,
  // execution control
  input  logic                          start,
  input  gas_t                          gval,
  output logic                          busy,
  output logic                          done,
  output halt_e                         halt,
  output gas_t                          gas_left,
  output logic [$clog2(MEM_BYTES):0]    ret_len,
  // environment
  input  addr_t                         s_addr,
  input  addr_t                         caller,
  input  word_t                         val,
  input  logic [63:0]                   s_nonce,
  input  logic [CD_BYTES*8-1:0]         ext_data,
  input  logic [$clog2(CD_BYTES):0]     cd_size,
  // storage host port
  input  logic                          str_clear,
  input  logic                          str_host_we,
  input  logic [47:0]                   str_host_key,
  input  word_t                         str_host_val,
  input  logic [$clog2(STR_DEPTH)-1:0]  ostore_idx,
  input  logic [2:0]                    ostore_sel,
  output logic [31:0]                   o_store,
  output logic [47:0]                   o_key,
  output logic                          o_valid,
  // return data
  input  logic [$clog2(MEM_BYTES)-3:0]  ret_raddr,
  output logic [31:0]                   ret_val
);
  localparam int unsigned PC_W = 15;
  localparam int unsigned MAW  = $clog2(MEM_BYTES);

  // ---------------- interconnect ----------------
  logic [7:0]  op;
  logic        op_valid;
  logic [PC_W-1:0] pc;
  logic [PC_W:0]   code_limit;
  logic        pc_at_end, pc_tgt_ok, pc_clear, pc_inc, pc_load, pc_limit_we;
  word_t       pc_target;

  logic        oog, gas_load, gas_charge;
  logic [7:0]  gas_op;
  gas_t        gas_extra;

  word_t       stk_top, stk_rd_data, stk_push_data, stk_wr_data;
  logic [$clog2(STACK_DEPTH):0] stk_count;
  logic        stk_clear, stk_push, stk_pop, stk_poke;
  logic [3:0]  stk_wr_idx, stk_rd_idx;

  logic        mem_ready, mem_clear, mem_re, cu_mem_we, mem_we, mem_touch;
  logic [7:0]  mem_rdata, cu_mem_wdata, mem_wdata;
  logic [MAW-1:0] mem_raddr, cu_mem_waddr, mem_waddr;
  logic [MAW:0]   mem_touch_end;
  logic [MAW-4:0] mem_words;

  word_t       str_rval, str_wval;
  logic        str_collide, str_rd, str_wr;
  logic [47:0] str_key;

  logic        rtn_we;
  logic [MAW-1:0] rtn_waddr;
  logic [7:0]  rtn_wdata;

  logic        alu_done, alu_start, alu_busy;
  word_t       alu_y, alu_a, alu_b;
  alu_op_e     alu_op;

  logic        kec_done, kec_start, kec_busy;
  word_t       kec_digest;
  logic [1023:0] kec_msg, fmt_msg;
  logic [7:0]  kec_len, fmt_len;
  word_t       fmt_addr, fmt_salt, fmt_d;
  logic        fmt_create2;
  logic [63:0] fmt_nonce;

  word_t       cdl_data, cdl_offset, cdc_src;
  logic        cdc_done, cdc_start, cdc_busy, cdc_we;
  logic [MAW-1:0] cdc_dst, cdc_waddr;
  logic [MAW:0]   cdc_size;
  logic [7:0]  cdc_wdata;

  // ---------------- blocks ----------------
  evmx_bcm #(.WORDS(CODE_WORDS), .WORD_BYTES(128), .IN_W(256)) u_bcm (
    .clk, .rst_n, .load_start, .bc_valid, .bytecode_in,
    .pc, .op, .op_valid
  );

  evmx_pc #(.PC_W(PC_W)) u_pc (
    .clk, .rst_n, .clear(pc_clear), .inc(pc_inc), .load(pc_load), .target(pc_target),
    .limit_we(pc_limit_we), .limit_in(code_len), .pc, .limit(code_limit),
    .at_end(pc_at_end), .tgt_ok(pc_tgt_ok)
  );

  evmx_gas #(.MW(MAW-3)) u_gas (
    .clk, .rst_n, .load(gas_load), .gval, .charge(gas_charge), .op(gas_op),
    .extra(gas_extra), .mem_words, .gas_left, .oog
  );

  evmx_stack #(.DEPTH(STACK_DEPTH)) u_stk (
    .clk, .rst_n, .clear(stk_clear), .push(stk_push), .pop(stk_pop),
    .push_data(stk_push_data), .poke(stk_poke), .wr_idx(stk_wr_idx),
    .wr_data(stk_wr_data), .rd_idx(stk_rd_idx), .rd_data(stk_rd_data),
    .top(stk_top), .count(stk_count)
  );

  // MEM write port shared by the CU and the CALLDATACPY unit
  assign mem_we    = cu_mem_we || cdc_we;
  assign mem_waddr = cdc_we ? cdc_waddr : cu_mem_waddr;
  assign mem_wdata = cdc_we ? cdc_wdata : cu_mem_wdata;

  evmx_mem #(.BYTES(MEM_BYTES)) u_mem (
    .clk, .rst_n, .clear(mem_clear), .ready(mem_ready),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata),
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .touch(mem_touch), .touch_end(mem_touch_end), .active_words(mem_words)
  );

  evmx_storage #(.DEPTH(STR_DEPTH), .KEY_W(48)) u_str (
    .clk, .rst_n, .clear(str_clear), .rd(str_rd), .wr(str_wr), .key(str_key),
    .wval(str_wval), .rval(str_rval), .collide(str_collide),
    .host_we(str_host_we), .host_key(str_host_key), .host_val(str_host_val),
    .ostore_idx, .ostore_sel, .o_store, .o_key, .o_valid
  );

  evmx_rtn #(.BYTES(MEM_BYTES)) u_rtn (
    .clk, .we(rtn_we), .waddr(rtn_waddr), .wdata(rtn_wdata),
    .raddr(ret_raddr), .ret_val
  );

  evmx_alu u_alu (
    .clk, .rst_n, .start(alu_start), .op(alu_op), .a(alu_a), .b(alu_b),
    .busy(alu_busy), .done(alu_done), .y(alu_y)
  );

  evmx_keccak #(.MAX_BYTES(128)) u_kec (
    .clk, .rst_n, .start(kec_start), .msg(kec_msg), .len(kec_len),
    .busy(kec_busy), .done(kec_done), .digest(kec_digest)
  );

  evmx_create_fmt u_fmt (
    .sel_create2(fmt_create2), .s_addr, .nonce(fmt_nonce), .salt(fmt_salt),
    .d(fmt_d), .msg(fmt_msg), .len(fmt_len), .digest(kec_digest), .new_addr(fmt_addr)
  );

  evmx_calldataload #(.CD_BYTES(CD_BYTES)) u_cdl (
    .ext_data, .cd_size, .offset(cdl_offset), .data(cdl_data)
  );

  evmx_calldatacopy #(.CD_BYTES(CD_BYTES), .MEM_BYTES(MEM_BYTES)) u_cdc (
    .clk, .rst_n, .start(cdc_start), .ext_data, .cd_size, .dst(cdc_dst),
    .src(cdc_src), .size(cdc_size), .busy(cdc_busy), .done(cdc_done),
    .mem_we(cdc_we), .mem_waddr(cdc_waddr), .mem_wdata(cdc_wdata)
  );

  evmx_cu #(
    .PC_W(PC_W), .MEM_BYTES(MEM_BYTES), .CD_BYTES(CD_BYTES),
    .DEPTH(STACK_DEPTH), .MAX_HASH(128)
  ) u_cu (
    .clk, .rst_n, .start, .busy, .done, .halt, .ret_len,
    .s_addr, .caller, .callvalue(val), .s_nonce, .cd_size,
    .op, .op_valid, .pc, .code_limit, .pc_at_end, .pc_tgt_ok,
    .pc_clear, .pc_inc, .pc_load, .pc_target, .pc_limit_we,
    .gas_left, .oog, .gas_load, .gas_charge, .gas_op, .gas_extra,
    .stk_top, .stk_rd_data, .stk_count, .stk_clear, .stk_push, .stk_pop,
    .stk_push_data, .stk_poke, .stk_wr_idx, .stk_wr_data, .stk_rd_idx,
    .mem_ready, .mem_rdata, .mem_words, .mem_clear, .mem_re, .mem_raddr,
    .mem_we(cu_mem_we), .mem_waddr(cu_mem_waddr), .mem_wdata(cu_mem_wdata),
    .mem_touch, .mem_touch_end,
    .str_rval, .str_collide, .str_rd, .str_wr, .str_key, .str_wval,
    .rtn_we, .rtn_waddr, .rtn_wdata,
    .alu_done, .alu_y, .alu_start, .alu_op, .alu_a, .alu_b,
    .kec_done, .kec_digest, .kec_start, .kec_msg, .kec_len,
    .fmt_msg, .fmt_len, .fmt_addr, .fmt_create2, .fmt_salt, .fmt_d, .fmt_nonce,
    .cdl_data, .cdl_offset, .cdc_done, .cdc_start, .cdc_dst, .cdc_src, .cdc_size
  );
endmodule
