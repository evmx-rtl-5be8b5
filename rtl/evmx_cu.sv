// Control unit (CU) of EVMx, with the datapath registers R0-R5.
//
// The CU runs the EVM execution loop on the bytes the bytecode memory
// delivers at the PC: it decodes each opcode as it arrives (there is no
// separate decode or reorder stage), charges its static gas, checks the
// stack bounds, and then steps through the few cycles the opcode needs,
// steering the stack, memory, storage, ALU, Keccak unit and call-data units.
// Execution ends on STOP, RETURN or REVERT, or with an error: invalid or
// unsupported opcode, out of gas, stack underflow/overflow, a jump to a byte
// that is not JUMPDEST, a storage collision, or running past the end of the
// code (treated as a failed execution).
//
// Registers (names as in the block diagram): R0 collects the immediate
// bytes of PUSHn and the bytes of MLOAD; R1, R2, R3 hold popped operands;
// R4 is the 1024-bit shift register that gathers memory bytes for the hash;
// R5 holds the init-code digest of CREATE2.
//
// Cycle counts (one cycle = one state; the decode cycle counts):
//   PUSH0, POP, JUMPDEST, environment reads  1
//   PUSHn                                   1+n
//   DUPn 3, SWAPn 4, SLOAD 3, SSTORE 3, CALLDATALOAD 2
//   two-operand ALU ops 4 (+ MUL/DIV/EXP iterations), one-operand 3
//   MLOAD 37, MSTORE 35, MSTORE8 4
// These equal, at the 142 MHz clock, the execution times the document
// lists for its opcode benchmark; the state sequence reaching them is this
// design's choice. The CU leaves the CALL family, ADDMOD, MULMOD and the
// block and transaction environment opcodes other than ADDRESS, CALLER,
// CALLVALUE, CALLDATA*, CODESIZE unimplemented: they halt as invalid.
// KECCAK256 and CREATE2 hash at most MAX_HASH bytes (the width of R4);
// longer inputs halt as invalid. CREATE and CREATE2 compute and push the
// new address (and bump the nonce) but do not run the init code.
//
// Start: pulse `start` while idle; it begins once MEM has finished zeroing.
// `done` rises with `halt` holding the reason and stays until next start.
module evmx_cu
  import evmx_pkg::*;
#(
  parameter int unsigned PC_W      = 15,
  parameter int unsigned MEM_BYTES = 36864,
  parameter int unsigned CD_BYTES  = 256,
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned MAX_HASH  = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host control
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output halt_e                         halt,
  output logic [$clog2(MEM_BYTES):0]    ret_len,
  // environment
  input  addr_t                         s_addr,
  input  addr_t                         caller,
  input  word_t                         callvalue,
  input  logic [63:0]                   s_nonce,
  input  logic [$clog2(CD_BYTES):0]     cd_size,
  // bytecode memory and PC
  input  logic [7:0]                    op,
  input  logic                          op_valid,
  input  logic [PC_W-1:0]               pc,
  input  logic [PC_W:0]                 code_limit,
  input  logic                          pc_at_end,
  input  logic                          pc_tgt_ok,
  output logic                          pc_clear,
  output logic                          pc_inc,
  output logic                          pc_load,
  output word_t                         pc_target,
  output logic                          pc_limit_we,
  // gas
  input  gas_t                          gas_left,
  input  logic                          oog,
  output logic                          gas_load,
  output logic                          gas_charge,
  output logic [7:0]                    gas_op,
  output gas_t                          gas_extra,
  // stack
  input  word_t                         stk_top,
  input  word_t                         stk_rd_data,
  input  logic [$clog2(DEPTH):0]        stk_count,
  output logic                          stk_clear,
  output logic                          stk_push,
  output logic                          stk_pop,
  output word_t                         stk_push_data,
  output logic                          stk_poke,
  output logic [3:0]                    stk_wr_idx,
  output word_t                         stk_wr_data,
  output logic [3:0]                    stk_rd_idx,
  // memory
  input  logic                          mem_ready,
  input  logic [7:0]                    mem_rdata,
  input  logic [$clog2(MEM_BYTES)-4:0]  mem_words,
  output logic                          mem_clear,
  output logic                          mem_re,
  output logic [$clog2(MEM_BYTES)-1:0]  mem_raddr,
  output logic                          mem_we,
  output logic [$clog2(MEM_BYTES)-1:0]  mem_waddr,
  output logic [7:0]                    mem_wdata,
  output logic                          mem_touch,
  output logic [$clog2(MEM_BYTES):0]    mem_touch_end,
  // storage
  input  word_t                         str_rval,
  input  logic                          str_collide,
  output logic                          str_rd,
  output logic                          str_wr,
  output logic [47:0]                   str_key,
  output word_t                         str_wval,
  // return memory
  output logic                          rtn_we,
  output logic [$clog2(MEM_BYTES)-1:0]  rtn_waddr,
  output logic [7:0]                    rtn_wdata,
  // ALU
  input  logic                          alu_done,
  input  word_t                         alu_y,
  output logic                          alu_start,
  output alu_op_e                       alu_op,
  output word_t                         alu_a,
  output word_t                         alu_b,
  // Keccak and address formatting
  input  logic                          kec_done,
  input  word_t                         kec_digest,
  output logic                          kec_start,
  output logic [MAX_HASH*8-1:0]         kec_msg,
  output logic [7:0]                    kec_len,
  input  logic [1023:0]                 fmt_msg,
  input  logic [7:0]                    fmt_len,
  input  word_t                         fmt_addr,
  output logic                          fmt_create2,
  output word_t                         fmt_salt,
  output word_t                         fmt_d,
  output logic [63:0]                   fmt_nonce,
  // call data units
  input  word_t                         cdl_data,
  output word_t                         cdl_offset,
  input  logic                          cdc_done,
  output logic                          cdc_start,
  output logic [$clog2(MEM_BYTES)-1:0]  cdc_dst,
  output word_t                         cdc_src,
  output logic [$clog2(MEM_BYTES):0]    cdc_size
);
  localparam int unsigned MAW = $clog2(MEM_BYTES);

  typedef enum logic [5:0] {
    S_IDLE, S_FETCH, S_PUSHIMM, S_POPA, S_POPB, S_POPC,
    S_ALU, S_ALUW, S_DUP_RD, S_PUSHR1, S_SWAP_RD, S_SWAP_W1, S_SWAP_W2,
    S_SLOAD_RD, S_SLOAD_PUSH, S_SSTORE, S_JUMP, S_JUMPI, S_CDLOAD,
    S_CDC_GO, S_CDC_WAIT, S_MTOUCH, S_MLD, S_MLD_LAST, S_PUSHR0,
    S_MST, S_MST8, S_MCP_GO, S_MCP, S_RET_GO, S_RET,
    S_C2_GO, S_KEC_GO, S_KEC_RD, S_KEC_START, S_KEC_WAIT,
    S_C2_SALT, S_CR_GO, S_FMT_START, S_FMT_WAIT
  } state_e;

  state_e state, exec_st;
  logic [1:0] pops_left;

  word_t          r0, r1, r2, r3, r5;
  logic [MAX_HASH*8-1:0] r4;
  logic [7:0]     op_q;
  logic [16:0]    cnt;
  logic           jumped, is_c2, mcp_back, start_pend, clr_req;
  logic [63:0]    nonce;

  // ---------------- opcode properties ----------------
  function automatic logic [1:0] pops_of(input logic [7:0] o);   // pops in the generic chain
    unique casez (o)
      OP_ADD, OP_MUL, OP_SUB, OP_DIV, OP_SDIV, OP_MOD, OP_SMOD, OP_EXP, OP_SIGNEXTEND,
      OP_LT, OP_GT, OP_SLT, OP_SGT, OP_EQ, OP_AND, OP_OR, OP_XOR, OP_BYTE,
      OP_SHL, OP_SHR, OP_SAR, OP_KECCAK256, OP_MSTORE, OP_MSTORE8, OP_SSTORE,
      OP_JUMPI, OP_RETURN, OP_REVERT: return 2'd2;
      OP_CDCOPY, OP_MCOPY, OP_CREATE, OP_CREATE2: return 2'd3;
      default: return 2'd1;
    endcase
  endfunction

  // total pops / pushes, for the stack bound check
  function automatic logic [4:0] need_of(input logic [7:0] o);
    unique casez (o)
      8'b100?_????: return o[4] ? ({1'b0, o[3:0]} + 5'd2) : ({1'b0, o[3:0]} + 5'd1);  // SWAPn: n+1, DUPn: n
      OP_CREATE2: return 5'd4;
      OP_POP, OP_ISZERO, OP_NOT, OP_CDLOAD, OP_MLOAD, OP_SLOAD, OP_JUMP: return 5'd1;
      OP_STOP, OP_ADDRESS, OP_CALLER, OP_CALLVALUE, OP_CDSIZE, OP_CODESIZE,
      OP_PC, OP_MSIZE, OP_GAS, OP_JUMPDEST, 8'b011?_????, OP_PUSH0: return 5'd0;
      default: return {3'b0, pops_of(o)};
    endcase
  endfunction

  function automatic logic grows(input logic [7:0] o);  // net +1 on the stack
    unique casez (o)
      OP_ADDRESS, OP_CALLER, OP_CALLVALUE, OP_CDSIZE, OP_CODESIZE, OP_PC,
      OP_MSIZE, OP_GAS, OP_PUSH0, 8'b011?_????, 8'b1000_????: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic supported(input logic [7:0] o);
    unique casez (o)
      OP_STOP, OP_ADD, OP_MUL, OP_SUB, OP_DIV, OP_SDIV, OP_MOD, OP_SMOD, OP_EXP,
      OP_SIGNEXTEND, OP_LT, OP_GT, OP_SLT, OP_SGT, OP_EQ, OP_ISZERO, OP_AND,
      OP_OR, OP_XOR, OP_NOT, OP_BYTE, OP_SHL, OP_SHR, OP_SAR, OP_KECCAK256,
      OP_ADDRESS, OP_CALLER, OP_CALLVALUE, OP_CDLOAD, OP_CDSIZE, OP_CDCOPY,
      OP_CODESIZE, OP_POP, OP_MLOAD, OP_MSTORE, OP_MSTORE8, OP_SLOAD, OP_SSTORE,
      OP_JUMP, OP_JUMPI, OP_PC, OP_MSIZE, OP_GAS, OP_JUMPDEST, OP_MCOPY,
      OP_PUSH0, 8'b011?_????, 8'b100?_????, OP_CREATE, OP_RETURN, OP_CREATE2,
      OP_REVERT: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  function automatic alu_op_e alu_of(input logic [7:0] o);
    unique case (o)
      OP_ADD: return ALU_ADD;   OP_MUL: return ALU_MUL;   OP_SUB: return ALU_SUB;
      OP_DIV: return ALU_DIV;   OP_SDIV: return ALU_SDIV; OP_MOD: return ALU_MOD;
      OP_SMOD: return ALU_SMOD; OP_EXP: return ALU_EXP;   OP_SIGNEXTEND: return ALU_SIGNEXT;
      OP_LT: return ALU_LT;     OP_GT: return ALU_GT;     OP_SLT: return ALU_SLT;
      OP_SGT: return ALU_SGT;   OP_EQ: return ALU_EQ;     OP_ISZERO: return ALU_ISZERO;
      OP_AND: return ALU_AND;   OP_OR: return ALU_OR;     OP_XOR: return ALU_XOR;
      OP_NOT: return ALU_NOT;   OP_BYTE: return ALU_BYTE; OP_SHL: return ALU_SHL;
      OP_SHR: return ALU_SHR;   default: return ALU_SAR;
    endcase
  endfunction

  // the state that executes an opcode once its operands are popped
  function automatic state_e exec_of(input logic [7:0] o);
    unique case (o)
      OP_SLOAD: return S_SLOAD_RD;    OP_SSTORE: return S_SSTORE;
      OP_JUMP: return S_JUMP;         OP_JUMPI: return S_JUMPI;
      OP_CDLOAD: return S_CDLOAD;     OP_CDCOPY: return S_CDC_GO;
      OP_MLOAD: return S_MTOUCH;      OP_MSTORE: return S_MST;
      OP_MSTORE8: return S_MST8;      OP_MCOPY: return S_MCP_GO;
      OP_RETURN, OP_REVERT: return S_RET_GO;
      OP_KECCAK256: return S_KEC_GO;  OP_CREATE2: return S_C2_GO;
      OP_CREATE: return S_CR_GO;
      default: return S_ALU;
    endcase
  endfunction

  // offset + size must lie inside MEM (sizes of 0 touch nothing)
  function automatic logic range_ok(input word_t off, input word_t size);
    logic [256:0] e;
    e = {1'b0, off} + {1'b0, size};
    return (size == '0) || (e <= 257'(MEM_BYTES));
  endfunction

  function automatic gas_t words_of(input word_t size);
    logic [17:0] t;
    t = {1'b0, size[16:0]} + 18'd31;
    return gas_t'(t[17:5]);
  endfunction

  function automatic gas_t exp_bytes(input word_t e);
    gas_t n;
    n = 0;
    for (int i = 0; i < 32; i++) if (e[8*i +: 8] != 0) n = gas_t'(unsigned'(i + 1));
    return n;
  endfunction

  // ---------------- decode-cycle helpers ----------------
  logic [4:0] need;
  logic       stk_bad;
  assign need    = need_of(op);
  assign stk_bad = (stk_count < ($clog2(DEPTH)+1)'(need)) ||
                   (grows(op) && stk_count >= ($clog2(DEPTH)+1)'(DEPTH));

  logic fetch_ok;   // an opcode can be executed in this cycle
  assign fetch_ok = (state == S_FETCH) && !oog && !pc_at_end && op_valid &&
                    !(jumped && op != OP_JUMPDEST) && supported(op) && !stk_bad;

  logic [7:0] imm_byte;
  assign imm_byte = pc_at_end ? 8'h00 : op;

  logic [MAW-1:0] mcp_src, mcp_dst;
  assign mcp_src = mcp_back ? MAW'(r2 + r3 - 1 - cnt) : MAW'(r2 + cnt);
  assign mcp_dst = mcp_back ? MAW'(r1 + r3 - word_t'(cnt)) : MAW'(r1 + word_t'(cnt) - 1);

  word_t mload_word;
  assign mload_word = {r0[247:0], mem_rdata};

  // ---------------- outputs to the datapath ----------------
  always_comb begin
    pc_clear = 1'b0; pc_inc = 1'b0; pc_load = 1'b0; pc_target = r1; pc_limit_we = 1'b0;
    gas_load = 1'b0; gas_charge = 1'b0; gas_op = op; gas_extra = '0;
    stk_clear = 1'b0; stk_push = 1'b0; stk_pop = 1'b0; stk_push_data = '0;
    stk_poke = 1'b0; stk_wr_idx = '0; stk_wr_data = '0; stk_rd_idx = '0;
    mem_re = 1'b0; mem_raddr = MAW'(r1 + cnt); mem_we = 1'b0;
    mem_waddr = MAW'(r1 + cnt); mem_wdata = r2[8*(31 - cnt[4:0]) +: 8];
    mem_touch = 1'b0; mem_touch_end = (MAW+1)'(r1 + r2);
    str_rd = 1'b0; str_wr = 1'b0; str_key = r1[47:0]; str_wval = r2;
    rtn_we = 1'b0; rtn_waddr = MAW'(cnt - 1); rtn_wdata = mem_rdata;
    alu_start = 1'b0; alu_op = alu_of(op_q); alu_a = r1; alu_b = r2;
    kec_start = 1'b0; kec_msg = r4 << (8 * (MAX_HASH - int'(r2[7:0]))); kec_len = r2[7:0];
    fmt_create2 = is_c2; fmt_salt = r1; fmt_d = r5; fmt_nonce = nonce;
    cdl_offset = r1;
    cdc_start = 1'b0; cdc_dst = MAW'(r1); cdc_src = r2; cdc_size = (MAW+1)'(r3);

    unique case (state)
      S_IDLE: if (start_pend && mem_ready && !clr_req) begin
        pc_clear = 1'b1; pc_limit_we = 1'b1; gas_load = 1'b1; stk_clear = 1'b1;
      end
      S_FETCH: if (fetch_ok) begin
        gas_charge = 1'b1;
        unique casez (op)
          OP_MLOAD, OP_MSTORE, OP_MSTORE8, OP_STOP, OP_JUMPDEST,
          8'b100?_????: ;                                   // no pop in decode
          8'b011?_????: pc_inc = 1'b1;                      // PUSHn
          OP_PUSH0: begin stk_push = 1'b1; pc_inc = 1'b1; end
          OP_ADDRESS: begin stk_push = 1'b1; stk_push_data = word_t'(s_addr); pc_inc = 1'b1; end
          OP_CALLER: begin stk_push = 1'b1; stk_push_data = word_t'(caller); pc_inc = 1'b1; end
          OP_CALLVALUE: begin stk_push = 1'b1; stk_push_data = callvalue; pc_inc = 1'b1; end
          OP_CDSIZE: begin stk_push = 1'b1; stk_push_data = word_t'(cd_size); pc_inc = 1'b1; end
          OP_CODESIZE: begin stk_push = 1'b1; stk_push_data = word_t'(code_limit); pc_inc = 1'b1; end
          OP_PC: begin stk_push = 1'b1; stk_push_data = word_t'(pc); pc_inc = 1'b1; end
          OP_MSIZE: begin stk_push = 1'b1; stk_push_data = word_t'({mem_words, 5'b0}); pc_inc = 1'b1; end
          OP_GAS: begin stk_push = 1'b1; stk_push_data = word_t'(gas_t'(gas_left - static_gas(OP_GAS))); pc_inc = 1'b1; end
          OP_POP: begin stk_pop = 1'b1; pc_inc = 1'b1; end
          default: stk_pop = 1'b1;                          // first operand
        endcase
        if (op == OP_JUMPDEST) pc_inc = 1'b1;
      end
      S_PUSHIMM: begin
        if (op_valid || pc_at_end) begin
          pc_inc = 1'b1;
          if (cnt == 1) begin stk_push = 1'b1; stk_push_data = {r0[247:0], imm_byte}; end
        end
      end
      S_POPA, S_POPB, S_POPC: stk_pop = 1'b1;
      S_ALU: begin
        alu_start = 1'b1;
        if (op_q == OP_EXP) begin gas_charge = 1'b1; gas_op = OP_STOP; gas_extra = 50 * exp_bytes(r2); end
      end
      S_ALUW: if (alu_done) begin stk_push = 1'b1; stk_push_data = alu_y; pc_inc = 1'b1; end
      S_DUP_RD: stk_rd_idx = op_q[3:0];
      S_PUSHR1: begin stk_push = 1'b1; stk_push_data = r1; pc_inc = 1'b1; end
      S_SWAP_RD: stk_rd_idx = op_q[3:0] + 1'b1;
      S_SWAP_W1: begin stk_poke = 1'b1; stk_wr_idx = op_q[3:0] + 1'b1; stk_wr_data = r1; end
      S_SWAP_W2: begin stk_poke = 1'b1; stk_wr_idx = '0; stk_wr_data = r2; pc_inc = 1'b1; end
      S_SLOAD_RD: str_rd = 1'b1;
      S_SLOAD_PUSH: begin stk_push = 1'b1; stk_push_data = str_rval; pc_inc = 1'b1; end
      S_SSTORE: begin str_wr = 1'b1; pc_inc = !str_collide; end
      S_JUMP: pc_load = pc_tgt_ok;
      S_JUMPI: begin pc_load = (r2 != '0) && pc_tgt_ok; pc_inc = (r2 == '0); end
      S_CDLOAD: begin stk_push = 1'b1; stk_push_data = cdl_data; pc_inc = 1'b1; end
      S_CDC_GO: if (r3 == '0) pc_inc = 1'b1;
        else if (range_ok(r1, r3)) begin
          cdc_start = 1'b1; mem_touch = 1'b1; mem_touch_end = (MAW+1)'(r1 + r3);
          gas_charge = 1'b1; gas_op = OP_STOP; gas_extra = 3 * words_of(r3);
        end
      S_CDC_WAIT: if (cdc_done) pc_inc = 1'b1;
      S_MTOUCH: if (range_ok(r1, 32)) begin mem_touch = 1'b1; mem_touch_end = (MAW+1)'(r1 + 32); end
      S_MLD: begin mem_re = 1'b1; mem_raddr = MAW'(r1 + cnt); end
      S_PUSHR0: begin stk_push = 1'b1; stk_push_data = r0; pc_inc = 1'b1; end
      S_MST: if (range_ok(r1, 32)) begin
        mem_we = 1'b1;
        if (cnt == 0) begin mem_touch = 1'b1; mem_touch_end = (MAW+1)'(r1 + 32); end
        if (cnt == 31) pc_inc = 1'b1;
      end
      S_MST8: if (range_ok(r1, 1)) begin
        mem_we = 1'b1; mem_waddr = MAW'(r1); mem_wdata = r2[7:0];
        mem_touch = 1'b1; mem_touch_end = (MAW+1)'(r1 + 1); pc_inc = 1'b1;
      end
      S_MCP_GO: if (r3 == '0) pc_inc = 1'b1;
        else if (range_ok(r1, r3) && range_ok(r2, r3)) begin
          mem_touch = 1'b1;
          mem_touch_end = (r1 > r2) ? (MAW+1)'(r1 + r3) : (MAW+1)'(r2 + r3);
          gas_charge = 1'b1; gas_op = OP_STOP; gas_extra = 3 * words_of(r3);
        end
      S_MCP: begin
        mem_re = (17'(cnt) < r3[16:0]); mem_raddr = mcp_src;
        mem_we = (cnt != 0); mem_waddr = mcp_dst; mem_wdata = mem_rdata;
        if (17'(cnt) == r3[16:0]) pc_inc = 1'b1;
      end
      S_RET_GO: if (r2 != '0 && range_ok(r1, r2)) begin
        mem_touch = 1'b1; mem_touch_end = (MAW+1)'(r1 + r2);
      end
      S_RET: begin
        mem_re = (17'(cnt) < r2[16:0]); mem_raddr = MAW'(r1 + cnt);
        rtn_we = (cnt != 0);
      end
      S_KEC_GO: if (r2 <= word_t'(MAX_HASH) && range_ok(r1, r2)) begin
        mem_touch = (r2 != '0); mem_touch_end = (MAW+1)'(r1 + r2);
        gas_charge = 1'b1; gas_op = OP_STOP; gas_extra = 6 * words_of(r2);
      end
      S_KEC_RD: begin mem_re = (17'(cnt) < r2[16:0]); mem_raddr = MAW'(r1 + cnt); end
      S_KEC_START: kec_start = 1'b1;
      S_KEC_WAIT: if (kec_done && !is_c2) begin
        stk_push = 1'b1; stk_push_data = kec_digest; pc_inc = 1'b1;
      end
      S_C2_SALT: stk_pop = 1'b1;
      S_CR_GO: if (range_ok(r2, r3)) begin
        mem_touch = (r3 != '0); mem_touch_end = (MAW+1)'(r2 + r3);
      end
      S_FMT_START: begin kec_start = 1'b1; kec_msg = fmt_msg[1023 -: MAX_HASH*8]; kec_len = fmt_len; end
      S_FMT_WAIT: if (kec_done) begin stk_push = 1'b1; stk_push_data = fmt_addr; pc_inc = 1'b1; end
      default: ;
    endcase
    if (state != S_IDLE && state != S_FETCH && oog) begin
      // out of gas: stop changing architectural state
      stk_push = 1'b0; stk_pop = 1'b0; stk_poke = 1'b0; str_wr = 1'b0;
    end
  end

  // ---------------- sequencing and registers ----------------
  task automatic finish(input halt_e why);
    halt    <= why;
    done    <= 1'b1;
    clr_req <= 1'b1;
    state <= S_IDLE;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; exec_st <= S_ALU; pops_left <= '0;
      r0 <= '0; r1 <= '0; r2 <= '0; r3 <= '0; r4 <= '0; r5 <= '0;
      op_q <= '0; cnt <= '0; jumped <= 1'b0; is_c2 <= 1'b0; mcp_back <= 1'b0;
      start_pend <= 1'b0; clr_req <= 1'b0; nonce <= '0; done <= 1'b0; halt <= HALT_NONE; ret_len <= '0;
    end else begin
      if (start && state == S_IDLE) start_pend <= 1'b1;
      if (state != S_IDLE && state != S_FETCH && oog) begin
        finish(HALT_OOG);
      end else begin
        unique case (state)
          S_IDLE: if (start_pend && mem_ready && !clr_req) begin
            start_pend <= 1'b0; is_c2 <= 1'b0; done <= 1'b0; halt <= HALT_NONE; ret_len <= '0;
            jumped <= 1'b0; nonce <= s_nonce; state <= S_FETCH;
          end
          S_FETCH: begin
            if (oog)                               finish(HALT_OOG);
            else if (pc_at_end)                    finish(HALT_REVERT);
            else if (!op_valid)                    ;   // BUFF loading from RAM
            else if (jumped && op != OP_JUMPDEST)  finish(HALT_BADJUMP);
            else if (!supported(op))               finish(HALT_INVALID);
            else if (stk_bad)                      finish(HALT_STACK);
            else begin
              jumped <= 1'b0;
              op_q   <= op;
              r1     <= stk_top;
              unique casez (op)
                OP_STOP: finish(HALT_STOP);
                OP_MLOAD, OP_MSTORE, OP_MSTORE8: begin
                  pops_left <= pops_of(op) - 1'b1; exec_st <= exec_of(op); state <= S_POPA;
                end
                8'b011?_????: begin cnt <= 17'(op[4:0]) + 1'b1; r0 <= '0; state <= S_PUSHIMM; end
                8'b1000_????: state <= S_DUP_RD;
                8'b1001_????: state <= S_SWAP_RD;
                OP_PUSH0, OP_ADDRESS, OP_CALLER, OP_CALLVALUE, OP_CDSIZE, OP_CODESIZE,
                OP_PC, OP_MSIZE, OP_GAS, OP_POP, OP_JUMPDEST: state <= S_FETCH;
                OP_ISZERO, OP_NOT: state <= S_ALU;
                default: begin
                  exec_st <= exec_of(op);
                  if (pops_of(op) > 1) begin pops_left <= pops_of(op) - 2'd2; state <= S_POPB; end
                  else state <= exec_of(op);
                end
              endcase
            end
          end
          S_PUSHIMM: if (op_valid || pc_at_end) begin
            r0  <= {r0[247:0], imm_byte};
            cnt <= cnt - 1'b1;
            if (cnt == 1) state <= S_FETCH;
          end
          S_POPA: begin
            r1 <= stk_top;
            if (pops_left != 0) begin pops_left <= pops_left - 1'b1; state <= S_POPB; end
            else state <= exec_st;
          end
          S_POPB: begin
            r2 <= stk_top;
            if (pops_left != 0) begin pops_left <= pops_left - 1'b1; state <= S_POPC; end
            else state <= exec_st;
          end
          S_POPC: begin r3 <= stk_top; state <= exec_st; end
          S_ALU:  state <= S_ALUW;
          S_ALUW: if (alu_done) state <= S_FETCH;
          S_DUP_RD: begin r1 <= stk_rd_data; state <= S_PUSHR1; end
          S_PUSHR1: state <= S_FETCH;
          S_SWAP_RD: begin r2 <= stk_rd_data; state <= S_SWAP_W1; end
          S_SWAP_W1: state <= S_SWAP_W2;
          S_SWAP_W2: state <= S_FETCH;
          S_SLOAD_RD: state <= S_SLOAD_PUSH;
          S_SLOAD_PUSH: state <= S_FETCH;
          S_SSTORE: if (str_collide) finish(HALT_INVALID); else state <= S_FETCH;
          S_JUMP: if (!pc_tgt_ok) finish(HALT_BADJUMP);
                  else begin jumped <= 1'b1; state <= S_FETCH; end
          S_JUMPI: if (r2 == '0) state <= S_FETCH;
                   else if (!pc_tgt_ok) finish(HALT_BADJUMP);
                   else begin jumped <= 1'b1; state <= S_FETCH; end
          S_CDLOAD: state <= S_FETCH;
          S_CDC_GO: if (r3 == '0) state <= S_FETCH;
                    else if (!range_ok(r1, r3)) finish(HALT_OOG);
                    else state <= S_CDC_WAIT;
          S_CDC_WAIT: if (cdc_done) state <= S_FETCH;
          S_MTOUCH: if (!range_ok(r1, 32)) finish(HALT_OOG);
                    else begin cnt <= '0; r0 <= '0; state <= S_MLD; end
          S_MLD: begin
            if (cnt != 0) r0 <= mload_word;
            cnt <= cnt + 1'b1;
            if (cnt == 31) state <= S_MLD_LAST;
          end
          S_MLD_LAST: begin r0 <= mload_word; state <= S_PUSHR0; end
          S_PUSHR0: state <= S_FETCH;
          S_MST: if (!range_ok(r1, 32)) finish(HALT_OOG);
                 else begin
                   cnt <= cnt + 1'b1;
                   if (cnt == 31) begin cnt <= '0; state <= S_FETCH; end
                 end
          S_MST8: if (!range_ok(r1, 1)) finish(HALT_OOG); else state <= S_FETCH;
          S_MCP_GO: if (r3 == '0) state <= S_FETCH;
                    else if (!(range_ok(r1, r3) && range_ok(r2, r3))) finish(HALT_OOG);
                    else begin cnt <= '0; mcp_back <= (r1 > r2); state <= S_MCP; end
          S_MCP: if (17'(cnt) == r3[16:0]) begin cnt <= '0; state <= S_FETCH; end
                 else cnt <= cnt + 1'b1;
          S_RET_GO: begin
            ret_len <= ($clog2(MEM_BYTES)+1)'(r2);
            cnt <= '0;
            if (r2 == '0) finish(op_q == OP_RETURN ? HALT_RETURN : HALT_REVERT);
            else if (!range_ok(r1, r2)) begin ret_len <= '0; finish(HALT_OOG); end
            else state <= S_RET;
          end
          S_RET: if (17'(cnt) == r2[16:0]) finish(op_q == OP_RETURN ? HALT_RETURN : HALT_REVERT);
                 else cnt <= cnt + 1'b1;
          S_C2_GO: begin
            r1 <= r2; r2 <= r3; is_c2 <= 1'b1; state <= S_KEC_GO;
          end
          S_KEC_GO: if (r2 > word_t'(MAX_HASH)) finish(HALT_INVALID);
                    else if (!range_ok(r1, r2)) finish(HALT_OOG);
                    else begin cnt <= '0; r4 <= '0; state <= S_KEC_RD; end
          S_KEC_RD: begin
            if (cnt != 0) r4 <= {r4[MAX_HASH*8-9:0], mem_rdata};
            if (17'(cnt) == r2[16:0]) state <= S_KEC_START;
            else cnt <= cnt + 1'b1;
          end
          S_KEC_START: state <= S_KEC_WAIT;
          S_KEC_WAIT: if (kec_done) begin
            if (is_c2) begin r5 <= kec_digest; state <= S_C2_SALT; end
            else state <= S_FETCH;
          end
          S_C2_SALT: begin r1 <= stk_top; state <= S_FMT_START; end
          S_CR_GO: if (!range_ok(r2, r3)) finish(HALT_OOG);
                   else begin is_c2 <= 1'b0; state <= S_FMT_START; end
          S_FMT_START: state <= S_FMT_WAIT;
          S_FMT_WAIT: if (kec_done) begin
            nonce <= nonce + 1'b1; is_c2 <= 1'b0; state <= S_FETCH;
          end
          default: state <= S_IDLE;
        endcase
      end
      if (clr_req) clr_req <= 1'b0;
    end
  end

  // MEM is zeroed after every contract; the next start waits for it
  assign mem_clear = clr_req;
  assign busy      = (state != S_IDLE) || start_pend;
endmodule
