// Shared types and constants of the EVMx smart-contract engine.
//
// The datapath word is the EVM word of 256 bits. Opcode numbers and the
// static (minimum) gas of each opcode follow the public EVM specification;
// the gas function below is the lookup table held by the gas module.
// Opcodes the engine executes are listed in `op_e`; every other byte is
// treated as an invalid opcode by the control unit.
package evmx_pkg;

  localparam int unsigned WORD_W = 256;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [159:0]      addr_t;   // Ethereum account address
  typedef logic [63:0]       gas_t;

  // Opcode byte values (EVM specification)
  localparam logic [7:0] OP_STOP       = 8'h00;
  localparam logic [7:0] OP_ADD        = 8'h01;
  localparam logic [7:0] OP_MUL        = 8'h02;
  localparam logic [7:0] OP_SUB        = 8'h03;
  localparam logic [7:0] OP_DIV        = 8'h04;
  localparam logic [7:0] OP_SDIV       = 8'h05;
  localparam logic [7:0] OP_MOD        = 8'h06;
  localparam logic [7:0] OP_SMOD       = 8'h07;
  localparam logic [7:0] OP_EXP        = 8'h0A;
  localparam logic [7:0] OP_SIGNEXTEND = 8'h0B;
  localparam logic [7:0] OP_LT         = 8'h10;
  localparam logic [7:0] OP_GT         = 8'h11;
  localparam logic [7:0] OP_SLT        = 8'h12;
  localparam logic [7:0] OP_SGT        = 8'h13;
  localparam logic [7:0] OP_EQ         = 8'h14;
  localparam logic [7:0] OP_ISZERO     = 8'h15;
  localparam logic [7:0] OP_AND        = 8'h16;
  localparam logic [7:0] OP_OR         = 8'h17;
  localparam logic [7:0] OP_XOR        = 8'h18;
  localparam logic [7:0] OP_NOT        = 8'h19;
  localparam logic [7:0] OP_BYTE       = 8'h1A;
  localparam logic [7:0] OP_SHL        = 8'h1B;
  localparam logic [7:0] OP_SHR        = 8'h1C;
  localparam logic [7:0] OP_SAR        = 8'h1D;
  localparam logic [7:0] OP_KECCAK256  = 8'h20;
  localparam logic [7:0] OP_ADDRESS    = 8'h30;
  localparam logic [7:0] OP_CALLER     = 8'h33;
  localparam logic [7:0] OP_CALLVALUE  = 8'h34;
  localparam logic [7:0] OP_CDLOAD     = 8'h35;
  localparam logic [7:0] OP_CDSIZE     = 8'h36;
  localparam logic [7:0] OP_CDCOPY     = 8'h37;
  localparam logic [7:0] OP_CODESIZE   = 8'h38;
  localparam logic [7:0] OP_POP        = 8'h50;
  localparam logic [7:0] OP_MLOAD      = 8'h51;
  localparam logic [7:0] OP_MSTORE     = 8'h52;
  localparam logic [7:0] OP_MSTORE8    = 8'h53;
  localparam logic [7:0] OP_SLOAD      = 8'h54;
  localparam logic [7:0] OP_SSTORE     = 8'h55;
  localparam logic [7:0] OP_JUMP       = 8'h56;
  localparam logic [7:0] OP_JUMPI      = 8'h57;
  localparam logic [7:0] OP_PC         = 8'h58;
  localparam logic [7:0] OP_MSIZE      = 8'h59;
  localparam logic [7:0] OP_GAS        = 8'h5A;
  localparam logic [7:0] OP_JUMPDEST   = 8'h5B;
  localparam logic [7:0] OP_MCOPY      = 8'h5E;
  localparam logic [7:0] OP_PUSH0      = 8'h5F;
  localparam logic [7:0] OP_PUSH1      = 8'h60;
  localparam logic [7:0] OP_PUSH32     = 8'h7F;
  localparam logic [7:0] OP_DUP1       = 8'h80;
  localparam logic [7:0] OP_DUP16      = 8'h8F;
  localparam logic [7:0] OP_SWAP1      = 8'h90;
  localparam logic [7:0] OP_SWAP16     = 8'h9F;
  localparam logic [7:0] OP_CREATE     = 8'hF0;
  localparam logic [7:0] OP_RETURN     = 8'hF3;
  localparam logic [7:0] OP_CREATE2    = 8'hF5;
  localparam logic [7:0] OP_REVERT     = 8'hFD;

  // ALU operation selector
  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_MUL, ALU_DIV, ALU_SDIV, ALU_MOD, ALU_SMOD, ALU_EXP,
    ALU_SIGNEXT, ALU_LT, ALU_GT, ALU_SLT, ALU_SGT, ALU_EQ, ALU_ISZERO,
    ALU_AND, ALU_OR, ALU_XOR, ALU_NOT, ALU_BYTE, ALU_SHL, ALU_SHR, ALU_SAR
  } alu_op_e;

  // Why execution ended
  typedef enum logic [2:0] {
    HALT_NONE, HALT_STOP, HALT_RETURN, HALT_REVERT,
    HALT_INVALID, HALT_OOG, HALT_STACK, HALT_BADJUMP
  } halt_e;

  // Static gas of an opcode (minimum gas, EVM specification).
  function automatic gas_t static_gas(input logic [7:0] op);
    gas_t g;
    unique casez (op)
      OP_STOP, OP_RETURN, OP_REVERT: g = 0;
      OP_ADD, OP_SUB, OP_LT, OP_GT, OP_SLT, OP_SGT, OP_EQ, OP_ISZERO,
      OP_AND, OP_OR, OP_XOR, OP_NOT, OP_BYTE, OP_SHL, OP_SHR, OP_SAR,
      OP_CDLOAD, OP_CDCOPY, OP_MLOAD, OP_MSTORE, OP_MSTORE8, OP_MCOPY: g = 3;
      OP_MUL, OP_DIV, OP_SDIV, OP_MOD, OP_SMOD, OP_SIGNEXTEND: g = 5;
      OP_EXP, OP_JUMPI: g = 10;
      OP_JUMP: g = 8;
      OP_KECCAK256: g = 30;
      OP_ADDRESS, OP_CALLER, OP_CALLVALUE, OP_CDSIZE, OP_CODESIZE, OP_POP,
      OP_PC, OP_MSIZE, OP_GAS, OP_PUSH0: g = 2;
      OP_JUMPDEST: g = 1;
      OP_SLOAD, OP_SSTORE: g = 100;
      OP_CREATE, OP_CREATE2: g = 32000;
      8'b011?_????, 8'b100?_????: g = 3; // PUSH1..PUSH32, DUP1..SWAP16
      default: g = 0;
    endcase
    return g;
  endfunction

endpackage
