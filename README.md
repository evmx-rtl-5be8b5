# EVMx: an Ethereum Virtual Machine in hardware

EVMx runs smart-contract bytecode directly in logic. It does not decode a
whole contract ahead of time or schedule independent instructions in parallel.
It behaves like a small in-order processor whose resources are those of the EVM
itself: a bytecode store, a 1024-entry stack of 256-bit words, a
byte-addressable memory, a key/value storage, a gas meter and a return-data
buffer. The control unit handles one opcode at a time in the order the
bytecode gives. Each opcode costs only the few cycles its data movement
needs. At the 142 MHz target clock, ADD takes 4 cycles (28 ns), POP takes 1
and MLOAD takes 37.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable apart from the
testbenches. It uses no vendor primitives, and every memory is an inferred
array. The only multipliers are the small ones in the gas unit; all the
256-bit arithmetic is iterative.

## Block map

```
            bytecode_in (256 b/cycle)
                 |
             +---R6---+        +------+  op   +---------------------------+
             |  BCM   |--op--->|  CU  |------>| R0 (PUSH/MLOAD bytes)     |
             | RAM    |<--pc---|      |       | R1 R2 R3 popped operands  |
             | BUFF   |        |      |       | R4 1024-bit hash gatherer |
             +--------+        +------+       | R5 init-code digest       |
                 ^  PC <-- jump   |           +---------------------------+
                 |                | steers
   +-------+  +-----+  +-----+  +-----+  +-----+  +-----+  +------------+
   |  GAS  |  | STK |  | MEM |  | STR |  | RTN |  | ALU |  | KEC + CAT/ |
   |       |  |1024 |  |36 KB|  |1024 |  |36 KB|  |MUL  |  | RLP / ADDR |
   +-------+  +-----+  +-----+  +-----+  +-----+  |DIV  |  +------------+
                          ^                       |EXP  |
              CALLDATALOAD / CALLDATACOPY units   +-----+
```

| Module | Role |
|---|---|
| `evmx_top` | Wires all the blocks together and presents the host ports |
| `evmx_cu` | Control unit: the execution loop, registers R0–R5, gas and stack checks |
| `evmx_bcm` | Bytecode memory: R6 loader, 256 × 1024-bit RAM, 128-byte BUFF, bypass multiplexer |
| `evmx_pc` | 15-bit program counter and the code-length limit |
| `evmx_gas` | Gas counter: static cost per opcode, dynamic cost, memory-expansion cost |
| `evmx_stack` | 1024 × 256-bit stack with random access for DUPn/SWAPn |
| `evmx_mem` | 36,864-byte memory; tracks its active size and zeroes itself |
| `evmx_storage` | 1024-entry storage with 6-byte keys and a 32-bit read-out port |
| `evmx_rtn` | 36,864-byte return-data memory, read as 32-bit words |
| `evmx_alu` | Single-cycle ALU operations and the sequencing of MUL/DIV/EXP |
| `evmx_booth_mult`, `evmx_div`, `evmx_exp` | Iterative multiplier, divider and exponentiation units |
| `evmx_keccak` | Keccak-256 over one padded 1088-bit block |
| `evmx_create_fmt` | CREATE2 pre-image (CAT), CREATE pre-image (RLP), address extraction (ADDR) |
| `evmx_calldataload`, `evmx_calldatacopy` | Access to the transaction's input data |
| `evmx_pkg` | Shared types, opcode constants, the static gas table |

## Fetching bytecode: RAM, BUFF and the bypass

This part is the least obvious, because it lets the engine fetch one byte per
cycle from a RAM that is 1024 bits wide.

The code store is 256 words of 1024 bits, which is 32 KiB. That is more than
the 24,576-byte limit on deployed Ethereum code. The host streams the code in
256 bits per cycle. The register R6 collects four chunks and writes them as
one word. Within a word, the first code byte is the most significant byte.

The 15-bit PC is split in two:

- PC[14:7] selects a RAM word.
- PC[6:0] selects a byte inside the 128-byte register BUFF. BUFF holds a copy
  of the current word.

The RAM output is registered (rO). The byte sent to the control unit (`op`)
comes from BUFF when BUFF holds the PC's word. If BUFF does not hold it but rO
does, a multiplexer takes the byte straight from rO, and BUFF loads rO in the
same cycle.

While the PC is at byte 126 or 127, the next word is read ahead into rO. As a
result, running off the end of BUFF never costs a cycle.

A jump to a different word is the only case that stalls. `op_valid` drops for
one cycle while the target word is read. The end-to-end test measures both
behaviours.

## The control unit

`evmx_cu` is one state machine. It has no separate decode stage:

1. In the cycle an opcode byte arrives, the CU checks it.
   - The opcode must be implemented.
   - The stack must hold enough items and have room for the result.
   - The static gas is charged.
2. The CU then steps through the states the opcode needs.
3. Between opcodes, the gas unit adds the memory-expansion charge. This
   charge is ΔC_mem, where C_mem(a) = 3a + ⌊a²/512⌋ and a is the memory size in
   32-byte words.

Registers:

- R0 collects the immediate bytes of PUSHn, one per cycle, and the 32 bytes
  of MLOAD.
- R1, R2 and R3 hold popped operands.
- R4 is a 1024-bit shift register. It gathers memory bytes for KECCAK256 and
  CREATE2.
- R5 holds the init-code digest used by CREATE2.

Cycle counts, counted from the opcode's arrival to the next opcode's arrival:

| Opcodes | Cycles |
|---|---|
| POP, PUSH0, JUMPDEST, ADDRESS, CALLER, CALLVALUE, PC, MSIZE, GAS, CODESIZE | 1 |
| PUSHn | 1 + n |
| CALLDATALOAD | 2 |
| DUPn, SLOAD, SSTORE | 3 |
| one-operand ALU operations (ISZERO, NOT) | 3 |
| two-operand ALU operations, SWAPn | 4 |
| MUL, DIV, MOD, SDIV, SMOD, EXP | 4, or 4 + iterations when no shortcut applies |
| MSTORE8 | 4 |
| MSTORE | 35 |
| MLOAD | 37 |
| KECCAK256 | about 1 per input byte, plus 25 for the hash |
| CALLDATACOPY, MCOPY, RETURN, REVERT | about 1 per byte |
| JUMP, JUMPI taken | +1 when the target lies in another 1024-bit word |

At 142 MHz these counts match the published per-opcode times for ADD, SUB,
EQ, AND, OR, ADDRESS, CALLER, CALLVALUE, POP, MLOAD, MSTORE, SLOAD, PUSH1,
SWAP1 and DUP1. The state sequences that produce them are this
implementation's own.

### How a run ends

`halt` gives the reason a run ended:

| Code | Cause |
|---|---|
| `HALT_STOP` | STOP |
| `HALT_RETURN` | RETURN |
| `HALT_REVERT` | REVERT, or running past the end of the code |
| `HALT_INVALID` | An invalid or unsupported opcode, a storage collision, or a hash input over 128 bytes |
| `HALT_OOG` | Out of gas, or a memory range beyond 36,864 bytes |
| `HALT_STACK` | Stack underflow or overflow |
| `HALT_BADJUMP` | A jump to a byte that is not JUMPDEST |

RETURN and REVERT copy their data into the return-data memory (RTN).

## Arithmetic

None of the large operations use a multiplier array. They all run as
iterative loops around a 257-bit adder:

- **Multiplication** uses radix-2 Booth recoding.
  - RA accumulates and RQ holds the multiplier. The pair shifts right once
    per cycle, for 257 cycles in total.
  - An operand of 0, 1 or a power of two is handled in a single cycle.
- **Division and modulo** use a non-restoring divider.
  - RA:RQ shifts left once per cycle. RM is added or subtracted depending on
    the sign of RA, and one final correction fixes the remainder.
  - These cases finish in one cycle: divisor 0 (the EVM result is 0),
    divisor 1, a power of two, a divisor larger than the dividend, and a
    dividend of 0.
  - SDIV and SMOD divide the magnitudes and correct the sign afterwards.
- **Exponentiation** is square-and-multiply using two Booth multipliers in
  parallel.
  - One computes RA·RM and the other RM². RQ shifts the exponent right one
    bit per round.
  - It stops early when RM has become 1, RA has become 0, or no exponent
    bits remain.
  - Base 2 becomes a shift. Base 0, base 1 and exponent 0 are immediate.

## Hashing and contract addresses

`evmx_keccak` absorbs one 136-byte block into a zeroed state. The padding is
0x01 after the message and 0x80 in the last byte. This is the original
Keccak, not SHA-3. The unit then runs one round per clock, 24 rounds in all.
The round constants and rotation offsets are computed from the Keccak
definitions when the design is elaborated.

R4 holds at most 128 bytes, so a single block is always enough.

The address of a new contract is computed as follows:

- CREATE2 hashes `0xff ‖ sender ‖ salt ‖ keccak(init code)`, which is 85
  bytes.
- CREATE hashes the RLP encoding of `[sender, nonce]`.
- The address is the last 20 bytes of the digest.

The tests check all of these against published Ethereum results.

## Memory, storage and return data

- **MEM** is byte-wide with one synchronous read port and one write port.
  - It records the highest 32-byte word touched, for the gas charge and for
    MSIZE.
  - After reset it zeroes all 36,864 bytes. After each run it zeroes the
    bytes that run used, at one byte per cycle.
  - `start` waits until that clearing has finished.
- **STR** has 1024 entries of 256-bit values.
  - An entry is chosen by the 10 low bits of the 6-byte key. The other 38
    bits are stored as a tag, so a key that is absent reads 0.
  - If a second key maps to an entry that is already in use, that is a
    collision, and the run halts. This placement is a choice of this
    implementation.
  - The host can preload entries before a run. After the run it reads them
    back 32 bits at a time (`ostore_idx`, `ostore_sel`), with `o_key` and
    `o_valid`.
- **RTN** holds the RETURN/REVERT data. It is read as big-endian 32-bit words
  on `ret_val`, one cycle after `ret_raddr`.

## Using the top level

Everything runs on one clock, `clk`, with an asynchronous active-low reset,
`rst_n`. A run looks like this:

1. Pulse `load_start`. Then present the code 32 bytes per cycle on
   `bytecode_in` with `bc_valid`, padding the code to a multiple of 128
   bytes.
2. Optionally pulse `str_clear`, then write storage entries with
   `str_host_we`, `str_host_key` and `str_host_val`.
3. Set up the inputs:
   - `code_len` and `gval` (the gas limit);
   - `s_addr`, `caller`, `val` and `s_nonce`;
   - the input data, on `ext_data` (byte 0 in the most significant byte) and
     `cd_size`.
4. Pulse `start`.
5. Wait for `done`. Then read `halt`, `gas_left`, `ret_len`, RTN and STR.

`tb/tb_evmx_top.sv` is a complete working example. It assembles its programs
in SystemVerilog.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `CODE_WORDS` | 256 | BCM words of 1024 bits (PC[14:7]) |
| `STACK_DEPTH` | 1024 | Stack entries |
| `MEM_BYTES` | 36864 | MEM and RTN bytes (288 kbit each) |
| `STR_DEPTH` | 1024 | Storage entries |
| `CD_BYTES` | 256 | Largest transaction input data |

## What is not implemented, and where this design departs from the original

- **Unsupported opcodes.** The following halt as INVALID:
  - the CALL family (CALL, CALLCODE, DELEGATECALL, STATICCALL);
  - LOG0–LOG4 and SELFDESTRUCT;
  - ADDMOD and MULMOD;
  - the block and transaction environment opcodes other than those listed
    above, including BALANCE, ORIGIN, GASPRICE, EXTCODE*, RETURNDATA*,
    BLOCKHASH, TIMESTAMP and NUMBER.
- **CREATE and CREATE2** compute and push the new address and increment the
  nonce. They do not run the init code and do not transfer value.
- **Initialization code** is not executed. Storage and the environment are
  set from the host ports.
- **Hash input size.** KECCAK256 and CREATE2 take at most 128 bytes of input.
- **Storage semantics are simplified.**
  - SLOAD and SSTORE charge a flat 100 gas. There are no access lists and no
    refunds.
  - REVERT and error halts do not roll storage back. The local storage is a
    working copy: the host should commit `o_store` only when `halt` reports
    STOP or RETURN.
- **Size of the bytecode store.** It is 262,144 bits (256 words of 1024 bits),
  which is what the 15-bit PC can address. The original quotes 522 kbit for
  the same memory.
- **Address bytes.** The new-contract address is taken from the last 20 bytes
  of the digest, as Ethereum defines it. The original text says "first".
- **End of code.** Running past the end of the code is treated as a failed
  run (REVERT code), as the execution loop this design follows specifies.
  The Ethereum EVM treats it as STOP.
- **Jump checks.** JUMP checks only the byte at the target. It does not
  exclude JUMPDEST bytes that sit inside PUSH data.
- **MCOPY with overlap.** When the areas overlap, MCOPY copies backwards if
  the destination is above the source, so the result is still correct.

## Verification

Each module in `rtl/` has a self-checking testbench in `tb/` named
`tb_<module>`. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog. The reference results are computed independently of the RTL:

- native SystemVerilog arithmetic for the ALU, multiplier, divider and
  exponentiation units;
- a byte-level memory model;
- published Keccak-256 digests, plus CREATE and CREATE2 addresses.

`tb_evmx_cu` measures the per-opcode cycle counts listed above.

`tb_evmx_top` runs the whole engine at its default size. It makes each
mechanism happen at least once and counts them:

- sequential BUFF refill through the bypass, and the far-jump stall;
- JUMPI taken and not taken;
- the iterative and shortcut arithmetic paths, and signed division;
- KECCAK256, CREATE and CREATE2;
- CALLDATALOAD, CALLDATACOPY, and MCOPY in both directions;
- memory expansion;
- storage preload and collision;
- RETURN, REVERT and every error halt.

A mechanism that never happened counts as a failure.

`tb_evmx_contract` runs a small contract written in the style of compiled
Solidity code as a series of transactions. The contract begins with the
usual prologue (`60 60 60 40 52 36 15 61 00 EE 57`) and dispatches on the
4-byte function selector. It covers storing a value, incrementing it,
reading it back, a fallback routine in the second code word, and an unknown
selector that reverts. Storage persists between the transactions. The test
checks the results, the halt reasons and the gas used, which was worked out
by hand from the fee schedule.

Simulating with Verilator 5 (the two-state simulator starts with random
values, so everything that is read is reset or initialized):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/evmx_pkg.sv tb/tb_evmx_top.sv \
          --top-module tb_evmx_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_evmx_top` with any other testbench name to run that block on its
own.
