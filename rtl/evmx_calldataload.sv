// CALLDATALD unit of EVMx: the CALLDATALOAD opcode.
//
// Returns the 32 bytes of the transaction input data (`ext_data`) that
// start at byte `offset`, first byte in the top byte of the result; bytes at
// or past `cd_size` read as zero, as the EVM requires. Purely combinational.
// The input data is held in a register array of CD_BYTES bytes (byte 0 in
// the top byte of `ext_data`); its size is this design's choice.
module evmx_calldataload
  import evmx_pkg::*;
#(
  parameter int unsigned CD_BYTES = 256
) (
  input  logic [CD_BYTES*8-1:0]        ext_data,
  input  logic [$clog2(CD_BYTES):0]    cd_size,
  input  word_t                        offset,
  output word_t                        data
);
  always_comb begin
    data = '0;
    for (int i = 0; i < 32; i++) begin
      if (offset < 256'(cd_size) && (offset + 256'(i)) < 256'(cd_size))
        data[8*(31 - i) +: 8] = ext_data[8*(CD_BYTES - 1 - int'(offset[$clog2(CD_BYTES)-1:0]) - i) +: 8];
    end
  end
endmodule
