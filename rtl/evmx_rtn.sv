// Return-data memory (RTN) of EVMx.
//
// RETURN and REVERT copy a range of MEM here, one byte per cycle; after the
// contract ends the host reads it 32 bits at a time on `ret_val`, with byte
// 0 of the return data in the top byte of word 0. The array is organised in
// 32-bit words with byte writes so that one read port serves the host.
// Read data appears one cycle after the address. Size (288 kb) and the
// 32-bit read-out width follow the document; the word organisation is this
// design's choice.
module evmx_rtn #(
  parameter int unsigned BYTES = 36864
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [$clog2(BYTES)-1:0]   waddr,
  input  logic [7:0]                 wdata,
  input  logic [$clog2(BYTES)-3:0]   raddr,      // 32-bit word index
  output logic [31:0]                ret_val
);
  localparam int unsigned NW = BYTES / 4;
  logic [31:0] mem [NW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[$clog2(BYTES)-1:2]][{~waddr[1:0], 3'b000} +: 8] <= wdata;
    ret_val <= mem[raddr];
  end
endmodule
