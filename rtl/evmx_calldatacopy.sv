// CALLDATACPY unit of EVMx: the CALLDATACOPY opcode.
//
// Copies `size` bytes of the transaction input data, starting at byte
// `src`, into MEM starting at byte `dst`, one byte per cycle because MEM is
// byte addressable. Input bytes at or past `cd_size` are written as zero.
// Pulse `start`; byte i is written in cycle i+1 after start through
// `mem_we`/`mem_waddr`/`mem_wdata`; `done` pulses in the cycle after the
// last byte, size+1 cycles after start (one cycle when `size` is 0).
module evmx_calldatacopy
  import evmx_pkg::*;
#(
  parameter int unsigned CD_BYTES  = 256,
  parameter int unsigned MEM_BYTES = 36864
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [CD_BYTES*8-1:0]         ext_data,
  input  logic [$clog2(CD_BYTES):0]     cd_size,
  input  logic [$clog2(MEM_BYTES)-1:0]  dst,
  input  word_t                         src,
  input  logic [$clog2(MEM_BYTES):0]    size,
  output logic                          busy,
  output logic                          done,
  output logic                          mem_we,
  output logic [$clog2(MEM_BYTES)-1:0]  mem_waddr,
  output logic [7:0]                    mem_wdata
);
  localparam int unsigned MAW = $clog2(MEM_BYTES);

  logic [MAW-1:0] d_q;
  word_t          s_q;
  logic [MAW:0]   left;

  logic in_range;
  assign in_range = s_q < 256'(cd_size);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; d_q <= '0; s_q <= '0; left <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        d_q <= dst; s_q <= src; left <= size;
        busy <= (size != '0);
        done <= (size == '0);
      end else if (busy) begin
        d_q  <= d_q + 1'b1;
        s_q  <= s_q + 1'b1;
        left <= left - 1'b1;
        if (left == 1) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end

  assign mem_we    = busy;
  assign mem_waddr = d_q;
  assign mem_wdata = in_range ? ext_data[8*(CD_BYTES - 1 - int'(s_q[$clog2(CD_BYTES)-1:0])) +: 8] : 8'h00;
endmodule
