// Byte-addressable memory (MEM) of EVMx.
//
// The EVM memory is a byte array that starts at zero and grows in 32-byte
// words. This block has one synchronous read port (data one cycle after
// `re`) and one write port, so a copy can read one byte while it writes the
// previous one. `touch` reports the end (offset + size, in bytes) of a range
// about to be used; the block keeps the highest word count touched,
// `active_words`, which is MSIZE/32 and drives the memory-expansion gas.
//
// Zeroing: after reset the whole array is cleared, and `clear` (at the end
// of a contract) zeroes the bytes that were touched, one byte per cycle;
// `ready` is low while that runs. The size, 288 kb (36864 bytes), follows
// the document; the clearing sequencer is this design's choice.
module evmx_mem #(
  parameter int unsigned BYTES = 36864
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  output logic                      ready,
  input  logic                      re,
  input  logic [$clog2(BYTES)-1:0]  raddr,
  output logic [7:0]                rdata,
  input  logic                      we,
  input  logic [$clog2(BYTES)-1:0]  waddr,
  input  logic [7:0]                wdata,
  input  logic                      touch,
  input  logic [$clog2(BYTES):0]    touch_end,
  output logic [$clog2(BYTES)-4:0]  active_words
);
  localparam int unsigned AW = $clog2(BYTES);
  localparam int unsigned WCW = AW - 3;

  logic [7:0] mem [BYTES];

  logic          clearing;
  logic [AW:0]   clr_addr, clr_end;

  logic [WCW-1:0] touch_words;
  assign touch_words = WCW'(({1'b0, touch_end} + (AW + 2)'(31)) >> 5);

  always_ff @(posedge clk) begin
    if (clearing)  mem[clr_addr[AW-1:0]] <= 8'h00;
    else if (we)   mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1; clr_addr <= '0; clr_end <= (AW+1)'(BYTES); active_words <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr + 1'b1 >= clr_end) clearing <= 1'b0;
    end else if (clear) begin
      active_words <= '0;
      if (active_words != '0) begin
        clearing <= 1'b1;
        clr_addr <= '0;
        clr_end  <= $bits(clr_end)'({active_words, 5'b0});
      end
    end else if (touch && touch_words > active_words) begin
      active_words <= touch_words;
    end
  end

  assign ready = !clearing;
endmodule
