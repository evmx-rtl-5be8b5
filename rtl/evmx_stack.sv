// Stack (STK) of EVMx: DEPTH words of 256 bits, last in first out.
//
// The EVM stack holds at most 1024 words. Besides push and pop, DUPn and
// SWAPn need any of the top 16 words, so the word at distance `rd_idx` from
// the top is readable combinationally and `poke` overwrites the word at
// distance `wr_idx` from the top. `top` is always the top word.
// In one cycle the control unit may push, pop, pop and push together
// (replace the top), or poke. `count` is the number of words held; the
// control unit checks it for underflow and overflow before acting, and the
// assertions below flag a violation.
// Depth and width follow the document (270 kb RAM for 1024 x 256 bits); the
// random-access read and write ports are this design's way of serving DUP
// and SWAP.
module evmx_stack
  import evmx_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     push,
  input  logic                     pop,
  input  word_t                    push_data,
  input  logic                     poke,
  input  logic [3:0]               wr_idx,
  input  word_t                    wr_data,
  input  logic [3:0]               rd_idx,
  output word_t                    rd_data,
  output word_t                    top,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  logic [AW-1:0] top_addr, rd_addr, wr_addr, push_addr;
  assign top_addr  = AW'(count - 1'b1);
  assign rd_addr   = AW'(count - 1'b1 - rd_idx);
  assign wr_addr   = AW'(count - 1'b1 - wr_idx);
  assign push_addr = pop ? top_addr : AW'(count);

  assign top     = mem[top_addr];
  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (push)      mem[push_addr] <= push_data;
    else if (poke) mem[wr_addr]   <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else begin
      if (!clear) begin
        // the control unit checks the count before every push and pop
        assert (!(pop && count == '0)) else $error("stack underflow");
        assert (!(push && !pop && count == ($clog2(DEPTH)+1)'(DEPTH))) else $error("stack overflow");
      end
      if (clear) count <= '0;
      else if (push && !pop) count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end
endmodule
