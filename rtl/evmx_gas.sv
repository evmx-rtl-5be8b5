// Gas module (GS) of EVMx.
//
// A down-counter loaded with the gas limit (`load`, `gval`), a lookup table
// of the static gas of every opcode (evmx_pkg::static_gas), and the memory
// expansion cost C_mem(a) = 3a + floor(a^2/512), where a is the number of
// 32-byte words in use. The square and the product by 3 are the two small
// multipliers; the division by 512 with floor is a 9-bit right shift.
//
// Each cycle it deducts, together: the static gas of `op` plus `extra`
// when `charge` is high, and C_mem(new) - C_mem(old) when `mem_words` has
// grown since the last charge. If the total exceeds what is left, `oog`
// (out of gas) rises and stays up until the next load, and the counter
// drops to zero; the control unit then halts. `gas_left` is what GAS pushes.
module evmx_gas
  import evmx_pkg::*;
#(
  parameter int unsigned MW = 11        // width of the memory word count
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  gas_t          gval,
  input  logic          charge,
  input  logic [7:0]    op,
  input  gas_t          extra,
  input  logic [MW-1:0] mem_words,
  output gas_t          gas_left,
  output logic          oog
);
  function automatic gas_t cmem(input logic [MW-1:0] a);
    gas_t a64;
    a64 = gas_t'(a);
    return 3 * a64 + ((a64 * a64) >> 9);
  endfunction

  logic [MW-1:0] words_q;
  gas_t          cost, mem_delta;

  always_comb begin
    mem_delta = (mem_words > words_q) ? (cmem(mem_words) - cmem(words_q)) : '0;
    cost      = mem_delta + (charge ? (static_gas(op) + extra) : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gas_left <= '0; oog <= 1'b0; words_q <= '0;
    end else if (load) begin
      gas_left <= gval; oog <= 1'b0; words_q <= '0;
    end else begin
      if (mem_words > words_q) words_q <= mem_words;
      if (cost > gas_left) begin
        gas_left <= '0;
        oog      <= 1'b1;
      end else begin
        gas_left <= gas_left - cost;
      end
    end
  end
endmodule
