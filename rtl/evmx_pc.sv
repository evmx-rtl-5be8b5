// Program counter (PC) of EVMx.
//
// A 15-bit register with an incrementer that covers the whole bytecode
// memory: PC[14:7] selects a RAM word, PC[6:0] a byte in BUFF. It starts at
// zero (`clear`), steps by one (`inc`) or takes a jump target popped from
// the stack (`load`). A limit register holds the length of the loaded
// bytecode; `at_end` tells the control unit the PC has run past the code,
// and `tgt_ok` tells whether a jump target lies inside it.
// Load has priority over increment. The limit register follows the
// document; the flag outputs are this design's interface.
module evmx_pc #(
  parameter int unsigned PC_W = 15
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            inc,
  input  logic            load,
  input  logic [255:0]    target,
  input  logic            limit_we,
  input  logic [PC_W:0]   limit_in,    // code length in bytes
  output logic [PC_W-1:0] pc,
  output logic [PC_W:0]   limit,
  output logic            at_end,
  output logic            tgt_ok
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; limit <= '0;
    end else begin
      if (limit_we) limit <= limit_in;
      if (clear)     pc <= '0;
      else if (load) pc <= target[PC_W-1:0];
      else if (inc)  pc <= pc + 1'b1;
    end
  end

  assign at_end = ({1'b0, pc} >= limit);
  assign tgt_ok = (target < 256'(limit));
endmodule
