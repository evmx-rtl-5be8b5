// Contract storage (STR) of EVMx: a key-value store of 256-bit values.
//
// DEPTH entries of 256 bits. Keys are 6 bytes: the low 10 bits pick the
// entry and the remaining 38 bits are kept as a tag beside the value, with a
// valid bit per entry. A read (SLOAD) returns the value when the entry is
// valid and the tag matches, and 0 otherwise, one cycle after `rd`. A write
// (SSTORE) to an entry held by a different key reports `collide` and writes
// nothing; the control unit treats that as a failed execution.
//
// The host clears the store with `clear`, preloads entries through the same
// write port while the engine is idle (`host_we`), and reads the final
// state through `ostore_*`: entry `ostore_idx`, 32-bit slice `ostore_sel`
// (slice 0 = top bits) on `o_store`, one cycle after the address.
// Depth, width, 6-byte keys and the 32-bit oStore follow the document; the
// direct-mapped placement with tags is this design's choice.
module evmx_storage
  import evmx_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned KEY_W = 48
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  // engine port
  input  logic                      rd,
  input  logic                      wr,
  input  logic [KEY_W-1:0]          key,
  input  word_t                     wval,
  output word_t                     rval,
  output logic                      collide,
  // host port
  input  logic                      host_we,
  input  logic [KEY_W-1:0]          host_key,
  input  word_t                     host_val,
  input  logic [$clog2(DEPTH)-1:0]  ostore_idx,
  input  logic [2:0]                ostore_sel,
  output logic [31:0]               o_store,
  output logic [KEY_W-1:0]          o_key,
  output logic                      o_valid
);
  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned TW = KEY_W - IW;

  word_t          val_mem [DEPTH];
  logic [TW-1:0]  tag_mem [DEPTH];
  logic [DEPTH-1:0] valid;

  logic [KEY_W-1:0] wkey;
  logic [IW-1:0]    ridx, widx;
  logic             wen, free_or_same;
  assign wkey = host_we ? host_key : key;
  assign ridx = key[IW-1:0];
  assign widx = wkey[IW-1:0];
  assign free_or_same = !valid[widx] || (tag_mem[widx] == wkey[KEY_W-1:IW]);
  assign wen  = (wr || host_we) && free_or_same;
  assign collide = wr && !free_or_same;

  logic  hit_q;
  word_t rv_q;

  always_ff @(posedge clk) begin
    if (wen) begin
      val_mem[widx] <= host_we ? host_val : wval;
      tag_mem[widx] <= wkey[KEY_W-1:IW];
    end
    rv_q    <= val_mem[ridx];
    o_store <= val_mem[ostore_idx][{~ostore_sel, 5'b00000} +: 32];
    o_key   <= {tag_mem[ostore_idx], ostore_idx};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0; hit_q <= 1'b0; o_valid <= 1'b0;
    end else begin
      if (clear) valid <= '0;
      else if (wen) valid[widx] <= 1'b1;
      if (rd) hit_q <= valid[ridx] && (tag_mem[ridx] == key[KEY_W-1:IW]);
      o_valid <= valid[ostore_idx];
    end
  end

  assign rval = hit_q ? rv_q : '0;
endmodule
