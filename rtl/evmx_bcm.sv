// Bytecode memory (BCM) of EVMx: loader register R6, a wide code RAM, the
// 128-byte buffer BUFF and the output bypass multiplexer.
//
// Loading: the host presents the bytecode 256 bits at a time on
// `bytecode_in` with `bc_valid`. R6 is a left-shift register that gathers
// four chunks (1024 bits, first chunk in the top bits) and then writes them
// into one RAM word; `load_start` rewinds the word address to 0.
//
// Fetching: the 15-bit PC splits into a word address PC[14:7] (RAM) and a
// byte index PC[6:0] (BUFF). Byte 0 of a word is its most significant byte.
// The RAM has a registered output rO. When the PC's word is in BUFF, `op`
// comes from BUFF. When it is not, but rO already holds it, `op` is taken
// straight from rO through the multiplexer while BUFF loads rO in the same
// cycle, so execution does not stop. While the PC is at byte 126 or 127 the
// next word is read ahead into rO, so running off the end of BUFF costs no
// cycle. A jump to another word finds neither and costs one cycle, during
// which `op_valid` is low and the word is read.
//
// Split of the PC, the four-chunk R6, the 1024-bit RAM word and the bypass
// multiplexer follow the document; the read-ahead rule and the valid flag
// are this design's choices.
module evmx_bcm #(
  parameter int unsigned WORDS      = 256,   // RAM depth (PC[14:7])
  parameter int unsigned WORD_BYTES = 128,   // BUFF size (PC[6:0])
  parameter int unsigned IN_W       = 256    // bytecodeIn width
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // loading from the host
  input  logic                         load_start,
  input  logic                         bc_valid,
  input  logic [IN_W-1:0]              bytecode_in,
  // fetching
  input  logic [$clog2(WORDS*WORD_BYTES)-1:0] pc,
  output logic [7:0]                   op,
  output logic                         op_valid
);
  localparam int unsigned WW  = WORD_BYTES * 8;
  localparam int unsigned AW  = $clog2(WORDS);
  localparam int unsigned BW  = $clog2(WORD_BYTES);
  localparam int unsigned NCH = WW / IN_W;

  logic [WW-1:0] ram [WORDS];

  // ---------------- R6 loader ----------------
  logic [WW-1:0]              r6;
  logic [$clog2(NCH+1)-1:0]   chunk_cnt;
  logic [AW-1:0]              wr_addr;
  logic                       ram_we;
  logic [WW-1:0]              ram_wdata;

  assign ram_wdata = (NCH == 1) ? WW'(bytecode_in) : {r6[WW-IN_W-1:0], bytecode_in};
  assign ram_we    = bc_valid && (chunk_cnt == ($clog2(NCH+1))'(NCH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r6 <= '0; chunk_cnt <= '0; wr_addr <= '0;
    end else if (load_start) begin
      chunk_cnt <= '0; wr_addr <= '0;
    end else if (bc_valid) begin
      r6 <= ram_wdata;
      if (ram_we) begin
        chunk_cnt <= '0;
        wr_addr   <= wr_addr + 1'b1;
      end else begin
        chunk_cnt <= chunk_cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (ram_we) ram[wr_addr] <= ram_wdata;
  end

  // ---------------- fetch: rO, BUFF and the bypass multiplexer ----------------
  logic [WW-1:0] ro, buff;
  logic [AW-1:0] ro_tag, buff_tag;
  logic          ro_valid, buff_valid;

  logic [AW-1:0] pc_word;
  logic [BW-1:0] pc_byte;
  assign pc_word = pc[BW +: AW];
  assign pc_byte = pc[BW-1:0];

  logic buff_hit, ro_hit, rd_en;
  logic [AW-1:0] rd_addr;

  always_comb begin
    buff_hit = buff_valid && (buff_tag == pc_word);
    ro_hit   = ro_valid && (ro_tag == pc_word);
    op_valid = buff_hit || ro_hit;
    op       = buff_hit ? buff[WW-1-8*pc_byte -: 8] : ro[WW-1-8*pc_byte -: 8];
    rd_en    = 1'b0;
    rd_addr  = pc_word;
    if (!op_valid) begin
      rd_en = 1'b1;
    end else if (pc_byte >= BW'(WORD_BYTES - 2) &&
                 !(ro_valid && ro_tag == pc_word + 1'b1)) begin
      rd_en   = 1'b1;                      // read ahead the next word
      rd_addr = pc_word + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) ro <= ram[rd_addr];
    if (!buff_hit && ro_hit) buff <= ro;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ro_valid <= 1'b0; buff_valid <= 1'b0; ro_tag <= '0; buff_tag <= '0;
    end else if (load_start || bc_valid) begin
      ro_valid <= 1'b0; buff_valid <= 1'b0;
    end else begin
      if (rd_en) begin
        ro_valid <= 1'b1;
        ro_tag   <= rd_addr;
      end
      if (!buff_hit && ro_hit) begin
        buff_valid <= 1'b1;
        buff_tag   <= pc_word;
      end
    end
  end
endmodule
