// Keccak-256 hash unit (KEC) with its padding stage (PAD2).
//
// The EVM hashes with the original Keccak-256: rate 1088 bits, capacity 512,
// pad10*1 with domain byte 0x01 (not the 0x06 of SHA3-256). The message
// arrives whole, as the shift register R4 collects it: up to MAX_BYTES
// bytes, first byte in the most significant byte of `msg`. PAD2 places the
// message in one 136-byte block, XORs 0x01 after the last message byte and
// 0x80 into the last byte of the block. The block is absorbed into the
// all-zero state and Keccak-f[1600] runs one round per clock (24 cycles).
// The digest is the first 32 bytes of the state, returned with the first
// byte in the most significant byte of `digest`.
//
// Round constants and rotation offsets are computed at elaboration from the
// Keccak definitions (LFSR x^8+x^6+x^5+x^4+1; offsets (t+1)(t+2)/2) into
// constant tables.
//
// Interface: pulse `start` with `msg` and `len` (len <= MAX_BYTES);
// `done` pulses 25 cycles later with `digest` valid until the next start.
// One-block operation (MAX_BYTES = 128, the width of R4) is the document's
// arrangement; the one-round-per-cycle schedule is this design's choice.
module evmx_keccak #(
  parameter int unsigned MAX_BYTES = 128
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [MAX_BYTES*8-1:0] msg,
  input  logic [7:0]             len,
  output logic                   busy,
  output logic                   done,
  output logic [255:0]           digest
);
  localparam int unsigned RATE_BYTES = 136;

  typedef logic [63:0] lane_t;
  typedef lane_t state_t [25];

  // ---------------- constants ----------------
  typedef lane_t rc_tab_t [24];
  typedef int    rho_tab_t [25];

  // Round constants: the LFSR is stepped once per bit, 7 bits per round.
  function automatic rc_tab_t gen_rc();
    rc_tab_t    t;
    lane_t      c;
    logic [7:0] r;
    r = 8'h01;
    for (int ir = 0; ir < 24; ir++) begin
      c = '0;
      for (int j = 0; j <= 6; j++) begin
        c[(1 << j) - 1] = r[0];
        r = r[7] ? ((r << 1) ^ 8'h71) : (r << 1);
      end
      t[ir] = c;
    end
    return t;
  endfunction

  // Rotation offsets of each lane, (t+1)(t+2)/2 along the (x,y) walk.
  function automatic rho_tab_t gen_rho();
    rho_tab_t o;
    int x, y, nx;
    for (int i = 0; i < 25; i++) o[i] = 0;
    x = 1; y = 0;
    for (int t = 0; t < 24; t++) begin
      o[x + 5 * y] = ((t + 1) * (t + 2) / 2) % 64;
      nx = y;
      y  = (2 * x + 3 * y) % 5;
      x  = nx;
    end
    return o;
  endfunction

  localparam rc_tab_t  RC  = gen_rc();
  localparam rho_tab_t RHO = gen_rho();

  function automatic lane_t rotl(input lane_t v, input int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  // One Keccak-f[1600] round (theta, rho, pi, chi, iota).
  function automatic state_t keccak_round(input state_t s, input lane_t rc);
    lane_t  c [5];
    lane_t  d [5];
    state_t a, b, o;
    for (int x = 0; x < 5; x++)
      c[x] = s[x] ^ s[x + 5] ^ s[x + 10] ^ s[x + 15] ^ s[x + 20];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x + 4) % 5] ^ rotl(c[(x + 1) % 5], 1);
    for (int i = 0; i < 25; i++) a[i] = s[i] ^ d[i % 5];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5 * ((2 * x + 3 * y) % 5)] = rotl(a[x + 5 * y], RHO[x + 5 * y]);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[x + 5 * y] = b[x + 5 * y] ^ (~b[(x + 1) % 5 + 5 * y] & b[(x + 2) % 5 + 5 * y]);
    o[0] = o[0] ^ rc;
    return o;
  endfunction

  // ---------------- PAD2: one padded block as lanes ----------------
  state_t blk;
  always_comb begin
    logic [7:0] byte_v;
    for (int i = 0; i < 25; i++) blk[i] = '0;
    for (int i = 0; i < RATE_BYTES; i++) begin
      byte_v = 8'h00;
      if (i < MAX_BYTES && i < int'(len)) byte_v = msg[(MAX_BYTES - 1 - i) * 8 +: 8];
      if (i == int'(len))         byte_v = byte_v ^ 8'h01;
      if (i == RATE_BYTES - 1)    byte_v = byte_v ^ 8'h80;
      blk[i / 8][(i % 8) * 8 +: 8] = byte_v;
    end
  end

  // ---------------- permutation ----------------
  state_t st;
  logic [4:0] rnd;
  lane_t      rc_cur;

  assign rc_cur = (rnd < 5'd24) ? RC[rnd] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; rnd <= '0;
      for (int i = 0; i < 25; i++) st[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        st   <= blk;          // absorb into the zero state
        rnd  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        st  <= keccak_round(st, rc_cur);
        rnd <= rnd + 1'b1;
        if (rnd == 5'd23) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // digest: bytes 0..31 of the state, byte 0 most significant
  always_comb begin
    for (int i = 0; i < 32; i++) digest[(31 - i) * 8 +: 8] = st[i / 8][(i % 8) * 8 +: 8];
  end
endmodule
