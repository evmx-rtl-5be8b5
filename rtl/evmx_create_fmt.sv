// Address-derivation front end of EVMx: the CAT, RPL and ADDR components.
//
// CREATE2 (sel_create2 = 1): CAT forms k = 0xFF || sAddr || salt || d, the
// 85-byte pre-image whose hash gives the new address (d is the Keccak-256
// digest of the init code).
// CREATE (sel_create2 = 0): RPL forms the recursive-length-prefix encoding
// of the list [sAddr, nonce]: 0xC0+L, 0x94, the 20 address bytes, then the
// nonce as 0x80 when zero, as one byte when below 0x80, or as 0x80+n
// followed by its n big-endian bytes.
// The pre-image is returned left-aligned in `msg` (first byte on top) with
// its length `len`, ready for the Keccak unit. ADDR takes a digest and
// keeps its last 20 bytes, zero-extended to a stack word.
// Purely combinational. `msg` is as wide as the hash register R4 (1024
// bits) so it feeds the same Keccak input; only the first 85 bytes can ever
// be non-zero, and the upper 96 bits of `new_addr` are always zero.
// Equation k = 0xFF || sAddr || salt || d and the CAT/RPL/ADDR split follow
// the document; the address is the digest's last 20 bytes as Ethereum
// defines it (the document says "first").
module evmx_create_fmt
  import evmx_pkg::*;
(
  input  logic          sel_create2,
  input  addr_t         s_addr,
  input  logic [63:0]   nonce,
  input  word_t         salt,
  input  word_t         d,
  output logic [1023:0] msg,
  output logic [7:0]    len,
  input  word_t         digest,
  output word_t         new_addr
);
  logic [3:0]  nbytes;
  logic [71:0] nonce_enc;   // left-aligned encoding, up to 9 bytes
  logic [3:0]  nonce_len;

  always_comb begin
    nbytes = 0;
    for (int i = 0; i < 8; i++) if (nonce[8*i +: 8] != 8'h00) nbytes = 4'(i + 1);
    nonce_enc = '0;
    if (nonce == 0) begin
      nonce_enc[71:64] = 8'h80; nonce_len = 1;
    end else if (nonce < 64'h80) begin
      nonce_enc[71:64] = nonce[7:0]; nonce_len = 1;
    end else begin
      nonce_enc[71:64] = 8'h80 + 8'(nbytes);
      for (int i = 0; i < 8; i++)
        if (i < int'(nbytes)) nonce_enc[63 - 8*i -: 8] = nonce[8*(int'(nbytes) - 1 - i) +: 8];
      nonce_len = nbytes + 1'b1;
    end

    msg = '0;
    if (sel_create2) begin
      msg[1023 -: 680] = {8'hFF, s_addr, salt, d};
      len = 8'd85;
    end else begin
      msg[1023 -: 8]   = 8'hC0 + 8'd21 + 8'(nonce_len);
      msg[1015 -: 168] = {8'h94, s_addr};
      msg[847 -: 72]   = nonce_enc;
      len = 8'd22 + 8'(nonce_len);
    end
  end

  assign new_addr = {96'b0, digest[159:0]};
endmodule
