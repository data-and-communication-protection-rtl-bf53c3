// hsc_pkg: types, constants and arithmetic shared by the hardware security core.
//
// Holds the AES-128 round functions (S-box computed as multiplicative inverse in
// GF(2^8) followed by the affine map, so no table is stored), the GCM field
// multiplication in GF(2^128) with the bit-reflected convention of GCM, and the
// encodings used by the Security Memory Map (SMM).
//
// Byte order everywhere: a 128-bit block is stored MSB first, i.e. byte 0 of the
// block (the first byte in memory) is bits [127:120]. The AES state is column
// major, so state byte (row r, column c) is block byte 4*c + r.
//
// The security levels (confidentiality & integrity, confidentiality only, no
// protection) and the segment fields (base address, size, security level,
// code/data) follow the design; their binary encoding is this design's own.
package hsc_pkg;

  // Cacheline of the processor caches: 256 bits = two AES blocks.
  localparam int unsigned LINE_W     = 256;
  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned TS_W       = 32;

  typedef logic [127:0]        block_t;
  typedef logic [LINE_W-1:0]   line_t;
  typedef logic [ADDR_W-1:0]   addr_t;
  typedef logic [TS_W-1:0]     ts_t;

  // Security level of a segment.
  typedef enum logic [1:0] {
    SEC_NONE = 2'd0,   // no protection, bypass
    SEC_CO   = 2'd1,   // confidentiality only
    SEC_CI   = 2'd2    // confidentiality and integrity (authentication tag)
  } sec_level_e;

  // One SMM entry as loaded from the application image (64 bits).
  // [63:32] base address, [31:8] size in bytes, [7:3] reserved,
  // [2] code (1) / data (0), [1:0] security level.
  typedef struct packed {
    logic [31:0] base;
    logic [23:0] size;
    logic [4:0]  rsvd;
    logic        is_code;
    sec_level_e  level;
  } smm_entry_t;

  // Result of an SMM lookup.
  typedef struct packed {
    logic        hit;
    logic [3:0]  seg_id;
    sec_level_e  level;
    logic        is_code;
    logic [31:0] meta_idx;  // index of the line in the timestamp / tag memories
  } smm_result_t;

  // ------------------------------------------------------------------ GF(2^8)
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul8(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (square-and-multiply), 0 maps to 0.
  function automatic logic [7:0] ginv8(input logic [7:0] a);
    logic [7:0] a2, a4, a8, a16, a32, a64, a128;
    a2   = gmul8(a, a);
    a4   = gmul8(a2, a2);
    a8   = gmul8(a4, a4);
    a16  = gmul8(a8, a8);
    a32  = gmul8(a16, a16);
    a64  = gmul8(a32, a32);
    a128 = gmul8(a64, a64);
    // 254 = 128+64+32+16+8+4+2
    return gmul8(gmul8(gmul8(a128, a64), gmul8(a32, a16)), gmul8(gmul8(a8, a4), a2));
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] b, s;
    b = ginv8(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  // ------------------------------------------------------------------ AES-128
  function automatic logic [7:0] blk_byte(input block_t s, input int unsigned n);
    return s[127 - 8*n -: 8];
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t r;
    for (int n = 0; n < 16; n++) r[127 - 8*n -: 8] = sbox(blk_byte(s, n));
    return r;
  endfunction

  // Row r is rotated left by r columns.
  function automatic block_t shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*c + row) -: 8] = blk_byte(s, 4*((c + row) % 4) + row);
    return r;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t r;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = blk_byte(s, 4*c);   a1 = blk_byte(s, 4*c+1);
      a2 = blk_byte(s, 4*c+2); a3 = blk_byte(s, 4*c+3);
      r[127 - 8*(4*c)   -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      r[127 - 8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      r[127 - 8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      r[127 - 8*(4*c+3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  // Next round key of the AES-128 key schedule from the current one.
  function automatic block_t next_round_key(input block_t k, input logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = {sbox(w3[23:16]) ^ rcon, sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // ------------------------------------------------------------- GF(2^128)
  // GCM multiplication: bit 127 of the vector is the coefficient of x^0,
  // reduction polynomial x^128 + x^7 + x^2 + x + 1.
  function automatic block_t gf128_mult(input block_t x, input block_t y);
    block_t z, v;
    z = '0;
    v = y;
    for (int i = 127; i >= 0; i--) begin
      if (x[i]) z ^= v;
      v = v[0] ? ((v >> 1) ^ {8'he1, 120'h0}) : (v >> 1);
    end
    return z;
  endfunction

endpackage
