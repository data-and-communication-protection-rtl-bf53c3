// tb_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL: GF(2^128) multiplication by bit reversal, carry-less product and
// reduction, and a GHASH over a list of blocks.
package tb_ref_pkg;
  typedef logic [127:0] blk_t;

  function automatic blk_t rev128(input blk_t a);
    blk_t r;
    for (int i = 0; i < 128; i++) r[i] = a[127-i];
    return r;
  endfunction

  function automatic blk_t ref_gmul(input blk_t a, input blk_t b);
    logic [255:0] p;
    blk_t ra, rb;
    ra = rev128(a); rb = rev128(b);
    p = '0;
    for (int i = 0; i < 128; i++) if (rb[i]) p ^= (256'(ra) << i);
    for (int i = 254; i >= 128; i--)
      if (p[i]) p ^= (256'h87 << (i - 128)) ^ (256'h1 << i);
    return rev128(p[127:0]);
  endfunction

  // GHASH of two ciphertext blocks and the 256-bit length block, no AAD.
  function automatic blk_t ref_ghash2(input blk_t h, input blk_t c1, input blk_t c2);
    blk_t x;
    x = ref_gmul(c1, h);
    x = ref_gmul(x ^ c2, h);
    return ref_gmul(x ^ {64'd0, 64'd256}, h);
  endfunction

  // ---- reference AES-128, table-free: the S-box is found by searching for
  // the inverse and applying the affine map written with rotations.
  function automatic logic [7:0] r_xt(input logic [7:0] a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] r_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r;
    r = 0;
    while (b != 0) begin
      if (b[0]) r ^= a;
      a = r_xt(a);
      b >>= 1;
    end
    return r;
  endfunction

  function automatic logic [7:0] r_rotl(input logic [7:0] a, input int n);
    return (a << n) | (a >> (8 - n));
  endfunction

  function automatic logic [7:0] r_sbox(input logic [7:0] a);
    logic [7:0] inv;
    inv = 0;
    for (int b = 1; b < 256; b++) if (r_mul(a, 8'(b)) == 8'h01) inv = 8'(b);
    return inv ^ r_rotl(inv, 1) ^ r_rotl(inv, 2) ^ r_rotl(inv, 3) ^ r_rotl(inv, 4) ^ 8'h63;
  endfunction

  function automatic blk_t ref_aes(input blk_t key, input blk_t pt);
    logic [7:0] w [176];
    logic [7:0] s [16], t [16];
    logic [7:0] rc, tmp [4];
    for (int i = 0; i < 16; i++) w[i] = key[127 - 8*i -: 8];
    rc = 8'h01;
    for (int i = 16; i < 176; i += 4) begin
      for (int j = 0; j < 4; j++) tmp[j] = w[i - 4 + j];
      if (i % 16 == 0) begin
        logic [7:0] f;
        f = tmp[0];
        tmp[0] = r_sbox(tmp[1]) ^ rc; tmp[1] = r_sbox(tmp[2]);
        tmp[2] = r_sbox(tmp[3]);      tmp[3] = r_sbox(f);
        rc = r_xt(rc);
      end
      for (int j = 0; j < 4; j++) w[i + j] = w[i - 16 + j] ^ tmp[j];
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127 - 8*i -: 8] ^ w[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) t[i] = r_sbox(s[i]);
      // shift rows: byte (row, col) comes from (row, col + row)
      for (int c = 0; c < 4; c++)
        for (int rr = 0; rr < 4; rr++) s[4*c + rr] = t[4*((c + rr) % 4) + rr];
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0, a1, a2, a3;
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          s[4*c]   = r_mul(a0, 2) ^ r_mul(a1, 3) ^ a2 ^ a3;
          s[4*c+1] = a0 ^ r_mul(a1, 2) ^ r_mul(a2, 3) ^ a3;
          s[4*c+2] = a0 ^ a1 ^ r_mul(a2, 2) ^ r_mul(a3, 3);
          s[4*c+3] = r_mul(a0, 3) ^ a1 ^ a2 ^ r_mul(a3, 2);
        end
      for (int i = 0; i < 16; i++) s[i] ^= w[16*r + i];
    end
    for (int i = 0; i < 16; i++) ref_aes[127 - 8*i -: 8] = s[i];
  endfunction
endpackage
