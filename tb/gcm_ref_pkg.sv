// gcm_ref_pkg: reference model of AES-128 and GCM for the testbenches.
//
// Written independently of the RTL and in a deliberately different style:
// the S-box comes from a brute-force search for the GF(2^8) inverse and the
// rotate-and-XOR form of the affine map, AES works on a 4x4 byte matrix, and
// GF(2^128) multiplication is the bit-serial shift-and-add algorithm of the
// GCM specification (right shifts with R = 0xE1 || 0^120).
package gcm_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef blk_t blk_q_t[$];

  function automatic logic [7:0] r_mul8(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 7; i >= 0; i--) begin
      p = (p[7] ? ({p[6:0], 1'b0} ^ 8'h1b) : {p[6:0], 1'b0});
      if (b[i]) p ^= a;
    end
    return p;
  endfunction

  function automatic logic [7:0] r_rotl8(input logic [7:0] b, input int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic logic [7:0] r_sbox(input logic [7:0] x);
    logic [7:0] inv = 0;
    for (int y = 1; y < 256; y++)
      if (r_mul8(x, 8'(y)) == 8'h01) inv = 8'(y);
    return inv ^ r_rotl8(inv, 1) ^ r_rotl8(inv, 2) ^ r_rotl8(inv, 3) ^
           r_rotl8(inv, 4) ^ 8'h63;
  endfunction

  // S-box table, filled once by init().
  logic [7:0] sbox_t [256];
  bit         ready = 0;

  function automatic void init();
    if (!ready) begin
      for (int x = 0; x < 256; x++) sbox_t[x] = r_sbox(8'(x));
      ready = 1;
    end
  endfunction

  // Round keys of AES-128, rk[0..10].
  function automatic void key_schedule(input blk_t key, output blk_t rk [11]);
    logic [31:0] w [44];
    logic [7:0]  rc = 8'h01;
    init();
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox_t[t[31:24]], sbox_t[t[23:16]], sbox_t[t[15:8]], sbox_t[t[7:0]]};
        t ^= {rc, 24'h0};
        rc = r_mul8(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  // One AES round on a block: SubBytes, ShiftRows, MixColumns unless last,
  // AddRoundKey.
  function automatic blk_t aes_round_ref(input blk_t st, input blk_t rk, input bit last);
    logic [7:0] s [4][4];   // s[row][col]
    logic [7:0] t [4][4];
    blk_t       o;
    init();
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s[r][c] = st[127-8*(4*c+r) -: 8];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        t[r][c] = sbox_t[s[r][(c+r)%4]];
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (last) s[r][c] = t[r][c];
        else s[r][c] = r_mul8(t[r][c], 8'h02) ^ r_mul8(t[(r+1)%4][c], 8'h03) ^
                       t[(r+2)%4][c] ^ t[(r+3)%4][c];
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = s[r][c];
    return o ^ rk;
  endfunction

  function automatic blk_t aes_encrypt(input blk_t key, input blk_t pt);
    blk_t rk [11];
    blk_t st;
    key_schedule(key, rk);
    st = pt ^ rk[0];
    for (int rnd = 1; rnd <= 10; rnd++) st = aes_round_ref(st, rk[rnd], rnd == 10);
    return st;
  endfunction

  // GF(2^128) product, GCM specification algorithm.
  function automatic blk_t gmul(input blk_t x, input blk_t y);
    blk_t z = 0, v = y;
    for (int i = 0; i < 128; i++) begin
      if (x[127-i]) z ^= v;
      v = v[0] ? ((v >> 1) ^ {8'he1, 120'h0}) : (v >> 1);
    end
    return z;
  endfunction

  function automatic blk_t ghash(input blk_t h, input blk_q_t blocks);
    blk_t y = 0;
    foreach (blocks[i]) y = gmul(y ^ blocks[i], h);
    return y;
  endfunction

  // Full GCM with a 96-bit IV and whole blocks. din is plaintext when
  // encrypting and ciphertext when decrypting; dout is the other one.
  function automatic void gcm(input blk_t key, input logic [95:0] iv,
                              input blk_q_t aad, input blk_q_t din,
                              input bit decrypt,
                              output blk_q_t dout, output blk_t tag);
    blk_t   h, j0, cb;
    blk_q_t hq;
    h  = aes_encrypt(key, 0);
    j0 = {iv, 32'd1};
    cb = j0;
    dout.delete();
    foreach (aad[i]) hq.push_back(aad[i]);
    foreach (din[i]) begin
      cb[31:0] = cb[31:0] + 1;
      dout.push_back(din[i] ^ aes_encrypt(key, cb));
      hq.push_back(decrypt ? din[i] : dout[i]);
    end
    hq.push_back({64'(aad.size()) * 64'd128, 64'(din.size()) * 64'd128});
    tag = ghash(h, hq) ^ aes_encrypt(key, j0);
  endfunction

endpackage
