// aes_gcm_pkg: types, constants and small combinational helpers shared by the
// AES-GCM engine.
//
// Bit and byte order. A 128-bit block is held as logic [127:0] with the first
// byte of the block in bits [127:120]. AES state byte k (k = 0..15, column
// c = k/4, row r = k%4) is bits [127-8k -: 8]. For GF(2^128) the GCM convention
// is used: bit [127] of a block is the coefficient of x^0 and bit [0] that of
// x^127; the field polynomial is x^128 + x^7 + x^2 + x + 1.
//
// The beat kinds travel alongside the data through the counter-mode pipeline
// so that the GHASH side knows what each beat is when it leaves the AES lanes.
package aes_gcm_pkg;

  typedef logic [127:0] block_t;

  // AES-128: 10 rounds, 11 round keys.
  localparam int unsigned AES_ROUNDS = 10;

  // Kind of a beat entering the counter-mode pipeline.
  typedef enum logic [2:0] {
    BEAT_DATA = 3'd0,  // plaintext (encrypt) or ciphertext (decrypt) blocks
    BEAT_AAD  = 3'd1,  // additional authenticated data, hashed only
    BEAT_LEN  = 3'd2,  // len(A) || len(C) block, hashed only
    BEAT_J0   = 3'd3,  // pre-counter block J0: E_K(J0) masks the tag
    BEAT_HKEY = 3'd4   // all-zero block: E_K(0) is the hash subkey H
  } beat_kind_e;

  // GF(2^8) multiply by x modulo x^8 + x^4 + x^3 + x + 1.
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // GF(2^8) multiplication (shift-and-add).
  function automatic logic [7:0] gf8_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // AES S-box table: entry x is the affine transform of x^-1 in GF(2^8)
  // (x^254, so 0 maps to 0). Computed once here and shared by every S-box.
  typedef logic [255:0][7:0] sbox_table_t;

  function automatic logic [7:0] sbox_affine(input logic [7:0] b);
    logic [7:0] s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic sbox_table_t build_sbox_table();
    sbox_table_t t;
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv, sq;
      // x^254 = x^(2+4+8+16+32+64+128)
      inv = 8'h01;
      sq  = 8'(x);
      for (int k = 1; k < 8; k++) begin
        sq  = gf8_mul(sq, sq);
        inv = gf8_mul(inv, sq);
      end
      t[x] = sbox_affine(inv);
    end
    return t;
  endfunction

  localparam sbox_table_t SBOX_TABLE = build_sbox_table();

  // ---------------------------------------------------------------------
  // Composite field GF((2^4)^2) used by the logic-gate S-box.
  // GF(2^4) uses x^4 + x + 1; GF(2^8) is built over it as GF(2^4)[y] modulo
  // y^2 + y + LAMBDA. An element is {hi, lo} = hi*y + lo. The isomorphism
  // from the AES field is found at elaboration: BETA is a root of the AES
  // polynomial in the composite field, and AES element x^i maps to BETA^i.
  // ---------------------------------------------------------------------
  function automatic logic [3:0] gf4_mul(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] p, t;
    p = '0;
    t = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) p ^= t;
      t = {t[2:0], 1'b0} ^ (t[3] ? 4'h3 : 4'h0);
    end
    return p;
  endfunction

  // Smallest LAMBDA with t^2 + t != LAMBDA for every t (y^2+y+LAMBDA irreducible).
  function automatic logic [3:0] find_lambda();
    for (int l = 1; l < 16; l++) begin
      bit ok = 1'b1;
      for (int t = 0; t < 16; t++)
        if ((gf4_mul(4'(t), 4'(t)) ^ 4'(t)) == 4'(l)) ok = 1'b0;
      if (ok) return 4'(l);
    end
    return 4'h0;
  endfunction

  localparam logic [3:0] COMP_LAMBDA = find_lambda();

  function automatic logic [7:0] comp_mul(input logic [7:0] a, input logic [7:0] b);
    logic [3:0] hh;
    hh = gf4_mul(a[7:4], b[7:4]);
    return {hh ^ gf4_mul(a[7:4], b[3:0]) ^ gf4_mul(a[3:0], b[7:4]),
            gf4_mul(hh, COMP_LAMBDA) ^ gf4_mul(a[3:0], b[3:0])};
  endfunction

  typedef logic [7:0][7:0] byte_matrix_t;   // column i = image of bit i

  function automatic logic [7:0] mat_apply(input byte_matrix_t m, input logic [7:0] v);
    logic [7:0] r;
    r = '0;
    for (int i = 0; i < 8; i++) if (v[i]) r ^= m[i];
    return r;
  endfunction

  function automatic byte_matrix_t find_map_fwd();
    byte_matrix_t m;
    m = '0;
    for (int c = 2; c < 256; c++) begin
      logic [7:0] p [9];
      p[0] = 8'h01;
      for (int i = 1; i <= 8; i++) p[i] = comp_mul(p[i-1], 8'(c));
      // beta^8 + beta^4 + beta^3 + beta + 1 = 0
      if ((p[8] ^ p[4] ^ p[3] ^ p[1] ^ p[0]) == 8'h00) begin
        for (int i = 0; i < 8; i++) m[i] = p[i];
        return m;
      end
    end
    return m;
  endfunction

  localparam byte_matrix_t COMP_MAP_FWD = find_map_fwd();

  // Inverse map: column j is the AES element whose image is the unit vector j.
  function automatic byte_matrix_t find_map_inv();
    byte_matrix_t m;
    m = '0;
    for (int x = 1; x < 256; x++)
      for (int j = 0; j < 8; j++)
        if (mat_apply(COMP_MAP_FWD, 8'(x)) == (8'h01 << j)) m[j] = 8'(x);
    return m;
  endfunction

  localparam byte_matrix_t COMP_MAP_INV = find_map_inv();

  // inc32: increment the rightmost 32 bits of a counter block modulo 2^32.
  function automatic block_t inc32(input block_t cb, input logic [31:0] n);
    return {cb[127:32], cb[31:0] + n};
  endfunction

  // GF(2^128) squaring in GCM bit order. Squaring is linear: the coefficient
  // of x^i moves to x^2i, and the terms of degree >= 128 are folded back with
  // x^128 = x^7 + x^2 + x + 1. The result is a pure XOR network.
  function automatic block_t gf128_sqr(input block_t a);
    logic [254:0] s;
    block_t       r;
    s = '0;
    for (int i = 0; i < 128; i++) s[2*i] = a[127-i];
    for (int i = 254; i >= 128; i--) begin
      s[i-121] ^= s[i];
      s[i-126] ^= s[i];
      s[i-127] ^= s[i];
      s[i-128] ^= s[i];
      s[i]      = 1'b0;
    end
    for (int i = 0; i < 128; i++) r[127-i] = s[i];
    return r;
  endfunction

endpackage
