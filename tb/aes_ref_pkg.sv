// aes_ref_pkg: a plain, slow behavioural model of AES-128 used by the
// testbenches as their golden reference. It is written independently of the
// RTL: the S-box is found by searching for the multiplicative inverse and
// applying the rotate-and-XOR form of the affine map, the inverse S-box by
// searching the forward table, MixColumns by full GF(2^8) products with the
// matrix coefficients, and the key schedule word by word as in the standard.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] rmul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] x, int n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] a);
    logic [7:0] inv;
    inv = 8'h00;
    for (int b = 1; b < 256; b++) if (rmul(a, 8'(b)) == 8'h01) inv = 8'(b);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] ref_inv_sbox(logic [7:0] y);
    for (int x = 0; x < 256; x++) if (ref_sbox(8'(x)) == y) return 8'(x);
    return 8'h00;
  endfunction

  // cached tables so that the models run fast enough
  logic [7:0] SB  [256];
  logic [7:0] ISB [256];
  bit         tables_ready = 0;

  function automatic void init_tables();
    if (tables_ready) return;
    for (int i = 0; i < 256; i++) SB[i] = ref_sbox(8'(i));
    for (int i = 0; i < 256; i++) ISB[SB[i]] = 8'(i);
    tables_ready = 1;
  endfunction

  function automatic logic [7:0] bt(blk_t s, int i);
    return s[127-8*i -: 8];
  endfunction

  function automatic blk_t sub_bytes(blk_t s, bit inv);
    blk_t o;
    init_tables();
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = inv ? ISB[bt(s, i)] : SB[bt(s, i)];
    return o;
  endfunction

  function automatic blk_t shift(blk_t s, bit inv);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (!inv) o[127-8*(4*c+r) -: 8] = bt(s, 4*((c+r)%4)+r);
        else      o[127-8*(4*((c+r)%4)+r) -: 8] = bt(s, 4*c+r);
    return o;
  endfunction

  function automatic blk_t mix(blk_t s, bit inv);
    logic [7:0] m [4];
    blk_t o;
    m = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] acc;
        acc = '0;
        for (int k = 0; k < 4; k++) acc ^= rmul(m[(k - r + 4) % 4], bt(s, 4*c+k));
        o[127-8*(4*c+r) -: 8] = acc;
      end
    return o;
  endfunction

  // sub-key r (r = 0..10) of a 128-bit key
  function automatic blk_t subkey(blk_t key, int r);
    logic [31:0] w [44];
    logic [7:0]  rc;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    rc = 8'h01;
    init_tables();
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t;
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {SB[t[31:24]], SB[t[23:16]], SB[t[15:8]], SB[t[7:0]]} ^ {rc, 24'h0};
        rc = rmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic blk_t encrypt(blk_t pt, blk_t key);
    blk_t s;
    s = pt ^ subkey(key, 0);
    for (int r = 1; r <= 10; r++) begin
      s = shift(sub_bytes(s, 0), 0);
      if (r != 10) s = mix(s, 0);
      s ^= subkey(key, r);
    end
    return s;
  endfunction

  function automatic blk_t decrypt(blk_t ct, blk_t key);
    blk_t s;
    s = ct ^ subkey(key, 10);
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift(s, 1), 1) ^ subkey(key, r);
      if (r != 0) s = mix(s, 1);
    end
    return s;
  endfunction

  function automatic blk_t rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
