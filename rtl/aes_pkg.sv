// aes_pkg: types, constants and pure functions shared by every AES-128 block.
//
// The cipher state is a 128-bit vector in the FIPS-197 byte order: byte 0 (the
// first input byte, column 0 row 0) sits in bits [127:120], byte 15 in [7:0].
// Column c holds bytes 4c..4c+3. The helpers here are wiring (ShiftRows),
// GF(2^8) arithmetic on the field polynomial x^8+x^4+x^3+x+1, and the affine
// transforms of SubBytes / InvSubBytes, written from the equations of the
// standard. Nothing here is clocked.
package aes_pkg;

  localparam int unsigned NR        = 10;   // rounds for a 128-bit key

  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;
  typedef logic [3:0]   round_t;

  // Which AES core a crypto processor carries.
  typedef enum logic [1:0] {
    CORE_AREA_ENC  = 2'd0,
    CORE_AREA_DEC  = 2'd1,
    CORE_SPEED_ENC = 2'd2,
    CORE_SPEED_DEC = 2'd3
  } core_e;

  // Byte i of the state (i = 4*column + row).
  function automatic byte_t get_byte(block_t s, int unsigned i);
    return s[127-8*i -: 8];
  endfunction

  // Multiply by x in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Round constant Rcon[r] (first byte of the word), r = 1..10.
  function automatic byte_t rcon(round_t r);
    byte_t c;
    c = 8'h01;
    for (int unsigned i = 1; i < 10; i++)
      if (i < r) c = xtime(c);
    return c;
  endfunction

  // ShiftRows: row r of the 4x4 byte matrix is rotated left by r positions.
  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int unsigned c = 0; c < 4; c++)
      for (int unsigned r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = s[127-8*(4*((c+r)%4)+r) -: 8];
    return o;
  endfunction

  // InvShiftRows: row r rotated right by r positions.
  function automatic block_t inv_shift_rows(block_t s);
    block_t o;
    for (int unsigned c = 0; c < 4; c++)
      for (int unsigned r = 0; r < 4; r++)
        o[127-8*(4*((c+r)%4)+r) -: 8] = s[127-8*(4*c+r) -: 8];
    return o;
  endfunction

  // Affine transform of SubBytes: b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i, c = 0x63.
  function automatic byte_t affine_fwd(byte_t b);
    byte_t o;
    for (int unsigned i = 0; i < 8; i++)
      o[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return o ^ 8'h63;
  endfunction

  // Inverse affine transform of InvSubBytes: b'_i = b_(i+2) ^ b_(i+5) ^ b_(i+7) ^ d_i, d = 0x05.
  function automatic byte_t affine_inv(byte_t b);
    byte_t o;
    for (int unsigned i = 0; i < 8; i++)
      o[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return o ^ 8'h05;
  endfunction

  // S-box (inv = 0) or inverse S-box (inv = 1) as a 256-entry table, built
  // from the definition. The multiplicative inverses come from one walk over
  // the powers of the generator {03}: if a = 3^i then a^-1 = 3^(255-i).
  function automatic logic [255:0][7:0] build_sbox_table(bit inv);
    logic [254:0][7:0] pw;
    logic [255:0][7:0] inverse, t;
    pw[0] = 8'h01;
    for (int unsigned i = 1; i < 255; i++) pw[i] = pw[i-1] ^ xtime(pw[i-1]);
    inverse[0] = 8'h00;
    for (int unsigned i = 0; i < 255; i++) inverse[pw[i]] = pw[(255 - i) % 255];
    for (int unsigned a = 0; a < 256; a++)
      t[a] = inv ? inverse[affine_inv(byte_t'(a))] : affine_fwd(inverse[a]);
    return t;
  endfunction

  localparam logic [255:0][7:0] SBOX_TABLE     = build_sbox_table(1'b0);
  localparam logic [255:0][7:0] INV_SBOX_TABLE = build_sbox_table(1'b1);

endpackage
