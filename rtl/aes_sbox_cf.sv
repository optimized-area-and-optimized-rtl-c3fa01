// aes_sbox_cf: one S-box (SubBytes) or inverse S-box (InvSubBytes) byte computed
// in the composite field GF((2^4)^2), the small-area S-box of the iterative cores.
//
// Instead of a 256-entry table the byte is inverted arithmetically. A linear
// isomorphism (an 8x8 bit matrix) maps the GF(2^8) byte onto a pair (ah, al) of
// GF(2^4) digits meaning ah*y + al, where GF(2^4) uses x^4 + x + 1 and
// y^2 = y + 0xC. There the inverse is
//     d  = ah^2 * 0xC + ah*al + al^2,   out = (ah * d^-1, (ah ^ al) * d^-1)
// which needs only 4-bit multipliers and a 4-bit inverse. The inverse matrix
// maps the result back. SubBytes applies the affine transform after the
// inversion; InvSubBytes applies the inverse affine transform before it.
// The composite-field method itself is what the design calls for; the choice
// of field polynomials and the isomorphism matrices are this implementation's.
//
// Purely combinational: in -> out. INVERSE = 0 gives SubBytes, 1 InvSubBytes.
module aes_sbox_cf
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t in_byte,
  output byte_t out_byte
);

  // Row masks of the isomorphism: bit i of the mapped byte is the parity of
  // (byte & MAP_ROW[i]). INV_ROW is the inverse matrix.
  localparam byte_t MAP_ROW [8] = '{8'h05, 8'he6, 8'h08, 8'hca, 8'ha2, 8'h0c, 8'hd2, 8'ha0};
  localparam byte_t INV_ROW [8] = '{8'h25, 8'h90, 8'h24, 8'h04, 8'h4c, 8'h2a, 8'h36, 8'haa};
  localparam logic [3:0] LAMBDA = 4'hc;

  function automatic byte_t lin_map(byte_t b, bit to_composite);
    byte_t o;
    for (int unsigned i = 0; i < 8; i++)
      o[i] = ^(b & (to_composite ? MAP_ROW[i] : INV_ROW[i]));
    return o;
  endfunction

  // Product in GF(2^4) modulo x^4 + x + 1.
  function automatic logic [3:0] mul4(logic [3:0] a, logic [3:0] b);
    logic [6:0] p;
    p = '0;
    for (int unsigned i = 0; i < 4; i++)
      if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--)
      if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  // Inverse in GF(2^4) as a^14 (0 maps to 0).
  function automatic logic [3:0] inv4(logic [3:0] a);
    logic [3:0] a2, a4, a8;
    a2 = mul4(a, a);
    a4 = mul4(a2, a2);
    a8 = mul4(a4, a4);
    return mul4(mul4(a8, a4), a2);
  endfunction

  byte_t      pre, mapped, inv_c, back;
  logic [3:0] ah, al, d, d_inv;

  always_comb begin
    pre    = INVERSE ? affine_inv(in_byte) : in_byte;
    mapped = lin_map(pre, 1'b1);
    ah     = mapped[7:4];
    al     = mapped[3:0];
    d      = mul4(mul4(ah, ah), LAMBDA) ^ mul4(ah, al) ^ mul4(al, al);
    d_inv  = inv4(d);
    inv_c  = {mul4(ah, d_inv), mul4(ah ^ al, d_inv)};
    back   = lin_map(inv_c, 1'b0);
    out_byte = INVERSE ? back : affine_fwd(back);
  end

endmodule
