// aes_sbox_lut: one S-box or inverse S-box byte read from a 256-entry look-up
// table (ROM), the short-delay S-box of the pipelined cores.
//
// The ROM contents are not typed in: aes_pkg computes them once at elaboration
// from the definition of the S-box, S(a) = affine(a^-1) and
// S^-1(a) = (affine^-1(a))^-1 with the inverse taken in GF(2^8) modulo
// x^8+x^4+x^3+x+1, so a synthesis tool sees a constant table indexed by the
// input byte (a LUT or block-RAM ROM).
// Using a table here is what the design calls for; building it from the formula
// is this implementation's choice.
//
// Purely combinational: in -> out. INVERSE = 0 gives SubBytes, 1 InvSubBytes.
module aes_sbox_lut
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t in_byte,
  output byte_t out_byte
);

  localparam logic [255:0][7:0] ROM = INVERSE ? INV_SBOX_TABLE : SBOX_TABLE;

  assign out_byte = ROM[in_byte];

endmodule
