// aes_mix_column: MixColumns or InvMixColumns on one 32-bit state column, built
// with substructure sharing so that the inverse reuses the forward network.
//
// Forward, with t = a0^a1^a2^a3 shared by all four outputs:
//     b_i = a_i ^ t ^ xtime(a_i ^ a_(i+1))
// which equals {02}a_i ^ {03}a_(i+1) ^ a_(i+2) ^ a_(i+3) with two XOR levels
// and one xtime per output. The inverse matrix factors as the forward matrix
// times [5 0 4 0; 0 5 0 4; 4 0 5 0; 0 4 0 5], so InvMixColumns is a small
// pre-stage, a_i ^= {04}(a_i ^ a_(i+2)), followed by the same forward network.
// Substructure sharing is what the design calls for; this particular factoring
// is the implementation's choice.
//
// Column byte 0 (row 0) is col_in[31:24]. Purely combinational.
module aes_mix_column
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  word_t col_in,
  output word_t col_out
);

  byte_t a [4];
  byte_t p [4];
  byte_t b [4];
  byte_t t, u, v;

  always_comb begin
    for (int unsigned i = 0; i < 4; i++) a[i] = col_in[31-8*i -: 8];
    // inverse pre-stage: {04}(a0^a2) and {04}(a1^a3)
    u = xtime(xtime(a[0] ^ a[2]));
    v = xtime(xtime(a[1] ^ a[3]));
    if (INVERSE) begin
      p[0] = a[0] ^ u;
      p[1] = a[1] ^ v;
      p[2] = a[2] ^ u;
      p[3] = a[3] ^ v;
    end else begin
      p = a;
    end
    // shared forward network
    t = p[0] ^ p[1] ^ p[2] ^ p[3];
    for (int unsigned i = 0; i < 4; i++)
      b[i] = p[i] ^ t ^ xtime(p[i] ^ p[(i+1)%4]);
    col_out = {b[0], b[1], b[2], b[3]};
  end

endmodule
