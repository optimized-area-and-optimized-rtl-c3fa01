// aes_key_round: one round of the AES-128 key expansion, combinational.
//
// From round key i (words w0..w3) it forms round key i+1:
//     g  = SubWord(RotWord(w3)) ^ {Rcon, 00, 00, 00}
//     w4 = w0 ^ g,  w5 = w1 ^ w4,  w6 = w2 ^ w5,  w7 = w3 ^ w6
// RotWord turns [b0 b1 b2 b3] into [b1 b2 b3 b0]. The four SubWord S-boxes are
// composite-field (USE_LUT = 0) or ROM (USE_LUT = 1), matching the datapath.
module aes_key_round
  import aes_pkg::*;
#(
  parameter bit USE_LUT = 1'b0
) (
  input  block_t key_in,
  input  byte_t  rcon_in,
  output block_t key_out
);

  word_t w [4];
  word_t rot, sub, g;

  always_comb begin
    for (int unsigned i = 0; i < 4; i++) w[i] = key_in[127-32*i -: 32];
    rot = {w[3][23:0], w[3][31:24]};
  end

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    if (USE_LUT) begin : g_lut
      aes_sbox_lut #(.INVERSE(1'b0)) u_sbox (.in_byte(rot[31-8*i -: 8]), .out_byte(sub[31-8*i -: 8]));
    end else begin : g_cf
      aes_sbox_cf  #(.INVERSE(1'b0)) u_sbox (.in_byte(rot[31-8*i -: 8]), .out_byte(sub[31-8*i -: 8]));
    end
  end

  always_comb begin
    word_t n0, n1, n2, n3;
    g  = sub ^ {rcon_in, 24'h0};
    n0 = w[0] ^ g;
    n1 = w[1] ^ n0;
    n2 = w[2] ^ n1;
    n3 = w[3] ^ n2;
    key_out = {n0, n1, n2, n3};
  end

endmodule
