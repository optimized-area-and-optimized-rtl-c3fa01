// aes_round: one complete cipher or decipher round of AES-128, combinational.
//
// Cipher round:   SubBytes -> ShiftRows -> MixColumns -> AddRoundKey
// Decipher round: InvShiftRows -> InvSubBytes -> AddRoundKey -> InvMixColumns
// The order of the decipher round is that of the straight inverse cipher. In
// the last round (is_final = 1) the (Inv)MixColumns step is skipped.
// USE_LUT selects the S-box style: 0 = composite field (small), 1 = ROM table
// (fast). Sixteen S-boxes and four MixColumns units are instantiated, so one
// round is evaluated per clock by whatever register surrounds this block.
module aes_round
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0,
  parameter bit USE_LUT = 1'b0
) (
  input  block_t state_in,
  input  block_t round_key,
  input  logic   is_final,
  output block_t state_out
);

  block_t sb_in, sb_out, mc_out, pre_mc;

  assign sb_in = INVERSE ? inv_shift_rows(state_in) : state_in;

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    if (USE_LUT) begin : g_lut
      aes_sbox_lut #(.INVERSE(INVERSE)) u_sbox (
        .in_byte (sb_in[127-8*i -: 8]),
        .out_byte(sb_out[127-8*i -: 8])
      );
    end else begin : g_cf
      aes_sbox_cf #(.INVERSE(INVERSE)) u_sbox (
        .in_byte (sb_in[127-8*i -: 8]),
        .out_byte(sb_out[127-8*i -: 8])
      );
    end
  end

  // input of the (Inv)MixColumns stage
  assign pre_mc = INVERSE ? (sb_out ^ round_key) : shift_rows(sb_out);

  for (genvar c = 0; c < 4; c++) begin : g_mix
    aes_mix_column #(.INVERSE(INVERSE)) u_mix (
      .col_in (pre_mc[127-32*c -: 32]),
      .col_out(mc_out[127-32*c -: 32])
    );
  end

  always_comb begin
    if (INVERSE) state_out = is_final ? pre_mc : mc_out;
    else         state_out = (is_final ? pre_mc : mc_out) ^ round_key;
  end

endmodule
