// aes_area_encryptor: small-area AES-128 encryptor, one round per clock.
//
// The on-the-fly key schedule (aes_area_enc_keyexp) and the iterative cipher
// (aes_area_cipher) run in lockstep: on start the block and the key are taken,
// the initial AddRoundKey is applied at that clock edge, and the ten rounds
// follow in the next ten cycles with each sub-key derived just in time.
// Interface: a start seen while idle takes data_in and key_in; done pulses for
// one cycle when data_out holds the ciphertext, ten clocks after that edge.
// data_out stays valid until the next block is taken. start is ignored while
// a block is in progress, so holding start high encrypts one block every 11
// clocks, each taken in the cycle where done is high for the previous one.
module aes_area_encryptor
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t data_in,
  input  block_t key_in,
  output block_t data_out,
  output logic   done
);

  block_t round_key;
  round_t rk_index;
  logic   rk_valid;

  aes_area_enc_keyexp u_keyexp (
    .clk, .rst_n, .start, .key_in,
    .round_key, .rk_index, .rk_valid
  );

  aes_area_cipher #(.INVERSE(1'b0)) u_cipher (
    .clk, .rst_n, .data_in, .round_key, .rk_index, .rk_valid,
    .data_out, .done
  );

endmodule
