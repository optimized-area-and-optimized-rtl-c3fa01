// aes_area_decryptor: small-area AES-128 decryptor, one round per clock.
//
// The sub-keys come from a bank filled ahead of time (aes_area_dec_keyexp) and
// are fed to the iterative decipher (aes_area_cipher, INVERSE = 1) in reverse
// order: sub-key 10 for the initial AddRoundKey, then 9 down to 0. A small
// sequencer decides whether the bank must be refilled: if the key at start is
// the one already expanded, deciphering begins in the start cycle itself;
// otherwise the block is captured, the key is expanded (10 cycles) and
// deciphering follows.
// Interface: a start seen while idle takes data_in and key_in. done pulses one
// cycle with the plaintext on data_out: 10 clocks after that edge when the key
// is unchanged, 21 clocks after it when a new key had to be expanded first.
// start is ignored while a block is in progress, so a start held high
// decrypts one block after another, each taken in the cycle where done is
// high for the previous one.
module aes_area_decryptor
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

  typedef enum logic [1:0] {S_IDLE, S_KEYS, S_RUN} seq_e;

  seq_e   state_q;
  round_t idx_q;
  block_t din_q, rd_key, stored_key, cipher_din;
  logic   keys_ready, key_hit, ke_start, take;
  round_t rk_index, rd_index;
  logic   rk_valid;

  assign take     = start && (state_q == S_IDLE);
  assign key_hit  = keys_ready && (stored_key == key_in);
  assign ke_start = take && !key_hit;

  aes_area_dec_keyexp u_keyexp (
    .clk, .rst_n,
    .start     (ke_start),
    .key_in,
    .rd_index,
    .rd_key,
    .stored_key,
    .ready     (keys_ready)
  );

  always_comb begin
    rk_valid   = 1'b0;
    rk_index   = idx_q;
    cipher_din = din_q;
    if (take) begin
      // unchanged key: initial AddRoundKey right away
      rk_valid   = key_hit;
      rk_index   = round_t'(0);
      cipher_din = data_in;
    end else if (state_q == S_RUN) begin
      rk_valid = 1'b1;
    end else if (state_q == S_KEYS && keys_ready) begin
      rk_valid = 1'b1;
      rk_index = round_t'(0);
    end
    rd_index = round_t'(NR) - rk_index;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      idx_q   <= '0;
      din_q   <= '0;
    end else if (take) begin
      din_q   <= data_in;
      state_q <= key_hit ? S_RUN : S_KEYS;
      idx_q   <= key_hit ? round_t'(1) : round_t'(0);
    end else begin
      case (state_q)
        S_KEYS: if (keys_ready) begin
          state_q <= S_RUN;
          idx_q   <= round_t'(1);
        end
        S_RUN: begin
          idx_q <= idx_q + round_t'(1);
          if (idx_q == round_t'(NR)) state_q <= S_IDLE;
        end
        default: ;
      endcase
    end
  end

  aes_area_cipher #(.INVERSE(1'b1)) u_cipher (
    .clk, .rst_n,
    .data_in  (cipher_din),
    .round_key(rd_key),
    .rk_index,
    .rk_valid,
    .data_out,
    .done
  );

endmodule
