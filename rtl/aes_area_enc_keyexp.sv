// aes_area_enc_keyexp: on-the-fly key schedule of the small-area encryptor.
//
// One key-expansion round is built and reused: a multiplexer chooses between
// the input key (on start) and the fed-back sub-key, a 128-bit sub-key register
// holds the current round key, and the key-expansion round derives the next
// one. One sub-key is produced per clock, in step with the cipher rounds, so
// no key storage is needed.
//
// Timing: a start seen while idle takes key_in; in that cycle round_key =
// key_in and rk_index = 0 (the key for the initial AddRoundKey). In each of the
// next 10 cycles round_key is the freshly derived sub-key 1..10 with
// rk_index = 1..10. rk_valid ("sub-key ready") is high in all 11 of these
// cycles. start is ignored while a schedule is running, so a start held high
// runs one schedule after another, each beginning in the cycle after the
// previous one ends (one every 11 clocks).
module aes_area_enc_keyexp
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t key_in,
  output block_t round_key,
  output round_t rk_index,
  output logic   rk_valid
);

  block_t key_q, key_next;
  round_t rnd_q;
  logic   busy_q, take;

  assign take = start && !busy_q;

  aes_key_round #(.USE_LUT(1'b0)) u_key_round (
    .key_in (key_q),
    .rcon_in(rcon(rnd_q)),
    .key_out(key_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q  <= '0;
      rnd_q  <= '0;
      busy_q <= 1'b0;
    end else if (take) begin
      key_q  <= key_in;
      rnd_q  <= round_t'(1);
      busy_q <= 1'b1;
    end else if (busy_q) begin
      key_q  <= key_next;
      rnd_q  <= rnd_q + round_t'(1);
      busy_q <= (rnd_q != round_t'(NR));
    end
  end

  assign round_key = take ? key_in : key_next;
  assign rk_index  = take ? round_t'(0) : rnd_q;
  assign rk_valid  = take | busy_q;

endmodule
