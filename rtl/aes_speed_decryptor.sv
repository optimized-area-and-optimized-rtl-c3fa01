// aes_speed_decryptor: high-throughput AES-128 decryptor, one block per clock
// once the key schedule is in place.
//
// The decipher pipeline needs sub-key 10 in its first stage, so it cannot run
// in step with the key pipeline. Here the key pipeline (aes_speed_keyexp) is
// first filled with the whole schedule of the key (10 cycles), and the decipher
// pipeline (aes_speed_cipher, INVERSE = 1) then reads the settled registers in
// reverse order: stage k uses sub-key 10 - k.
// Interface: start offers a block with its key. A block is accepted only when
// the schedule of key_in is complete (ready); a new key is loaded only when no
// block is in flight, so blocks already inside finish with their own key. The
// caller holds start, data_in and key_in until accepted. The first block after
// a new key completes 2 x Nr = 20 cycles after start (plus one for the load);
// following blocks with the same key stream at one per clock, each ten cycles
// after acceptance.
module aes_speed_decryptor
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t data_in,
  input  block_t key_in,
  output block_t data_out,
  output logic   complete
);

  block_t        subkey   [NR+1];
  block_t        rev_key  [NR+1];
  logic [NR:0]   ready;
  logic          busy, key_same, load, accept;

  assign key_same = ready[0] && (subkey[0] == key_in);
  assign load     = start && !key_same && !busy;
  assign accept   = start && key_same && ready[NR];

  aes_speed_keyexp u_keyexp (
    .clk, .rst_n, .load, .key_in, .subkey, .next_key(), .ready
  );

  always_comb
    for (int k = 0; k <= NR; k++) rev_key[k] = subkey[NR-k];

  aes_speed_cipher #(.INVERSE(1'b1)) u_cipher (
    .clk, .rst_n,
    .in_valid (accept),
    .data_in,
    .round_key(rev_key),
    .data_out,
    .out_valid(complete),
    .busy
  );

endmodule
