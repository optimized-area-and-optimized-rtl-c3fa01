// aes_speed_encryptor: high-throughput AES-128 encryptor, one block per clock.
//
// The pipelined key schedule (aes_speed_keyexp) runs beside the cipher
// pipeline (aes_speed_cipher): a key entering with a block moves down the key
// pipeline one stage per cycle, and each cipher stage takes its sub-key from
// the expansion round feeding the matching key register. Every block is
// therefore encrypted with the key given together with it, even if the key
// changes from one block to the next.
// Interface: while start is high one block (data_in, key_in) is accepted per
// clock. complete and data_out follow ten clocks later, in the same order.
module aes_speed_encryptor
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

  block_t        next_key [NR+1];

  aes_speed_keyexp u_keyexp (
    .clk, .rst_n, .load(start), .key_in, .subkey(), .next_key, .ready()
  );

  aes_speed_cipher #(.INVERSE(1'b0)) u_cipher (
    .clk, .rst_n,
    .in_valid (start),
    .data_in,
    .round_key(next_key),
    .data_out,
    .out_valid(complete),
    .busy     ()
  );

endmodule
