// aes_area_dec_keyexp: key schedule of the small-area decryptor, computed
// ahead of time and stored.
//
// Decryption needs the last sub-key first, so the schedule cannot be produced
// on the fly in cipher order. Instead one key-expansion round is reused to walk
// through the whole schedule once (multiplexer, 128-bit register, key-expansion
// round, as in the encryptor) and every result is written into a bank of
// Nr + 1 = 11 registers of 128 bits. The decipher then reads them in any order.
//
// Timing: a start pulse loads key_in (sub-key 0 is stored at once); sub-keys
// 1..10 are stored in the following ten cycles, one per cycle. ready rises in
// the cycle after the last one is written and stays high until the next start.
// rd_key = stored sub-key rd_index, combinational read; stored_key is sub-key 0,
// i.e. the cipher key the bank currently holds.
module aes_area_dec_keyexp
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t key_in,
  input  round_t rd_index,
  output block_t rd_key,
  output block_t stored_key,
  output logic   ready
);

  block_t cur_q, key_next;
  block_t bank_q [NR+1];
  round_t cnt_q;
  logic   busy_q;

  aes_key_round #(.USE_LUT(1'b0)) u_key_round (
    .key_in (cur_q),
    .rcon_in(rcon(cnt_q)),
    .key_out(key_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q  <= '0;
      cnt_q  <= '0;
      busy_q <= 1'b0;
      ready  <= 1'b0;
    end else if (start) begin
      cur_q  <= key_in;
      cnt_q  <= round_t'(1);
      busy_q <= 1'b1;
      ready  <= 1'b0;
    end else if (busy_q) begin
      cur_q  <= key_next;
      cnt_q  <= cnt_q + round_t'(1);
      busy_q <= (cnt_q != round_t'(NR));
      ready  <= (cnt_q == round_t'(NR));
    end
  end

  // the register bank (no reset: it is only read once ready is high)
  always_ff @(posedge clk) begin
    if (start)
      bank_q[0] <= key_in;
    else if (busy_q)
      bank_q[cnt_q] <= key_next;
  end

  assign rd_key     = (rd_index <= round_t'(NR)) ? bank_q[rd_index] : '0;
  assign stored_key = bank_q[0];

endmodule
