// aes_area_cipher: iterative (one round reused) cipher or decipher datapath of
// the small-area cores.
//
// A multiplexer selects either the new input block or the fed-back state into a
// single 128-bit state register; one combinational round (composite-field
// S-boxes, shared MixColumns) closes the loop. The block does not count rounds
// itself: it follows the key source, which presents one round key per cycle
// with its index.
//   rk_index 0      : state <= data_in ^ round_key      (initial AddRoundKey)
//   rk_index 1..9   : state <= round(state, round_key)
//   rk_index 10     : state <= final round (no MixColumns), done pulses next cycle
// So data_out is valid, and done is high for one cycle, ten clocks after the
// cycle in which the block entered. data_out holds until the next block.
// For the decipher (INVERSE = 1) the key source must supply the sub-keys in
// reverse order (sub-key 10 with index 0, ... sub-key 0 with index 10).
module aes_area_cipher
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  block_t data_in,
  input  block_t round_key,
  input  round_t rk_index,
  input  logic   rk_valid,
  output block_t data_out,
  output logic   done
);

  block_t state_q, round_out;

  aes_round #(.INVERSE(INVERSE), .USE_LUT(1'b0)) u_round (
    .state_in (state_q),
    .round_key(round_key),
    .is_final (rk_index == round_t'(NR)),
    .state_out(round_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= rk_valid && (rk_index == round_t'(NR));
      if (rk_valid)
        state_q <= (rk_index == round_t'(0)) ? (data_in ^ round_key) : round_out;
    end
  end

  assign data_out = state_q;

endmodule
