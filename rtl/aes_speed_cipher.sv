// aes_speed_cipher: fully unrolled, pipelined cipher or decipher datapath of the
// high-throughput cores (K = Nr = 10 round units).
//
// Stage 0 is the initial AddRoundKey followed by a 128-bit register; stages
// 1..9 are a full round followed by a register; round 10 (the final round,
// without (Inv)MixColumns) drives data_out combinationally from the last
// register. Stage k uses round_key[k]. S-boxes are ROM tables.
// A block presented with in_valid is taken at that edge; the pipeline advances
// every clock, so a new block can enter each cycle. out_valid and data_out
// appear ten cycles after the block entered. When no new block enters, the
// first register holds and the later stages recompute the same block, so
// data_out stays on the last result. busy is high while any stage holds a
// block that has not yet reached the output.
module aes_speed_cipher
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t data_in,
  input  block_t round_key [NR+1],
  output block_t data_out,
  output logic   out_valid,
  output logic   busy
);

  block_t         stage_q   [NR];      // register after stage k (k = 0..9)
  block_t         round_out [1:NR];
  logic [NR-1:0]  valid_q;

  for (genvar k = 1; k <= NR; k++) begin : g_round
    aes_round #(.INVERSE(INVERSE), .USE_LUT(1'b1)) u_round (
      .state_in (stage_q[k-1]),
      .round_key(round_key[k]),
      .is_final (k == NR),
      .state_out(round_out[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NR; k++) stage_q[k] <= '0;
      valid_q <= '0;
    end else begin
      if (in_valid) stage_q[0] <= data_in ^ round_key[0];
      for (int k = 1; k < NR; k++) stage_q[k] <= round_out[k];
      valid_q <= {valid_q[NR-2:0], in_valid};
    end
  end

  assign data_out  = round_out[NR];
  assign out_valid = valid_q[NR-1];
  assign busy      = |valid_q;

endmodule
