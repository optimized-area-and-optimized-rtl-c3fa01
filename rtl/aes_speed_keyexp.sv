// aes_speed_keyexp: pipelined key schedule of the high-throughput cores.
//
// The key-expansion round is unrolled Nr = 10 times with a 128-bit sub-key
// register in front of and after each copy: register 0 takes the input key on
// load, register i takes round(i) of register i-1 on every clock. A key that
// enters therefore advances one sub-key per cycle, in step with a data block
// entering the cipher pipeline at the same edge. When the key stays constant
// the eleven registers settle on the whole schedule (all 44 key words), which
// is what the decipher pipeline reads.
//
// Outputs: subkey[i] is register i (sub-key i once settled); next_key[i]
// (i = 1..10) is the combinational output of expansion round i, i.e. the value
// register i takes at the next edge, used by the cipher to stay aligned with
// its data. ready[i] says that register i holds the schedule of the key now in
// register 0; loading a different key clears ready[1..10], which then refill
// one per cycle. next_key[0] is key_in.
module aes_speed_keyexp
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  block_t    key_in,
  output block_t    subkey   [NR+1],
  output block_t    next_key [NR+1],
  output logic [NR:0] ready
);

  block_t key_q [NR+1];
  logic   key_change;

  assign key_change  = load && (key_in != key_q[0]);
  assign next_key[0] = key_in;

  for (genvar i = 1; i <= NR; i++) begin : g_round
    aes_key_round #(.USE_LUT(1'b1)) u_key_round (
      .key_in (key_q[i-1]),
      .rcon_in(rcon(round_t'(i))),
      .key_out(next_key[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= NR; i++) key_q[i] <= '0;
      ready <= '0;
    end else begin
      if (load) key_q[0] <= key_in;
      for (int i = 1; i <= NR; i++) key_q[i] <= next_key[i];
      ready[0] <= ready[0] | load;
      for (int i = 1; i <= NR; i++) ready[i] <= ready[i-1] & ~key_change;
    end
  end

  assign subkey = key_q;

endmodule
