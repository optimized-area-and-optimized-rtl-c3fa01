// tb_aes_area_enc_keyexp: starts the on-the-fly key schedule and checks that
// sub-keys 0..10 appear in the start cycle and the ten cycles after it, one
// per clock with the right index and sub-key-ready, then that ready drops.
// A start raised in the middle of a schedule must be ignored.
module tb_aes_area_enc_keyexp;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  blk_t key_in, round_key;
  logic [3:0] rk_index;
  logic rk_valid;
  int checks = 0, failures = 0;

  aes_area_enc_keyexp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // start a schedule; optionally raise start again (with another key) in
  // the cycle of sub-key poke_at, which must not disturb the schedule
  task automatic run(blk_t k, int poke_at);
    @(negedge clk); key_in = k; start = 1;
    for (int r = 0; r <= 10; r++) begin
      #1;
      checks += 3;
      if (!rk_valid) failures++;
      if (rk_index != 4'(r)) begin failures++; $display("idx %0d exp %0d", rk_index, r); end
      if (round_key != subkey(k, r)) begin failures++; $display("rk %0d %h", r, round_key); end
      @(negedge clk);
      key_in = rand128();   // key_in may change after start
      start = (r + 1 == poke_at);
    end
    start = 0;
  endtask

  initial begin
    key_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 10);
    #1; checks++; if (rk_valid) failures++;
    run(rand128(), 4);   // start raised again at sub-key 4: ignored
    #1; checks++; if (rk_valid) failures++;
    run(rand128(), 10);  // ... and at sub-key 10
    #1; checks++; if (rk_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
