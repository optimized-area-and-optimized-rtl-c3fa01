// tb_aes_key_round: chains ten key-expansion rounds (both S-box styles) from
// the FIPS-197 key 2b7e1516... and from random keys and compares every
// sub-key with the reference schedule; sub-key 10 of the example key is also
// compared with its published value d014f9a8c9ee2589e13f0cc8b6630ca6.
module tb_aes_key_round;
  import aes_ref_pkg::*;
  blk_t k_in, k_cf, k_lut;
  logic [7:0] rc;
  int checks = 0, failures = 0;

  aes_key_round #(.USE_LUT(1'b0)) u_cf  (.key_in(k_in), .rcon_in(rc), .key_out(k_cf));
  aes_key_round #(.USE_LUT(1'b1)) u_lut (.key_in(k_in), .rcon_in(rc), .key_out(k_lut));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_key(blk_t key);
    blk_t cur;
    logic [7:0] rcv;
    cur = key;
    rcv = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      k_in = cur; rc = rcv;
      #1;
      checks += 2;
      if (k_cf  != subkey(key, r)) begin failures++; $display("cf r%0d %h", r, k_cf); end
      if (k_lut != subkey(key, r)) failures++;
      cur = k_cf;
      rcv = rmul(rcv, 8'h02);
    end
    if (key == 128'h2b7e151628aed2a6abf7158809cf4f3c) begin
      checks++;
      if (cur != 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) failures++;
    end
  endtask

  initial begin
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    for (int i = 0; i < 20; i++) run_key(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
