// tb_aes_speed_keyexp: loads a key into the key pipeline and checks that
// register i holds sub-key i and ready[i] is set exactly i cycles after the
// load edge, and that next_key[i] is sub-key i once settled. Then loads a
// second key and checks that readiness is withdrawn and refilled.
module tb_aes_speed_keyexp;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  blk_t key_in;
  blk_t subkey [11];
  blk_t next_key [11];
  logic [10:0] ready;
  int checks = 0, failures = 0;

  aes_speed_keyexp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(blk_t k);
    @(negedge clk); key_in = k; load = 1;
    @(negedge clk); load = 0;
    for (int c = 0; c <= 10; c++) begin
      // after c+1 edges from the load, registers 0..c are valid
      checks += 2;
      if (ready != 11'((1 << (c + 1)) - 1)) begin failures++; $display("c%0d ready %b", c, ready); end
      if (subkey[c] != subkey_ref(k, c)) begin failures++; $display("c%0d sk %h", c, subkey[c]); end
      @(negedge clk);
    end
    for (int i = 0; i <= 10; i++) begin
      checks += 2;
      if (subkey[i] != subkey_ref(k, i)) failures++;
      if (i > 0 && next_key[i] != subkey_ref(k, i)) failures++;
    end
  endtask

  function automatic blk_t subkey_ref(blk_t k, int r);
    return aes_ref_pkg::subkey(k, r);
  endfunction

  initial begin
    key_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f);
    run(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
