// tb_aes_area_dec_keyexp: loads a key, checks that ready rises exactly eleven
// cycles after the start pulse (ten sub-keys, one per clock), then reads all
// eleven stored sub-keys in reverse order and compares them with the
// reference schedule. Repeated for random keys.
module tb_aes_area_dec_keyexp;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  blk_t key_in, rd_key, stored_key;
  logic [3:0] rd_index;
  logic ready;
  int checks = 0, failures = 0;

  aes_area_dec_keyexp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_index = 0; key_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      blk_t k;
      int cyc;
      k = (n == 0) ? 128'h000102030405060708090a0b0c0d0e0f : rand128();
      @(negedge clk); key_in = k; start = 1;
      @(negedge clk); start = 0; key_in = rand128();
      cyc = 1;
      while (!ready && cyc < 50) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 11) begin failures++; $display("ready after %0d cycles", cyc); end
      for (int r = 10; r >= 0; r--) begin
        rd_index = 4'(r);
        #1;
        checks++;
        if (rd_key != subkey(k, r)) begin failures++; $display("rk%0d %h", r, rd_key); end
      end
      checks++; if (stored_key != k) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
