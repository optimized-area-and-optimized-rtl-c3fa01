// tb_aes_area_decryptor: the small-area decryptor end to end. Decrypts the
// FIPS-197 ciphertext, random blocks under a repeated key (the stored key
// schedule is reused: done 10 clocks after start) and under fresh keys (the
// schedule is rebuilt first: done 21 clocks after start). Counts both cases.
// Finally a held start streams blocks at one per 11 clocks.
module tb_aes_area_decryptor;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  blk_t data_in, key_in, data_out;
  int checks = 0, failures = 0, n_stream = 0, n_new = 0, n_reuse = 0;

  aes_area_decryptor dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(blk_t ct, blk_t k, int exp_lat);
    int cyc;
    @(negedge clk); data_in = ct; key_in = k; start = 1;
    @(negedge clk); start = 0; data_in = rand128(); key_in = rand128();
    cyc = 0;
    while (!done && cyc < 60) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != exp_lat) begin failures++; $display("latency %0d exp %0d", cyc, exp_lat); end
    if (data_out != decrypt(ct, k)) begin failures++; $display("pt %h", data_out); end
    if (exp_lat == 10) n_reuse++; else n_new++;
  endtask

  // start held high: one block is taken when idle, the next in the cycle where
  // done is high; the testbench moves data_in on in that cycle. Checks every
  // result and the 11-clock period between done pulses.
  task automatic stream(blk_t k, int n);
    blk_t blocks [$];
    int last_done, cyc, got;
    for (int i = 0; i < n + 1; i++) blocks.push_back(rand128());
    @(negedge clk); key_in = k; data_in = blocks[0]; start = 1;
    got = 0; cyc = 0; last_done = -1;
    while (got < n && cyc < 40 * n) begin
      @(negedge clk); cyc++;
      if (done) begin
        checks++;
        if (data_out != aes_ref_pkg::decrypt(blocks[got], k)) begin failures++; $display("stream %0d wrong", got); end
        if (last_done >= 0) begin
          checks++;
          if (cyc - last_done != 11) begin failures++; $display("period %0d", cyc - last_done); end
        end
        last_done = cyc;
        got++;
        data_in = blocks[got];
        n_stream++;
      end
    end
    start = 0;
    repeat (15) @(negedge clk);
  endtask

  initial begin
    blk_t k;
    data_in = '0; key_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f, 21);
    checks++; if (data_out != 128'h00112233445566778899aabbccddeeff) failures++;
    one(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f, 10);
    for (int i = 0; i < 10; i++) begin
      k = rand128();
      one(rand128(), k, 21);
      for (int j = 0; j < 3; j++) one(rand128(), k, 10);
    end
    checks += 2;
    if (n_new == 0) failures++;
    if (n_reuse == 0) failures++;
    $display("new-key runs %0d, reused-key runs %0d", n_new, n_reuse);
    stream(128'h000102030405060708090a0b0c0d0e0f, 8);
    checks++; if (n_stream != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
