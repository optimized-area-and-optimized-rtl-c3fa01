// tb_aes_area_encryptor: the small-area encryptor end to end. Checks the
// FIPS-197 vector (key 000102..0f, plaintext 00112233..ff ->
// 69c4e0d86a7b0430d8cdb78070b4c55a), random blocks and keys, back-to-back
// starts, that done comes exactly 10 clocks after start, and a held start
// that streams blocks at one per 11 clocks.
module tb_aes_area_encryptor;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  blk_t data_in, key_in, data_out;
  int checks = 0, failures = 0, n_stream = 0;

  aes_area_encryptor dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(blk_t pt, blk_t k);
    int cyc;
    @(negedge clk); data_in = pt; key_in = k; start = 1;
    @(negedge clk); start = 0; data_in = rand128(); key_in = rand128();
    cyc = 0;
    while (!done && cyc < 40) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != 10) begin failures++; $display("latency %0d", cyc); end
    if (data_out != encrypt(pt, k)) begin failures++; $display("ct %h", data_out); end
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
        if (data_out != aes_ref_pkg::encrypt(blocks[got], k)) begin failures++; $display("stream %0d wrong", got); end
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
    data_in = '0; key_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f);
    checks++; if (data_out != 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;
    for (int i = 0; i < 30; i++) one(rand128(), rand128());
    stream(128'h000102030405060708090a0b0c0d0e0f, 8);
    checks++; if (n_stream != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
