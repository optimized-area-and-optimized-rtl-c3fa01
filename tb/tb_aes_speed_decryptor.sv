// tb_aes_speed_decryptor: the pipelined decryptor end to end. Holds start
// with the FIPS-197 ciphertext and a new key: the first plaintext must come
// 21 clocks after start (key pipeline fill, then ten stages). Then streams a
// block per clock under the same key (one result per clock, ten clocks after
// acceptance) and finally changes the key while blocks are in flight, which
// must stall the input until the pipeline drains and the new schedule is in.
module tb_aes_speed_decryptor;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, complete;
  blk_t data_in, key_in, data_out;
  blk_t q_pt [$];
  int checks = 0, failures = 0, cyc = 0, outs = 0, stalls = 0, first_out = -1, t0 = -1;

  aes_speed_decryptor dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && complete) begin
    blk_t pt;
    pt = q_pt.pop_front();
    checks++;
    outs++;
    if (first_out < 0) first_out = cyc;
    if (data_out != pt) begin failures++; $display("pt %h exp %h", data_out, pt); end
  end

  // offer one block; wait until the decryptor takes it (accept is internal:
  // a block is taken in a cycle where start is high and the key is ready)
  task automatic offer(blk_t ct, blk_t k);
    @(negedge clk);
    start = 1; data_in = ct; key_in = k;
    if (t0 < 0) t0 = cyc;
    #1;
    while (!dut.accept) begin @(negedge clk); #1; stalls++; end
    q_pt.push_back(decrypt(ct, k));
  endtask

  initial begin
    blk_t k2;
    data_in = '0; key_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    offer(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f);
    for (int i = 0; i < 30; i++) offer(rand128(), 128'h000102030405060708090a0b0c0d0e0f);
    k2 = rand128();
    for (int i = 0; i < 10; i++) offer(rand128(), k2);
    @(negedge clk); start = 0;
    repeat (15) @(negedge clk);
    checks += 4;
    if (first_out - t0 != 21) begin failures++; $display("first latency %0d", first_out - t0); end
    if (outs != 41) begin failures++; $display("outs %0d", outs); end
    if (q_pt.size() != 0) failures++;
    if (stalls < 20) failures++;     // both key loads must have stalled the input
    $display("results %0d, stall cycles %0d, first latency %0d", outs, stalls, first_out - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
