// tb_aes_speed_encryptor: the pipelined encryptor end to end. Holds start
// high and offers a new block every clock, with the key changing every few
// blocks, and checks that each ciphertext appears with complete exactly ten
// clocks after its block entered, in order, encrypted with its own key.
module tb_aes_speed_encryptor;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, complete;
  blk_t data_in, key_in, data_out;
  blk_t q_ct [$];
  int   q_t  [$];
  int checks = 0, failures = 0, cyc = 0, outs = 0, key_changes = 0;

  aes_speed_encryptor dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && complete) begin
    blk_t ct;
    int t;
    ct = q_ct.pop_front();
    t  = q_t.pop_front();
    checks += 2;
    outs++;
    if (cyc - t != 10) begin failures++; $display("latency %0d", cyc - t); end
    if (data_out != ct) begin failures++; $display("ct %h exp %h", data_out, ct); end
  end

  initial begin
    data_in = '0; key_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    key_in = 128'h000102030405060708090a0b0c0d0e0f;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      start = 1;
      data_in = (i == 0) ? 128'h00112233445566778899aabbccddeeff : rand128();
      if (i % 9 == 8) begin key_in = rand128(); key_changes++; end
      q_ct.push_back(encrypt(data_in, key_in));
      q_t.push_back(cyc);
    end
    @(negedge clk); start = 0;
    repeat (15) @(negedge clk);
    checks += 2;
    if (outs != 60) failures++;
    if (key_changes == 0) failures++;
    $display("blocks %0d, key changes %0d", outs, key_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
