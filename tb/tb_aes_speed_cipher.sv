// tb_aes_speed_cipher: streams one block per clock into both pipelines
// (cipher and decipher) with a fixed reference key schedule applied per
// stage, and checks every result, its order, and the ten-cycle latency
// from in_valid to out_valid. busy must fall after the stream drains.
module tb_aes_speed_cipher;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  blk_t din, dout_e, dout_d;
  blk_t rk_e [11];
  blk_t rk_d [11];
  logic ov_e, ov_d, busy_e, busy_d;
  blk_t key;
  blk_t q_in [$];
  int   q_t  [$];
  int checks = 0, failures = 0, cyc = 0, outs = 0;

  aes_speed_cipher #(.INVERSE(1'b0)) u_e (.clk, .rst_n, .in_valid, .data_in(din), .round_key(rk_e),
    .data_out(dout_e), .out_valid(ov_e), .busy(busy_e));
  aes_speed_cipher #(.INVERSE(1'b1)) u_d (.clk, .rst_n, .in_valid, .data_in(din), .round_key(rk_d),
    .data_out(dout_d), .out_valid(ov_d), .busy(busy_d));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard, sampled between edges
  always @(negedge clk) if (rst_n && ov_e) begin
    blk_t pt;
    int t;
    pt = q_in.pop_front();
    t  = q_t.pop_front();
    checks += 4;
    outs++;
    if (!ov_d) failures++;
    if (cyc - t != 10) begin failures++; $display("latency %0d", cyc - t); end
    if (dout_e != encrypt(pt, key)) begin failures++; $display("enc %h", dout_e); end
    if (dout_d != decrypt(pt, key)) begin failures++; $display("dec %h", dout_d); end
  end

  initial begin
    key = 128'h000102030405060708090a0b0c0d0e0f;
    for (int i = 0; i <= 10; i++) begin
      rk_e[i] = subkey(key, i);
      rk_d[i] = subkey(key, 10 - i);
    end
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      in_valid = (i % 7 != 6);          // mostly back to back, with gaps
      din = (i == 0) ? 128'h00112233445566778899aabbccddeeff : rand128();
      if (in_valid) begin q_in.push_back(din); q_t.push_back(cyc); end
    end
    @(negedge clk); in_valid = 0;
    repeat (15) @(negedge clk);
    checks += 3;
    if (q_in.size() != 0) failures++;
    if (outs < 30) failures++;
    if (busy_e || busy_d) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
