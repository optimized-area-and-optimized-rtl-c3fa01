// tb_aes_area_cipher: drives the iterative datapath directly with reference
// sub-keys, one per clock (ascending for INVERSE = 0, descending for
// INVERSE = 1), and checks the result and the done pulse ten cycles after
// the block entered. Uses the FIPS-197 vector and random blocks.
module tb_aes_area_cipher;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  blk_t din, rk_e, rk_d, dout_e, dout_d;
  logic [3:0] idx;
  logic vld, done_e, done_d;
  int checks = 0, failures = 0;

  aes_area_cipher #(.INVERSE(1'b0)) u_enc (.clk, .rst_n, .data_in(din), .round_key(rk_e),
    .rk_index(idx), .rk_valid(vld), .data_out(dout_e), .done(done_e));
  aes_area_cipher #(.INVERSE(1'b1)) u_dec (.clk, .rst_n, .data_in(din), .round_key(rk_d),
    .rk_index(idx), .rk_valid(vld), .data_out(dout_d), .done(done_d));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vld = 0; idx = 0; din = '0; rk_e = '0; rk_d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      blk_t k, pt, ct;
      k  = (n == 0) ? 128'h000102030405060708090a0b0c0d0e0f : rand128();
      pt = (n == 0) ? 128'h00112233445566778899aabbccddeeff : rand128();
      ct = encrypt(pt, k);
      for (int r = 0; r <= 10; r++) begin
        @(negedge clk);
        vld = 1; idx = 4'(r);
        din  = (r == 0) ? pt : rand128();   // only sampled at index 0 ...
        rk_e = subkey(k, r);
        rk_d = subkey(k, 10 - r);
        if (r == 0) din = pt;
      end
      // the decipher instance got pt as its input, so its result is decrypt(pt)
      @(negedge clk); vld = 0;
      checks += 4;
      if (!done_e || !done_d) failures++;
      if (dout_e != ct) begin failures++; $display("enc %h exp %h", dout_e, ct); end
      if (dout_d != decrypt(pt, k)) begin failures++; $display("dec %h", dout_d); end
      if (n == 0 && dout_e != 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;
      @(negedge clk);
      checks++; if (done_e || done_d) failures++;   // done is a single pulse
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
