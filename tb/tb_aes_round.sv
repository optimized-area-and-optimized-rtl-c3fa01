// tb_aes_round: one cipher round and one decipher round, normal and final,
// with both S-box styles, against the reference model on random states.
module tb_aes_round;
  import aes_ref_pkg::*;
  blk_t st, rk, e_cf, e_lut, d_cf, d_lut;
  logic fin;
  int checks = 0, failures = 0;

  aes_round #(.INVERSE(1'b0), .USE_LUT(1'b0)) u_e_cf  (.state_in(st), .round_key(rk), .is_final(fin), .state_out(e_cf));
  aes_round #(.INVERSE(1'b0), .USE_LUT(1'b1)) u_e_lut (.state_in(st), .round_key(rk), .is_final(fin), .state_out(e_lut));
  aes_round #(.INVERSE(1'b1), .USE_LUT(1'b0)) u_d_cf  (.state_in(st), .round_key(rk), .is_final(fin), .state_out(d_cf));
  aes_round #(.INVERSE(1'b1), .USE_LUT(1'b1)) u_d_lut (.state_in(st), .round_key(rk), .is_final(fin), .state_out(d_lut));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      blk_t ee, de;
      st  = rand128();
      rk  = rand128();
      fin = i[0];
      #1;
      ee = shift(sub_bytes(st, 0), 0);
      if (!fin) ee = mix(ee, 0);
      ee ^= rk;
      de = sub_bytes(shift(st, 1), 1) ^ rk;
      if (!fin) de = mix(de, 1);
      checks += 4;
      if (e_cf  != ee) failures++;
      if (e_lut != ee) failures++;
      if (d_cf  != de) failures++;
      if (d_lut != de) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
