// tb_aes_sbox_lut: exhaustive check of the look-up-table S-box and inverse
// S-box against the reference model, all 256 inputs each.
module tb_aes_sbox_lut;
  import aes_ref_pkg::*;
  logic [7:0] a, y_f, y_i;
  int checks = 0, failures = 0;

  aes_sbox_lut #(.INVERSE(1'b0)) dut_f (.in_byte(a), .out_byte(y_f));
  aes_sbox_lut #(.INVERSE(1'b1)) dut_i (.in_byte(a), .out_byte(y_i));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init_tables();
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks += 2;
      if (y_f != SB[i])  begin failures++; $display("sbox(%02x)=%02x exp %02x", i, y_f, SB[i]); end
      if (y_i != ISB[i]) begin failures++; $display("isbox(%02x)=%02x exp %02x", i, y_i, ISB[i]); end
    end
    // the two published sample points of the standard
    a = 8'h53; #1; checks++; if (y_f != 8'hed) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
