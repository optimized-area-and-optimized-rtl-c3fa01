// tb_aes_mix_column: MixColumns and InvMixColumns on one column, checked
// against the reference matrix products for the published example columns
// and random columns, plus the round trip Inv(Mix(x)) = x.
module tb_aes_mix_column;
  import aes_ref_pkg::*;
  logic [31:0] col, fwd, inv, back;
  int checks = 0, failures = 0;

  aes_mix_column #(.INVERSE(1'b0)) dut_f (.col_in(col), .col_out(fwd));
  aes_mix_column #(.INVERSE(1'b1)) dut_i (.col_in(col), .col_out(inv));
  aes_mix_column #(.INVERSE(1'b1)) dut_b (.col_in(fwd), .col_out(back));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] c);
    blk_t s;
    col = c;
    #1;
    s = {c, 96'h0};
    checks += 3;
    if (fwd != mix(s, 0)[127:96]) begin failures++; $display("mix %08x -> %08x", c, fwd); end
    if (inv != mix(s, 1)[127:96]) begin failures++; $display("inv %08x -> %08x", c, inv); end
    if (back != c) failures++;
  endtask

  initial begin
    check(32'hdb135345);
    checks++; if (fwd != 32'h8e4da1bc) failures++;   // well-known test column
    check(32'hf20a225c);
    checks++; if (fwd != 32'h9fdc589d) failures++;
    for (int i = 0; i < 500; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
