// tb_aes_serial_in: plays the external peripheral of a serial input unit.
// Checks that request rises after start, that 128 bits sent MSB first in the
// 128 clocks after ready form the parallel word, that complete follows
// exactly then and holds until start falls, and that the unit returns to
// idle. Also checks that dropping start during the handshake abandons it.
module tb_aes_serial_in;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, complete, request, ready = 0, serial_in = 0;
  logic [127:0] data_out;
  int checks = 0, failures = 0;

  aes_serial_in dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(logic [127:0] w, int delay);
    @(negedge clk); start = 1;
    @(negedge clk);
    checks++; if (!request) failures++;
    repeat (delay) @(negedge clk);
    checks++; if (!request || complete) failures++;
    ready = 1;
    @(negedge clk); ready = 0;
    checks++; if (request) failures++;
    for (int i = 127; i >= 0; i--) begin
      serial_in = w[i];
      checks++; if (complete) failures++;
      @(negedge clk);
    end
    serial_in = $urandom;
    checks += 2;
    if (!complete) failures++;
    if (data_out != w) begin failures++; $display("word %h exp %h", data_out, w); end
    repeat (3) @(negedge clk);
    checks++; if (!complete) failures++;
    start = 0;
    @(negedge clk); @(negedge clk);
    checks += 2;
    if (complete || request) failures++;
    if (data_out != w) failures++;   // word is kept
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    xfer(128'h000102030405060708090a0b0c0d0e0f, 0);
    xfer(rand128(), 3);
    xfer(rand128(), 7);
    // abandoned handshake
    @(negedge clk); start = 1;
    @(negedge clk); @(negedge clk); start = 0;
    @(negedge clk); @(negedge clk);
    checks++; if (request || complete) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
