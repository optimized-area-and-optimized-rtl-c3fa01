// tb_aes_serial_out: plays the external peripheral of the serial output unit.
// Checks that out_ready rises after start, that after request the word comes
// out MSB first over exactly 128 clocks, that the word is the one present
// when start rose (later changes of data_in are ignored), and that complete
// follows and holds until start falls.
module tb_aes_serial_out;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, complete, out_ready, request = 0, serial_out;
  logic [127:0] data_in;
  int checks = 0, failures = 0;

  aes_serial_out dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(logic [127:0] w, int delay);
    logic [127:0] got;
    @(negedge clk); start = 1; data_in = w;
    @(negedge clk); data_in = rand128();
    checks++; if (!out_ready) failures++;
    repeat (delay) @(negedge clk);
    checks += 2;
    if (!out_ready) failures++;
    if (serial_out) failures++;
    request = 1;
    @(negedge clk); request = 0;
    for (int i = 127; i >= 0; i--) begin
      got[i] = serial_out;
      checks++; if (complete || out_ready) failures++;
      @(negedge clk);
    end
    checks += 3;
    if (got != w) begin failures++; $display("got %h exp %h", got, w); end
    if (!complete) failures++;
    if (serial_out) failures++;
    start = 0;
    @(negedge clk); @(negedge clk);
    checks++; if (complete || out_ready) failures++;
  endtask

  initial begin
    data_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    xfer(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0);
    xfer(rand128(), 4);
    xfer(rand128(), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
