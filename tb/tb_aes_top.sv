// tb_aes_top: end-to-end test of the four serial AES processors at their
// default sizes. For every processor (area encryptor, area decryptor,
// pipelined encryptor, pipelined decryptor) a model of the external
// peripheral answers the key/data requests with 128 serial bits, MSB first,
// and collects the serial result; a model of the operator drives the
// commands. Each processor does one operation in discrete mode (get_key,
// get_data, encrypt, output_data as separate commands) and then three loops
// of continuous mode (one start pulse). Every result is compared with the
// reference model; the FIPS-197 vector is the first block of every run.
// Counted mechanisms: discrete operations, continuous loops, the area
// decryptor's reuse of a stored key schedule and its rebuild, and the
// pipelined decryptor holding a block back until its key pipeline is full
// (both seen from the length of the Encrypt/decrypt state).
module tb_aes_top;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] start = 0, get_key = 0, get_data = 0, encrypt = 0, output_data = 0;
  logic [3:0] input_key_done, input_data_done, encryption_done, output_data_done;
  logic [3:0] serial_key = 0, key_ready = 0, request_key;
  logic [3:0] serial_din = 0, din_ready = 0, request_din;
  logic [3:0] serial_dout, dout_ready, request_dout = 0;
  int checks = 0, failures = 0;
  int n_discrete [4] = '{0, 0, 0, 0};
  int n_loops    [4] = '{0, 0, 0, 0};
  int n_key_hit = 0, n_key_rebuild = 0, n_dec_wait = 0;

  aes_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism probes, from the ports: the length of each Encrypt/decrypt
  // state (input_data_done high, encryption_done low) tells whether the
  // decryptors had to build a key schedule first (about 21 cycles) or
  // could start at once (about 11 cycles)
  int crypt_len [4] = '{0, 0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) begin
      if (input_data_done[i] && !encryption_done[i]) crypt_len[i]++;
      else if (crypt_len[i] != 0) begin
        if (i == 1) begin
          if (crypt_len[i] > 16) n_key_rebuild++; else n_key_hit++;
        end
        if (i == 3 && crypt_len[i] > 16) n_dec_wait++;
        crypt_len[i] = 0;
      end
    end
  end

  function automatic blk_t expected(int i, blk_t d, blk_t k);
    return (i == 0 || i == 2) ? aes_ref_pkg::encrypt(d, k) : aes_ref_pkg::decrypt(d, k);
  endfunction

  // ---- peripheral model ------------------------------------------------
  task automatic send_key(int i, blk_t k);
    while (!request_key[i]) @(negedge clk);
    repeat ($urandom_range(0, 3)) @(negedge clk);
    key_ready[i] = 1;
    @(negedge clk); key_ready[i] = 0;
    for (int b = 127; b >= 0; b--) begin serial_key[i] = k[b]; @(negedge clk); end
    serial_key[i] = 0;
  endtask

  task automatic send_data(int i, blk_t d);
    while (!request_din[i]) @(negedge clk);
    repeat ($urandom_range(0, 3)) @(negedge clk);
    din_ready[i] = 1;
    @(negedge clk); din_ready[i] = 0;
    for (int b = 127; b >= 0; b--) begin serial_din[i] = d[b]; @(negedge clk); end
    serial_din[i] = 0;
  endtask

  task automatic receive(int i, output blk_t r);
    while (!dout_ready[i]) @(negedge clk);
    checks++;
    if (!encryption_done[i] || !input_key_done[i] || !input_data_done[i]) failures++;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    request_dout[i] = 1;
    @(negedge clk); request_dout[i] = 0;
    for (int b = 127; b >= 0; b--) begin r[b] = serial_dout[i]; @(negedge clk); end
  endtask

  task automatic check_result(int i, blk_t got, blk_t d, blk_t k);
    checks++;
    if (got != expected(i, d, k)) begin
      failures++;
      $display("proc %0d: got %h exp %h", i, got, expected(i, d, k));
    end
  endtask

  // ---- operator ----------------------------------------------------------
  task automatic command(int i, int which);
    @(negedge clk);
    case (which)
      0: get_key[i] = 1;
      1: get_data[i] = 1;
      2: encrypt[i] = 1;
      3: output_data[i] = 1;
      default: start[i] = 1;
    endcase
    @(negedge clk);
    get_key[i] = 0; get_data[i] = 0; encrypt[i] = 0; output_data[i] = 0; start[i] = 0;
  endtask

  task automatic run_proc(int i);
    blk_t k, d, r;
    k = 128'h000102030405060708090a0b0c0d0e0f;
    d = (i == 0 || i == 2) ? 128'h00112233445566778899aabbccddeeff
                           : 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    // discrete mode, one command at a time
    command(i, 0); send_key(i, k);
    while (request_key[i] || input_key_done[i]) @(negedge clk);
    command(i, 1); send_data(i, d);
    while (input_data_done[i] || request_din[i]) @(negedge clk);
    command(i, 2);
    @(negedge clk);
    checks++; if (!input_data_done[i]) failures++;   // in Encrypt/decrypt
    while (input_data_done[i]) @(negedge clk);       // back in Idle: core done
    command(i, 3); receive(i, r);
    check_result(i, r, d, k);
    checks++; if (r != ((i == 0 || i == 2) ? 128'h69c4e0d86a7b0430d8cdb78070b4c55a
                                             : 128'h00112233445566778899aabbccddeeff)) failures++;
    n_discrete[i]++;
    // continuous mode: one start, then the processor asks for everything
    command(i, 4);
    for (int l = 0; l < 3; l++) begin
      if (l == 2) k = rand128();
      d = rand128();
      send_key(i, k);
      send_data(i, d);
      receive(i, r);
      check_result(i, r, d, k);
      n_loops[i]++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_proc(0);
      run_proc(1);
      run_proc(2);
      run_proc(3);
    join
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (n_discrete[i] == 0) failures++;
      if (n_loops[i] == 0) failures++;
      $display("processor %0d: discrete ops %0d, continuous loops %0d", i, n_discrete[i], n_loops[i]);
    end
    checks += 3;
    if (n_key_hit == 0) failures++;
    if (n_key_rebuild == 0) failures++;
    if (n_dec_wait == 0) failures++;
    $display("area decryptor: key schedule reused %0d, rebuilt %0d; pipelined decryptor key-pipeline waits %0d",
             n_key_hit, n_key_rebuild, n_dec_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
