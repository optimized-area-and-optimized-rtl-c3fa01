// tb_aes_control_unit: walks the control FSM through every transition of
// both modes with stand-in completion pulses, and checks the Moore output
// table in every state: discrete-mode round trips Idle -> state -> Idle for
// each command, then continuous mode for two full loops, then reset.
module tb_aes_control_unit;
  logic clk = 0, rst_n = 0;
  logic start = 0, get_key = 0, get_data = 0, encrypt = 0, output_data = 0;
  logic key_complete = 0, data_complete = 0, crypt_complete = 0, output_complete = 0;
  logic req_key, req_input, out_ready, crypt_start, crypting;
  logic input_key_done, input_data_done, encryption_done, output_data_done, continuous;
  int checks = 0, failures = 0, crypt_starts = 0;

  aes_control_unit dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (crypt_start) crypt_starts++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs per state: {req_key, req_input, out_ready, key_done,
  // data_done, enc_done, out_done, crypting}
  typedef enum int {IDLE, KEYREQ, INREQ, CRYPT, OUTRDY} st_e;
  function automatic logic [7:0] table_of(st_e s);
    case (s)
      IDLE:   return 8'b000_0000_0;
      KEYREQ: return 8'b100_0000_0;
      INREQ:  return 8'b010_1000_0;
      CRYPT:  return 8'b000_1100_1;
      OUTRDY: return 8'b001_1111_0;
      default: return 'x;
    endcase
  endfunction

  task automatic expect_state(st_e s);
    logic [7:0] got;
    got = {req_key, req_input, out_ready, input_key_done, input_data_done,
           encryption_done, output_data_done, crypting};
    checks++;
    if (got != table_of(s)) begin failures++; $display("state %s got %b exp %b", s.name(), got, table_of(s)); end
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1;
    @(negedge clk); sig = 0;
  endtask

  // hold a state a few cycles, check it, then complete it
  task automatic stay_then(st_e s, ref logic done_sig);
    repeat (3) begin expect_state(s); @(negedge clk); end
    done_sig = 1;
    @(negedge clk); done_sig = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); expect_state(IDLE);
    // discrete mode
    pulse(get_key);     stay_then(KEYREQ, key_complete);    expect_state(IDLE);
    pulse(get_data);    stay_then(INREQ,  data_complete);   expect_state(IDLE);
    pulse(encrypt);     stay_then(CRYPT,  crypt_complete);  expect_state(IDLE);
    pulse(output_data); stay_then(OUTRDY, output_complete); expect_state(IDLE);
    checks++; if (continuous || crypt_starts != 1) failures++;
    // continuous mode: two loops on completions alone
    pulse(start);
    for (int l = 0; l < 2; l++) begin
      stay_then(KEYREQ, key_complete);
      stay_then(INREQ,  data_complete);
      stay_then(CRYPT,  crypt_complete);
      stay_then(OUTRDY, output_complete);
    end
    expect_state(KEYREQ);
    checks++; if (!continuous || crypt_starts != 3) failures++;
    // reset returns to Idle in discrete mode
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    expect_state(IDLE);
    checks++; if (continuous) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
