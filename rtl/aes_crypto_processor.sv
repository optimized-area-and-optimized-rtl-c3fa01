// aes_crypto_processor: AES-128 crypto processor with serial interfaces.
//
// It connects one AES core to an external peripheral through three serial
// units, under the control of an operator:
//   key unit     (aes_serial_in)   serial key in,   request_key / key_ready
//   input unit   (aes_serial_in)   serial data in,  request_din / din_ready
//   output unit  (aes_serial_out)  serial data out, dout_ready / request_dout
//   control unit (aes_control_unit) Moore FSM, discrete or continuous mode
//   AES core     selected by CORE: small-area encryptor or decryptor, or
//                pipelined encryptor or decryptor.
// Each serial transfer is 128 bits, one per clock, MSB first, after a
// request/ready handshake (see the unit files). In discrete mode the operator
// pulses get_key, get_data, encrypt and output_data one at a time; in
// continuous mode one start pulse makes the processor loop key -> data ->
// encrypt/decrypt -> output until reset. The core's parallel key and data come
// straight from the two input shift registers, and the output unit loads the
// core's result when its transfer begins.
// The area cores and the pipelined encryptor get a one-cycle start; the
// pipelined decryptor gets start for the whole Encrypt/decrypt state, because
// it takes a block only once its key schedule is complete.
module aes_crypto_processor
  import aes_pkg::*;
#(
  parameter core_e CORE = CORE_AREA_ENC
) (
  input  logic clk,
  input  logic rst_n,
  // operator
  input  logic start,
  input  logic get_key,
  input  logic get_data,
  input  logic encrypt,
  input  logic output_data,
  output logic input_key_done,
  output logic input_data_done,
  output logic encryption_done,
  output logic output_data_done,
  // key unit
  input  logic serial_key,
  input  logic key_ready,
  output logic request_key,
  // input unit
  input  logic serial_din,
  input  logic din_ready,
  output logic request_din,
  // output unit
  output logic serial_dout,
  output logic dout_ready,
  input  logic request_dout
);

  logic   req_key, req_input, out_start, crypt_start, crypting;
  logic   key_complete, data_complete, crypt_complete, output_complete;
  logic   core_start;
  block_t key_word, data_word, result_word;

  aes_control_unit u_ctrl (
    .clk, .rst_n,
    .start, .get_key, .get_data, .encrypt, .output_data,
    .key_complete, .data_complete, .crypt_complete, .output_complete,
    .req_key, .req_input,
    .out_ready  (out_start),
    .crypt_start, .crypting,
    .input_key_done, .input_data_done, .encryption_done, .output_data_done,
    .continuous()
  );

  aes_serial_in u_key_if (
    .clk, .rst_n,
    .start    (req_key),
    .complete (key_complete),
    .request  (request_key),
    .ready    (key_ready),
    .serial_in(serial_key),
    .data_out (key_word)
  );

  aes_serial_in u_input_if (
    .clk, .rst_n,
    .start    (req_input),
    .complete (data_complete),
    .request  (request_din),
    .ready    (din_ready),
    .serial_in(serial_din),
    .data_out (data_word)
  );

  aes_serial_out u_output_if (
    .clk, .rst_n,
    .start     (out_start),
    .complete  (output_complete),
    .out_ready (dout_ready),
    .request   (request_dout),
    .data_in   (result_word),
    .serial_out(serial_dout)
  );

  assign core_start = (CORE == CORE_SPEED_DEC) ? (crypting && !crypt_complete) : crypt_start;

  if (CORE == CORE_AREA_ENC) begin : g_core
    aes_area_encryptor u_core (
      .clk, .rst_n, .start(core_start), .data_in(data_word), .key_in(key_word),
      .data_out(result_word), .done(crypt_complete)
    );
  end else if (CORE == CORE_AREA_DEC) begin : g_core
    aes_area_decryptor u_core (
      .clk, .rst_n, .start(core_start), .data_in(data_word), .key_in(key_word),
      .data_out(result_word), .done(crypt_complete)
    );
  end else if (CORE == CORE_SPEED_ENC) begin : g_core
    aes_speed_encryptor u_core (
      .clk, .rst_n, .start(core_start), .data_in(data_word), .key_in(key_word),
      .data_out(result_word), .complete(crypt_complete)
    );
  end else begin : g_core
    aes_speed_decryptor u_core (
      .clk, .rst_n, .start(core_start), .data_in(data_word), .key_in(key_word),
      .data_out(result_word), .complete(crypt_complete)
    );
  end

endmodule
