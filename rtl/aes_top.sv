// aes_top: the four AES-128 cores, each inside its own serial crypto
// processor, side by side.
//
// The processor is meant to carry any one of the four cores; this top builds
// all four combinations so that each can be used and tested through the same
// serial interface:
//   index 0: small-area encryptor    index 1: small-area decryptor
//   index 2: pipelined encryptor     index 3: pipelined decryptor
// Bit i of every port vector belongs to processor i; the ports and their
// timing are those of aes_crypto_processor. Clock and reset are shared.
module aes_top
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] start,
  input  logic [3:0] get_key,
  input  logic [3:0] get_data,
  input  logic [3:0] encrypt,
  input  logic [3:0] output_data,
  output logic [3:0] input_key_done,
  output logic [3:0] input_data_done,
  output logic [3:0] encryption_done,
  output logic [3:0] output_data_done,
  input  logic [3:0] serial_key,
  input  logic [3:0] key_ready,
  output logic [3:0] request_key,
  input  logic [3:0] serial_din,
  input  logic [3:0] din_ready,
  output logic [3:0] request_din,
  output logic [3:0] serial_dout,
  output logic [3:0] dout_ready,
  input  logic [3:0] request_dout
);

  localparam core_e CORES [4] = '{CORE_AREA_ENC, CORE_AREA_DEC, CORE_SPEED_ENC, CORE_SPEED_DEC};

  for (genvar i = 0; i < 4; i++) begin : g_proc
    aes_crypto_processor #(.CORE(CORES[i])) u_proc (
      .clk, .rst_n,
      .start           (start[i]),
      .get_key         (get_key[i]),
      .get_data        (get_data[i]),
      .encrypt         (encrypt[i]),
      .output_data     (output_data[i]),
      .input_key_done  (input_key_done[i]),
      .input_data_done (input_data_done[i]),
      .encryption_done (encryption_done[i]),
      .output_data_done(output_data_done[i]),
      .serial_key      (serial_key[i]),
      .key_ready       (key_ready[i]),
      .request_key     (request_key[i]),
      .serial_din      (serial_din[i]),
      .din_ready       (din_ready[i]),
      .request_din     (request_din[i]),
      .serial_dout     (serial_dout[i]),
      .dout_ready      (dout_ready[i]),
      .request_dout    (request_dout[i])
    );
  end

endmodule
