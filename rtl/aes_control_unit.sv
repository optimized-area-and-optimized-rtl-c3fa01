// aes_control_unit: Moore state machine that sequences the crypto processor.
//
// Five states: Idle, Key request, Input request, Encrypt/decrypt, Output ready.
// Discrete mode: from Idle each operator command (get_key, get_data, encrypt,
// output_data) runs one step, and the machine returns to Idle when the unit
// doing it reports completion. Continuous mode: a start in Idle sets the mode
// and the machine then runs Key request -> Input request -> Encrypt/decrypt ->
// Output ready -> Key request ... on completions alone, until reset.
// In Idle the commands are taken in the order start, get_key, get_data,
// encrypt, output_data if several are high. The outputs are functions of the
// state only, as in the table below (1 = high):
//                      Idle KeyReq InReq Crypt OutRdy
//   req_key              0     1     0     0     0     (start of key unit)
//   req_input            0     0     1     0     0     (start of input unit)
//   out_ready            0     0     0     0     1     (start of output unit)
//   input_key_done       0     0     1     1     1
//   input_data_done      0     0     0     1     1
//   encryption_done      0     0     0     0     1
//   output_data_done     0     0     0     0     1
// crypt_start is high in the first cycle of Encrypt/decrypt only (a registered
// flag, still a function of state), so the AES core starts exactly once;
// crypting is high through the whole Encrypt/decrypt state.
module aes_control_unit
  import aes_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // operator
  input  logic start,
  input  logic get_key,
  input  logic get_data,
  input  logic encrypt,
  input  logic output_data,
  // completions from the units
  input  logic key_complete,
  input  logic data_complete,
  input  logic crypt_complete,
  input  logic output_complete,
  // unit controls
  output logic req_key,
  output logic req_input,
  output logic out_ready,
  output logic crypt_start,
  output logic crypting,
  // status
  output logic input_key_done,
  output logic input_data_done,
  output logic encryption_done,
  output logic output_data_done,
  output logic continuous
);

  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,
    S_KEY_REQ = 3'd1,
    S_IN_REQ  = 3'd2,
    S_CRYPT   = 3'd3,
    S_OUT_RDY = 3'd4
  } state_e;

  state_e state_q, state_d;
  logic   cont_q, cont_d;
  logic   first_q;

  always_comb begin
    state_d = state_q;
    cont_d  = cont_q;
    case (state_q)
      S_IDLE: begin
        if (start) begin
          state_d = S_KEY_REQ;
          cont_d  = 1'b1;
        end
        else if (get_key)     state_d = S_KEY_REQ;
        else if (get_data)    state_d = S_IN_REQ;
        else if (encrypt)     state_d = S_CRYPT;
        else if (output_data) state_d = S_OUT_RDY;
      end
      S_KEY_REQ: if (key_complete)    state_d = cont_q ? S_IN_REQ  : S_IDLE;
      S_IN_REQ:  if (data_complete)   state_d = cont_q ? S_CRYPT   : S_IDLE;
      S_CRYPT:   if (crypt_complete)  state_d = cont_q ? S_OUT_RDY : S_IDLE;
      S_OUT_RDY: if (output_complete) state_d = cont_q ? S_KEY_REQ : S_IDLE;
      default:   state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cont_q  <= 1'b0;
      first_q <= 1'b0;
    end else begin
      state_q <= state_d;
      cont_q  <= cont_d;
      first_q <= (state_d == S_CRYPT) && (state_q != S_CRYPT);
    end
  end

  assign req_key          = (state_q == S_KEY_REQ);
  assign req_input        = (state_q == S_IN_REQ);
  assign out_ready        = (state_q == S_OUT_RDY);
  assign crypt_start      = first_q;
  assign crypting         = (state_q == S_CRYPT);
  assign input_key_done   = (state_q == S_IN_REQ) || (state_q == S_CRYPT) || (state_q == S_OUT_RDY);
  assign input_data_done  = (state_q == S_CRYPT)  || (state_q == S_OUT_RDY);
  assign encryption_done  = (state_q == S_OUT_RDY);
  assign output_data_done = (state_q == S_OUT_RDY);
  assign continuous       = cont_q;

  // a unit is only started from its own state
  a_crypt_start_in_state: assert property (@(posedge clk) disable iff (!rst_n)
    crypt_start |-> state_q == S_CRYPT);

endmodule
