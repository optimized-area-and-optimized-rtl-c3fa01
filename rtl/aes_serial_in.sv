// aes_serial_in: serial-to-parallel interface unit of the crypto processor,
// used twice: for the 128-bit data block and for the 128-bit key.
//
// It is a 128-bit shift register with a handshake towards the external
// peripheral and a start / complete pair towards the control unit.
//   1. start rises (control unit in its request state): request goes high.
//   2. The peripheral answers with ready; request drops.
//   3. In each of the next 128 clocks one bit is taken from serial_in, most
//      significant bit (bit 127) first, and shifted in from the right.
//   4. complete goes high and stays high until start falls; the unit is then
//      idle again. data_out keeps the word until the next transfer starts.
// start falling during the handshake (step 2) abandons the transfer.
module aes_serial_in
  import aes_pkg::*;
#(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             complete,
  output logic             request,
  input  logic             ready,
  input  logic             serial_in,
  output logic [WIDTH-1:0] data_out
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_SHIFT, S_DONE} state_e;

  state_e                     state_q;
  logic [$clog2(WIDTH)-1:0]   cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      cnt_q    <= '0;
      data_out <= '0;
    end else begin
      case (state_q)
        S_IDLE:  if (start) state_q <= S_REQ;
        S_REQ: begin
          if (!start)     state_q <= S_IDLE;
          else if (ready) state_q <= S_SHIFT;
          cnt_q <= '0;
        end
        S_SHIFT: begin
          data_out <= {data_out[WIDTH-2:0], serial_in};
          cnt_q    <= cnt_q + 1'b1;
          if (cnt_q == ($clog2(WIDTH))'(WIDTH-1)) state_q <= S_DONE;
        end
        S_DONE:  if (!start) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign request  = (state_q == S_REQ);
  assign complete = (state_q == S_DONE);

endmodule
