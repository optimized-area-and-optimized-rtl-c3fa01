// aes_serial_out: parallel-to-serial output interface unit of the crypto
// processor.
//
// A 128-bit shift register with a handshake towards the external peripheral
// and a start / complete pair towards the control unit.
//   1. start rises (control unit in its output state): the result word on
//      data_in is loaded and out_ready goes high.
//   2. The peripheral answers with request; out_ready drops.
//   3. In each of the next 128 clocks one bit is driven on serial_out, most
//      significant bit (bit 127) first.
//   4. complete goes high and stays high until start falls.
// serial_out is 0 outside step 3.
module aes_serial_out
  import aes_pkg::*;
#(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             complete,
  output logic             out_ready,
  input  logic             request,
  input  logic [WIDTH-1:0] data_in,
  output logic             serial_out
);

  typedef enum logic [1:0] {S_IDLE, S_READY, S_SHIFT, S_DONE} state_e;

  state_e                   state_q;
  logic [$clog2(WIDTH)-1:0] cnt_q;
  logic [WIDTH-1:0]         shreg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
      shreg_q <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (start) begin
          shreg_q <= data_in;
          state_q <= S_READY;
        end
        S_READY: begin
          if (!start)       state_q <= S_IDLE;
          else if (request) state_q <= S_SHIFT;
          cnt_q <= '0;
        end
        S_SHIFT: begin
          shreg_q <= {shreg_q[WIDTH-2:0], 1'b0};
          cnt_q   <= cnt_q + 1'b1;
          if (cnt_q == ($clog2(WIDTH))'(WIDTH-1)) state_q <= S_DONE;
        end
        S_DONE: if (!start) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign out_ready  = (state_q == S_READY);
  assign complete   = (state_q == S_DONE);
  assign serial_out = (state_q == S_SHIFT) && shreg_q[WIDTH-1];

endmodule
