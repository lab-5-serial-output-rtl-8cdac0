// tx_controller -- eleven-state transmit controller.
//
// States: idle, start bit, bit 0 .. bit 7, stop bit. From idle the machine
// moves to the start-bit state when start is 1 and stays in idle otherwise.
// Every other state moves to the next one when nextbit is 1 and holds when it
// is 0; the stop-bit state returns to idle. There are no other transitions.
//
// start is asserted, combinationally, when the buffer is full and the
// controller is idle, i.e. the previous character has been sent completely.
// The same start pulse loads the transmit data register, clears the full
// flag and restarts the bit clock, so the start bit lasts one whole bit
// period. The state code (idle = 0, so a cleared register is idle) is the
// 4-bit bit select of the serial multiplexer.
//
// Interface: clk, rst (synchronous, active high), full, nextbit in;
// start, bitselect out.
// Timing: one character occupies 10 bit periods plus at least one idle clock
// before the next start.
//
// As in the lab exercise: states, transitions, start condition, all-zero idle.
// Own choice: the numeric codes of the non-idle states (consecutive) and the
// explicit synchronous reset.
module tx_controller
  import serial_port_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       full,
  input  logic       nextbit,
  output logic       start,
  output logic [3:0] bitselect
);

  tx_state_t state, state_next;

  assign start     = full && (state == S_IDLE);
  assign bitselect = state;

  always_comb begin
    state_next = state;
    if (state == S_IDLE) begin
      if (start) state_next = S_START;
    end else if (nextbit) begin
      if (state == S_STOP) state_next = S_IDLE;
      else                 state_next = tx_state_t'(state + 4'd1);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else     state <= state_next;
  end

  // The state register never leaves the eleven legal codes.
  assert property (@(posedge clk) disable iff (rst) state <= S_STOP)
    else $error("tx_controller: illegal state %0d", state);

endmodule
