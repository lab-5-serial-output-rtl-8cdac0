// tx_controller_opt -- transmit controller for the optional configuration
// (selectable word length, parity bit, second stop bit).
//
// Same state codes and the same start rule as the basic eleven-state
// controller: idle (0) goes to the start bit (1) when start = full AND idle;
// every other state advances on nextbit. The differences: after the last data
// bit of the selected word length the machine goes to the parity state (11)
// if parity is enabled, else to the stop bit (10); after the stop bit it goes
// to the second stop bit (12) if enabled, else to idle. With the default
// configuration the sequence is exactly that of the basic controller.
//
// The configuration is copied into cfg_q at start, together with the
// character, so that a control-register write during a character cannot
// change that character's format or bit rate. cfg_q drives the multiplexer
// and the bit clock generator.
//
// Interface: clk, rst (synchronous, active high), full, nextbit, cfg in;
// start, bitselect (state code), cfg_q out.
//
// As in the lab exercise: the basic state machine and the list of options. Own
// choices: the two extra states, the copy of the configuration at start.
module tx_controller_opt
  import serial_port_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       full,
  input  logic       nextbit,
  input  port_cfg_t  cfg,
  output logic       start,
  output logic [3:0] bitselect,
  output port_cfg_t  cfg_q
);

  tx_state_t state, state_next;
  tx_state_t last_data;

  assign start     = full && (state == S_IDLE);
  assign bitselect = state;
  // Data bit (wlen + 4) is the last one: S_BIT4 + wlen.
  assign last_data = tx_state_t'(S_BIT4 + {2'b00, cfg_q.wlen});

  always_comb begin
    state_next = state;
    if (state == S_IDLE) begin
      if (start) state_next = S_START;
    end else if (nextbit) begin
      if (state == last_data)     state_next = cfg_q.par_en ? S_PARITY : S_STOP;
      else if (state == S_PARITY) state_next = S_STOP;
      else if (state == S_STOP)   state_next = cfg_q.stop2 ? S_STOP2 : S_IDLE;
      else if (state == S_STOP2)  state_next = S_IDLE;
      else                        state_next = tx_state_t'(state + 4'd1);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      cfg_q <= CFG_DEFAULT;
    end else begin
      state <= state_next;
      if (start) cfg_q <= cfg;
    end
  end

  assert property (@(posedge clk) disable iff (rst) state <= S_STOP2)
    else $error("tx_controller_opt: illegal state %0d", state);

endmodule
