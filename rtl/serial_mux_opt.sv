// serial_mux_opt -- serial data multiplexer for the optional configuration.
//
// Extends the basic 10-to-1 multiplexer by two inputs: the parity bit
// (select code 11) and the second stop bit (code 12). Levels follow the same
// line sense as the basic port: start bit 1, data and parity bits inverted
// (logic 0 sent as 1), stop bits and idle 0. Data bits go least significant
// first. The parity bit is even parity over the first 5 + wlen data bits,
// i.e. it makes the number of ones in data plus parity even.
//
// Interface: bitselect (4 bits), tx_data (8 bits), wlen (word length minus 5)
// in; serial_out out. Combinational.
//
// As in the lab exercise: levels, inversion and bit order of the basic port, and
// the existence of an optional parity bit. Own choice: even parity.
module serial_mux_opt
  import serial_port_pkg::*;
(
  input  logic [3:0] bitselect,
  input  byte_t      tx_data,
  input  logic [1:0] wlen,
  output logic       serial_out
);

  logic [2:0] bit_idx;
  byte_t      word_mask;
  logic       parity;

  assign bit_idx   = 3'(bitselect - 4'd2);
  assign word_mask = byte_t'(8'hFF >> (2'd3 - wlen));
  assign parity    = ^(tx_data & word_mask);

  always_comb begin
    unique case (bitselect)
      S_START:                       serial_out = LINE_SPACE;
      S_BIT0, S_BIT1, S_BIT2, S_BIT3,
      S_BIT4, S_BIT5, S_BIT6, S_BIT7: serial_out = !tx_data[bit_idx];
      S_PARITY:                      serial_out = !parity;
      default:                       serial_out = LINE_MARK;
    endcase
  end

endmodule
