// serial_mux -- 10-to-1 serial data multiplexer.
//
// bitselect is the controller's state code. Code 1 (start bit) gives a space
// (1). Codes 2..9 give data bits 0..7 of the transmit register, least
// significant bit first, each inverted, because on this line a logic-0 data
// bit is sent as a space (1) and a logic-1 bit as a mark (0). Code 10 (stop
// bit), code 0 (idle) and the unused codes give a mark (0).
//
// Interface: bitselect (4 bits), tx_data (8 bits) in; serial_out out.
// Timing: combinational.
//
// As in the lab exercise: the three kinds of input, their levels and the data
// polarity; the bit order follows the state diagram (bit 0 sent first).
module serial_mux
  import serial_port_pkg::*;
(
  input  logic [3:0] bitselect,
  input  byte_t      tx_data,
  output logic       serial_out
);

  // Data bit number for codes 2..9.
  logic [2:0] bit_idx;
  assign bit_idx = 3'(bitselect - 4'd2);

  always_comb begin
    unique case (bitselect)
      S_START:                       serial_out = LINE_SPACE;
      S_BIT0, S_BIT1, S_BIT2, S_BIT3,
      S_BIT4, S_BIT5, S_BIT6, S_BIT7: serial_out = !tx_data[bit_idx];
      default:                       serial_out = LINE_MARK;
    endcase
  end

endmodule
