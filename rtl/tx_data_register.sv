// tx_data_register -- 8-bit transmit data register.
//
// On a system clock edge with start asserted the register copies the data
// buffer; otherwise it keeps its value through a feedback multiplexer, so the
// character stays stable while the serial multiplexer shifts it out bit by
// bit. The buffer is written in the bus clock domain, but it is only copied
// once the full flag, which is set at least one clock after the write ended,
// has caused start, so the copied value is settled.
//
// Interface: clk, start, buf_data in; tx_data out. No reset: the register is
// only looked at after a start has loaded it.
//
// As in the lab exercise: load condition and width. Nothing here is an own choice
// beyond the absence of a reset.
module tx_data_register
  import serial_port_pkg::*;
(
  input  logic  clk,
  input  logic  start,
  input  byte_t buf_data,
  output byte_t tx_data
);

  always_ff @(posedge clk) begin
    tx_data <= start ? buf_data : tx_data;
  end

endmodule
