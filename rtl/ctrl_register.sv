// ctrl_register -- control register at I/O port 221H (optional
// configuration of the serial port).
//
// Decodes CPU writes to PORT_ADDR and, like the data buffer, captures D7-D0
// on the rising edge of its own active-low strobe, i.e. at the end of the
// write. Reads of 221H still return the status byte; only writes reach this
// register. rst (active high) returns it asynchronously to CFG_DEFAULT, the
// 9600 bps 8N1 format of the basic port, so software that never writes 221H
// sees the basic behaviour.
//
// Interface: addr, iow_n, d_in from the bus, rst; cfg (port_cfg_t, see the
// package for the bit layout) to the transmitter.
// Timing: cfg changes at the end of a write to 221H. The transmitter takes a
// copy at the start of each character, so a write during a character takes
// effect with the next one.
//
// As in the lab exercise: the register's address and the four options it
// selects. Own choices: bit layout, rate codes, even parity, reset value.
module ctrl_register
  import serial_port_pkg::*;
#(
  parameter io_addr_t PORT_ADDR = STATUS_PORT_ADDR
) (
  input  logic      rst,
  input  io_addr_t  addr,
  input  logic      iow_n,
  input  byte_t     d_in,
  output port_cfg_t cfg
);

  logic wr_n;

  assign wr_n = !((addr == PORT_ADDR) && !iow_n);

  always_ff @(posedge wr_n or posedge rst) begin
    if (rst) cfg <= CFG_DEFAULT;
    else     cfg <= port_cfg_t'(d_in);
  end

endmodule
