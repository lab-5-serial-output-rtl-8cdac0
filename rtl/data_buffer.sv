// data_buffer -- 8-bit output data buffer at I/O port 220H with its address
// decoder.
//
// The decoder drives load_n low while the CPU performs an I/O write
// (IOW* low) with PORT_ADDR on A9-A0. The buffer captures D7-D0 on the rising
// edge of load_n, i.e. at the end of the write cycle, when the data bus is
// stable. It is the only register of the port that is not clocked by the
// system clock: its clock is the decoded strobe itself. load_n is also
// brought out so that the full/empty logic can watch for the end of a write.
//
// Interface: addr, iow_n, d_in from the PC-104 bus; load_n (active low) and
// buf_data (the stored character) to the rest of the port.
// Timing: buf_data changes at the rising edge of load_n and holds until the
// next write. The buffer has no reset; it is only read after it is written.
//
// As in the lab exercise: port address, strobe polarity and edge. Own choice: no
// qualification by AEN or other bus signals.
module data_buffer
  import serial_port_pkg::*;
#(
  parameter io_addr_t PORT_ADDR = DATA_PORT_ADDR
) (
  input  io_addr_t addr,
  input  logic     iow_n,
  input  byte_t    d_in,
  output logic     load_n,
  output byte_t    buf_data
);

  // Address decoder: active-low write strobe for this port.
  assign load_n = !((addr == PORT_ADDR) && !iow_n);

  // Buffer register clocked by the end of the write strobe.
  always_ff @(posedge load_n) begin
    buf_data <= d_in;
  end

endmodule
