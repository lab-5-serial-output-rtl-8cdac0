// status_port -- 1-bit status input port at I/O port 221H.
//
// While the CPU reads PORT_ADDR (IOR* low with PORT_ADDR on A9-A0) the port
// enables its data bus driver and presents the buffer-full flag on D7 with
// D6-D0 zero. At all other times the driver enable is low, so the bus is left
// to other devices.
//
// Interface: addr, ior_n from the bus and full from the full/empty logic;
// rd_data is the byte to drive and rd_oe the enable of the three-state bus
// driver, which is realised in the FPGA I/O cell (d = rd_oe ? rd_data : 'z).
// Timing: purely combinational; rd_data follows full during the read.
//
// As in the lab exercise: address, bit position and zero fill. Own choice: the
// three-state driver is left to the pad, and rd_data is zero whenever rd_oe
// is low.
module status_port
  import serial_port_pkg::*;
#(
  parameter io_addr_t PORT_ADDR = STATUS_PORT_ADDR
) (
  input  io_addr_t addr,
  input  logic     ior_n,
  input  logic     full,
  output byte_t    rd_data,
  output logic     rd_oe
);

  always_comb begin
    rd_oe   = (addr == PORT_ADDR) && !ior_n;
    rd_data = rd_oe ? {full, 7'b0} : '0;
  end

endmodule
