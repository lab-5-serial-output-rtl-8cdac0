// serial_output_port -- PC-104 serial output port, top level.
//
// A CPU sends a character by polling the status port at 221H until bit 7
// (full) reads 0, then writing the character to the data port at 220H. The
// character goes into the data buffer at the end of the write. The full flag
// is set on the next system clock; when the transmit controller is idle it
// raises start for one clock, which copies the buffer into the transmit data
// register, clears full and restarts the bit clock. The controller then steps
// through start bit, data bits 0..7 and stop bit, one step per nextbit pulse
// from the bit clock generator, and the serial multiplexer puts the matching
// level on serial_out: 1 for the start bit, the inverted data bit, 0 for the
// stop bit and while idle. Because full clears as soon as a character moves
// to the transmit register, the CPU can write the next character while the
// current one is still on the line (double buffering).
//
// Interface: clk is the 25.175 MHz system clock, rst a synchronous active-high
// reset. addr, iow_n, ior_n and d_in come from the PC-104 bus. The
// bidirectional data bus is split: d_out and d_oe feed a three-state pad
// (D7-D0 = d_oe ? d_out : 'z), and d_in is the pad's input.
// Timing: one character takes 10 * (CLK_HZ / BIT_RATE) clocks on the line;
// with the defaults that is 10 * 2622 clocks, about 1.04 ms.
//
// With OPTIONS = 1 the controller, bit clock and multiplexer are replaced by
// versions driven by a control register written at 221H (reads of 221H still
// return status): bit rate 300..57600 bps, 5..8 data bits, optional even
// parity, optional second stop bit. Its reset value is the basic format.
//
// The structure, addresses, polarity and rates follow the lab exercise, which
// also lists the options. The split data bus, the reset input and the whole
// layout of the control register are choices of this design.
module serial_output_port
  import serial_port_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 25_175_000,
  parameter int unsigned BIT_RATE = 9_600,
  // 0: the basic port (fixed format, the default). 1: the optional control
  // register at 221H selecting bit rate, word length, parity and stop bits;
  // BIT_RATE is then unused.
  parameter bit          OPTIONS  = 1'b0
) (
  input  logic     clk,
  input  logic     rst,
  input  io_addr_t addr,
  input  logic     iow_n,
  input  logic     ior_n,
  input  byte_t    d_in,
  output byte_t    d_out,
  output logic     d_oe,
  output logic     serial_out
);

  logic       load_n;
  byte_t      buf_data;
  byte_t      tx_data;
  logic       full;
  logic       start;
  logic       nextbit;
  logic [3:0] bitselect;

  data_buffer u_buffer (
    .addr     (addr),
    .iow_n    (iow_n),
    .d_in     (d_in),
    .load_n   (load_n),
    .buf_data (buf_data)
  );

  status_port u_status (
    .addr    (addr),
    .ior_n   (ior_n),
    .full    (full),
    .rd_data (d_out),
    .rd_oe   (d_oe)
  );

  full_flag u_full (
    .clk    (clk),
    .rst    (rst),
    .load_n (load_n),
    .start  (start),
    .full   (full)
  );

  tx_data_register u_txreg (
    .clk      (clk),
    .start    (start),
    .buf_data (buf_data),
    .tx_data  (tx_data)
  );

  if (!OPTIONS) begin : g_basic
    // Fixed format: 9600 bps (BIT_RATE), 8 data bits, no parity, 1 stop bit.

    tx_controller u_ctrl (
      .clk       (clk),
      .rst       (rst),
      .full      (full),
      .nextbit   (nextbit),
      .start     (start),
      .bitselect (bitselect)
    );

    bit_clock_gen #(
      .CLK_HZ   (CLK_HZ),
      .BIT_RATE (BIT_RATE)
    ) u_bitclk (
      .clk     (clk),
      .rst     (rst),
      .start   (start),
      .nextbit (nextbit)
    );

    serial_mux u_mux (
      .bitselect  (bitselect),
      .tx_data    (tx_data),
      .serial_out (serial_out)
    );

  end else begin : g_opt
    // Format and rate chosen by the control register written at 221H.
    port_cfg_t cfg, cfg_q;

    ctrl_register u_cfg (
      .rst   (rst),
      .addr  (addr),
      .iow_n (iow_n),
      .d_in  (d_in),
      .cfg   (cfg)
    );

    tx_controller_opt u_ctrl (
      .clk       (clk),
      .rst       (rst),
      .full      (full),
      .nextbit   (nextbit),
      .cfg       (cfg),
      .start     (start),
      .bitselect (bitselect),
      .cfg_q     (cfg_q)
    );

    bit_clock_gen_opt #(
      .CLK_HZ (CLK_HZ)
    ) u_bitclk (
      .clk     (clk),
      .rst     (rst),
      .start   (start),
      .rate    (cfg_q.rate),
      .nextbit (nextbit)
    );

    serial_mux_opt u_mux (
      .bitselect  (bitselect),
      .tx_data    (tx_data),
      .wlen       (cfg_q.wlen),
      .serial_out (serial_out)
    );

  end

endmodule
