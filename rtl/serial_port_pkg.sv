// serial_port_pkg -- types and constants shared by the serial output port.
//
// The port sits on the 10-bit PC-104 I/O address space. Two addresses are
// used: 220H, a write-only data port that takes one 8-bit character, and
// 221H, a read-only status port whose bit 7 reports that the data buffer is
// still full. The transmit controller walks through eleven states, one per
// bit period of an 8N1 character plus an idle state. Idle is encoded as all
// zeros so that a cleared state register is a valid idle controller; the
// state code doubles as the 4-bit bit-select of the output multiplexer.
//
// The optional configuration adds a write-only control register at 221H
// that selects bit rate, word length (5..8), an even parity bit and a second
// stop bit. Its layout, the rate codes and the parity sense are this
// design's own; its reset value gives the fixed 9600 bps, 8 data bits, no
// parity, one stop bit format of the basic port. It reuses the state codes
// below and adds two: parity bit and second stop bit.
package serial_port_pkg;

  // PC-104 I/O address A9-A0.
  localparam int unsigned IO_ADDR_W = 10;
  typedef logic [IO_ADDR_W-1:0] io_addr_t;

  localparam io_addr_t DATA_PORT_ADDR   = 10'h220;  // character write
  localparam io_addr_t STATUS_PORT_ADDR = 10'h221;  // status read

  typedef logic [7:0] byte_t;

  // Controller states. The numeric code is also the multiplexer select:
  // 0 idle level, 1 start bit, 2..9 data bits 0..7, 10 stop bit.
  typedef enum logic [3:0] {
    S_IDLE  = 4'd0,
    S_START = 4'd1,
    S_BIT0  = 4'd2,
    S_BIT1  = 4'd3,
    S_BIT2  = 4'd4,
    S_BIT3  = 4'd5,
    S_BIT4  = 4'd6,
    S_BIT5  = 4'd7,
    S_BIT6  = 4'd8,
    S_BIT7  = 4'd9,
    S_STOP  = 4'd10,
    S_PARITY = 4'd11,  // optional configuration only
    S_STOP2  = 4'd12   // optional configuration only
  } tx_state_t;

  // Control register (optional configuration), written at 221H.
  //   [7]   stop2  : 1 = two stop bits
  //   [6]   par_en : 1 = even parity bit after the data bits
  //   [5:4] wlen   : word length minus 5 (0..3 = 5..8 data bits)
  //   [3:0] rate   : bit rate code, see RATE_TABLE; codes 9..15 select 9600
  typedef struct packed {
    logic       stop2;
    logic       par_en;
    logic [1:0] wlen;
    logic [3:0] rate;
  } port_cfg_t;

  localparam int unsigned N_RATES = 9;
  localparam int unsigned RATE_TABLE [N_RATES] =
    '{300, 600, 1200, 2400, 4800, 9600, 19200, 38400, 57600};
  localparam logic [3:0] RATE_9600 = 4'd5;

  // 9600 bps, 8 data bits, no parity, one stop bit.
  localparam port_cfg_t CFG_DEFAULT = '{stop2: 1'b0, par_en: 1'b0, wlen: 2'd3, rate: RATE_9600};

  // Line levels at the serial output pin (before the RS-232 line driver).
  localparam logic LINE_SPACE = 1'b1;  // start bit, logic-0 data bit
  localparam logic LINE_MARK  = 1'b0;  // stop bit, idle, logic-1 data bit

endpackage
