// tb_serial_output_port -- end-to-end test of the serial output port at its
// default parameters (25.175 MHz clock, 9600 bps, 2622 clocks per bit).
//
// A bus-master model plays the CPU program the port is made for: point at
// the first character of a zero-terminated string; stop at the zero; poll
// the status port at 221H until bit 7 (full) reads 0; write the character to
// 220H; advance and repeat. Bus cycles are driven on the falling clock edge
// with IOW*/IOR* held low for several clocks. A reference receiver decodes
// the serial line (start 1, data LSB first and inverted, stop 0) and checks
// every bit period is exactly 2622 clocks. The test checks the received text,
// the status byte and driver enable on every read, that the driver is off
// when not read, that writes and reads at other addresses are ignored, and
// that buffered characters leave back to back (10 bit periods plus one idle
// clock from one start bit to the next). It counts how often each mechanism
// happened (full seen, empty seen, start transfer, each controller state,
// bit-clock restart, back-to-back frame, ignored access) and fails any
// that never did.
module tb_serial_output_port;
  import serial_port_pkg::*;

  localparam int DIV = 25_175_000 / 9_600;
  localparam string MESSAGE = "Serial port 5, student 0123456\r\n";

  logic     clk = 1'b0;
  logic     rst;
  io_addr_t addr;
  logic     iow_n, ior_n;
  byte_t    d_in, d_out;
  logic     d_oe, serial_out;

  serial_output_port dut (.clk, .rst, .addr, .iow_n, .ior_n, .d_in, .d_out, .d_oe, .serial_out);

  logic       rx_valid;
  logic [7:0] rx_data;
  int         rx_errors, rx_frames;
  tb_uart_rx #(.DIV(DIV)) rx (.clk, .rst, .line(serial_out), .valid(rx_valid), .data(rx_data),
                              .errors(rx_errors), .frames(rx_frames));

  always #20 clk = ~clk;

  int checks = 0, failures = 0;
  int n_full_seen = 0, n_empty_seen = 0, n_ignored = 0, n_back_to_back = 0;
  int n_start = 0, n_restart = 0;
  int state_visits[11];
  string received = "";
  bit in_read = 1'b0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  task automatic io_write(input io_addr_t a, input byte_t d);
    @(negedge clk) addr = a; d_in = d;
    @(negedge clk) iow_n = 1'b0;
    repeat (4) @(negedge clk);
    iow_n = 1'b1;
    @(negedge clk) d_in = 8'hA5;
  endtask

  task automatic io_read(input io_addr_t a, output byte_t d, output logic oe);
    @(negedge clk) addr = a;
    @(negedge clk) ior_n = 1'b0; in_read = 1'b1;
    repeat (3) @(negedge clk);
    d = d_out; oe = d_oe;
    ior_n = 1'b1;
    @(negedge clk) in_read = 1'b0;
  endtask

  // Driver must be off whenever nobody reads 221H.
  always @(negedge clk) begin
    if (!in_read) check(d_oe === 1'b0, "bus driver off outside status reads");
  end

  // Receiver output and frame spacing.
  int last_frame_start = -1, cycle = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rx_valid) received = {received, string'(rx_data)};
  end
  always @(posedge clk) begin
    if (!rst && dut.start) begin
      n_start++;
      if (last_frame_start >= 0 && cycle - last_frame_start == 10 * DIV + 1) n_back_to_back++;
      last_frame_start = cycle;
      if (dut.g_basic.u_bitclk.count != 0) n_restart++;
    end
    if (!rst) state_visits[dut.bitselect]++;
  end

  initial begin
    byte_t d;
    logic  oe;
    int    ptr;
    foreach (state_visits[i]) state_visits[i] = 0;
    rst = 1'b1; addr = '0; iow_n = 1'b1; ior_n = 1'b1; d_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Accesses to other addresses change nothing.
    io_write(10'h221, 8'h41);
    io_write(10'h222, 8'h42);
    io_read(10'h220, d, oe);
    check(oe === 1'b0, "read of 220H does not drive the bus");
    io_read(10'h021, d, oe);
    check(oe === 1'b0, "read of 021H does not drive the bus");
    repeat (20) @(negedge clk);
    check(serial_out === 1'b0 && dut.u_full.full === 1'b0, "ignored accesses leave the port idle");
    n_ignored += 4;

    // The CPU program.
    ptr = 0;
    while (ptr < MESSAGE.len()) begin
      byte_t c;
      c = MESSAGE[ptr];
      if (c == 0) break;
      do begin
        io_read(STATUS_PORT_ADDR, d, oe);
        check(oe === 1'b1, "status read drives the bus");
        check(d[6:0] === 7'b0, "status bits 6..0 are zero");
        if (d[7]) n_full_seen++;
        else      n_empty_seen++;
        if (d[7]) repeat ($urandom % 200) @(negedge clk);
      end while (d[7]);
      io_write(DATA_PORT_ADDR, c);
      ptr++;
    end

    // Wait for the line to go quiet.
    wait (rx_frames == MESSAGE.len());
    repeat (2 * DIV) @(negedge clk);

    check(received == MESSAGE, $sformatf("received \"%s\"", received));
    check(rx_frames == MESSAGE.len(), "one frame per character");
    check(rx_errors == 0, "line format and bit timing");
    check(n_start == MESSAGE.len(), "one start per character");
    check(dut.u_full.full === 1'b0, "buffer empty at the end");
    check(serial_out === 1'b0, "line idle (mark) at the end");
    check(n_full_seen > 0, "mechanism: CPU saw the buffer full");
    check(n_empty_seen > 0, "mechanism: CPU saw the buffer empty");
    check(n_back_to_back > 0, "mechanism: back-to-back characters from the buffer");
    check(n_restart > 0, "mechanism: start restarted a running bit clock");
    check(n_ignored > 0, "mechanism: accesses to other addresses ignored");
    foreach (state_visits[i]) check(state_visits[i] > 0, $sformatf("mechanism: state %0d visited", i));
    $display("mechanisms: full seen %0d, empty seen %0d, starts %0d, back-to-back %0d, restarts %0d, ignored %0d",
             n_full_seen, n_empty_seen, n_start, n_back_to_back, n_restart, n_ignored);
    $display("received: %s", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MESSAGE.len() * 12 * DIV + 100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
