// tb_serial_port_19200 -- the port with a 19200 Hz clock, two clocks per bit.
//
// Slowing the clock to twice the bit rate makes a whole character fit in a
// short waveform. The bus sequence is: status read (expect not full), write
// the first character, status read (expect not full: the character has
// already moved to the transmit register), write the second character,
// status read (expect full: the first is still on the line). The test then
// runs until both characters have been sent and checks, clock by clock, the
// line level of the first one (start bit two clocks after the end of the
// write, then LSB first, inverted, then the stop bit), that the second
// follows straight after it, and the bit timing with the reference receiver.
module tb_serial_port_19200;
  import serial_port_pkg::*;

  localparam int DIV = 2;

  logic     clk = 1'b0;
  logic     rst;
  io_addr_t addr;
  logic     iow_n, ior_n;
  byte_t    d_in, d_out;
  logic     d_oe, serial_out;

  serial_output_port #(.CLK_HZ(19_200), .BIT_RATE(9_600)) dut (
    .clk, .rst, .addr, .iow_n, .ior_n, .d_in, .d_out, .d_oe, .serial_out);

  logic       rx_valid;
  logic [7:0] rx_data;
  int         rx_errors, rx_frames;
  tb_uart_rx #(.DIV(DIV)) rx (.clk, .rst, .line(serial_out), .valid(rx_valid), .data(rx_data),
                              .errors(rx_errors), .frames(rx_frames));

  // 19200 Hz: period 52.083 us; the exact period does not matter here.
  always #26042 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  logic line_log[64];
  byte_t rx_log[$];

  always @(posedge clk) begin
    if (cycle < 64) line_log[cycle] <= serial_out;
    cycle <= cycle + 1;
    if (rx_valid) rx_log.push_back(rx_data);
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  // Bus cycles: one clock of strobe, changes on the falling edge.
  task automatic io_write(input io_addr_t a, input byte_t d);
    @(negedge clk) addr = a; d_in = d; iow_n = 1'b0;
    @(negedge clk) iow_n = 1'b1;
  endtask

  task automatic io_read(output byte_t d);
    @(negedge clk) addr = STATUS_PORT_ADDR; ior_n = 1'b0;
    #1000 d = d_out;
    check(d_oe === 1'b1, "status read drives the bus");
    @(negedge clk) ior_n = 1'b1;
  endtask

  localparam byte_t FIRST  = 8'h4B;  // 'K': 0100_1011
  localparam byte_t SECOND = 8'h35;  // '5'

  initial begin
    byte_t st;
    int    write_end;
    rst = 1'b1; addr = '0; iow_n = 1'b1; ior_n = 1'b1; d_in = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;

    io_read(st);
    check(st === 8'h00, "first status read: not full");
    io_write(DATA_PORT_ADDR, FIRST);
    write_end = cycle;               // load_n rose just before this posedge
    repeat (2) @(negedge clk);       // let the character move to the transmit register
    io_read(st);
    check(st === 8'h00, "second status read: not full");
    io_write(DATA_PORT_ADDR, SECOND);
    io_read(st);
    check(st === 8'h80, "third status read: full");

    wait (rx_frames == 2);
    repeat (4) @(negedge clk);

    // Expected line: 0 before the start bit, start bit beginning two clocks
    // after the write, 8 inverted data bits LSB first, stop bit, one idle
    // clock, then the second character's start bit.
    for (int c = write_end; c < write_end + 2 + 10 * DIV + 2; c++) begin
      int k;
      logic exp;
      k = c - (write_end + 2);
      if (k < 0)                exp = 1'b0;
      else if (k < DIV)         exp = 1'b1;
      else if (k < 9 * DIV)     exp = ~FIRST[(k - DIV) / DIV];
      else if (k < 10 * DIV + 1) exp = 1'b0;
      else                      exp = 1'b1;
      check(line_log[c] === exp, $sformatf("line at cycle %0d is %b, expected %b", c, line_log[c], exp));
    end
    check(cycle - write_end >= 22, "ran at least 22 clocks after the first write");
    check(rx_log.size() == 2 && rx_log[0] == FIRST && rx_log[1] == SECOND, "both characters received in order");
    check(rx_errors == 0, "bit timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
