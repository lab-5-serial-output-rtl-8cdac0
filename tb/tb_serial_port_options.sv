// tb_serial_port_options -- end-to-end test of the port with the optional
// control register (OPTIONS = 1).
//
// Clock set to 230 400 Hz so that every rate divides evenly and the slowest
// (300 bps) is 768 clocks per bit. The CPU model first sends two characters
// without touching 221H (reset format: 9600 bps, 8 data bits, no parity, one
// stop bit). It then, for many random formats covering all word lengths,
// parity on/off, one/two stop bits and all rate codes, polls 221H until not
// full, writes the format to 221H and a character to 220H. A reference
// receiver that follows the expected format of each frame checks bit timing,
// levels and even parity, and the received words are compared with what was
// sent (masked to the word length). Checks that every format and rate was
// used, that a format written while a character is waiting does not alter
// the character already on the line, and that status reads still work.
module tb_serial_port_options;
  import serial_port_pkg::*;

  localparam int CLK_HZ = 230_400;
  localparam int RATES [9] = '{300, 600, 1200, 2400, 4800, 9600, 19200, 38400, 57600};

  logic     clk = 1'b0;
  logic     rst;
  io_addr_t addr;
  logic     iow_n, ior_n;
  byte_t    d_in, d_out;
  logic     d_oe, serial_out;

  serial_output_port #(.CLK_HZ(CLK_HZ), .OPTIONS(1'b1)) dut (
    .clk, .rst, .addr, .iow_n, .ior_n, .d_in, .d_out, .d_oe, .serial_out);

  typedef struct {
    byte_t     ch;
    port_cfg_t cfg;
  } sent_t;
  sent_t sent[$];

  int         rx_div, rx_nbits;
  logic       rx_par, rx_stop2;
  logic       rx_valid;
  logic [7:0] rx_data;
  int         rx_errors, rx_frames;

  tb_uart_rx_cfg rx (.clk, .rst, .line(serial_out), .div(rx_div), .nbits(rx_nbits),
                     .par_en(rx_par), .stop2(rx_stop2), .valid(rx_valid), .data(rx_data),
                     .errors(rx_errors), .frames(rx_frames));

  always #2170 clk = ~clk;

  int checks = 0, failures = 0, n_full_seen = 0, n_received = 0;
  int formats[16];
  int rates[16];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic int div_of(logic [3:0] code);
    return CLK_HZ / ((code < 9) ? RATES[code] : 9600);
  endfunction

  // The receiver always looks at the oldest character not yet received.
  always_comb begin
    port_cfg_t c;
    c = (sent.size() > 0) ? sent[0].cfg : CFG_DEFAULT;
    rx_div   = div_of(c.rate);
    rx_nbits = 5 + int'(c.wlen);
    rx_par   = c.par_en;
    rx_stop2 = c.stop2;
  end

  always @(posedge clk) begin
    if (rx_valid) begin
      byte_t mask;
      mask = byte_t'(8'hFF >> (3 - sent[0].cfg.wlen));
      check(rx_data === (sent[0].ch & mask),
            $sformatf("received %02h, sent %02h with format %02h", rx_data, sent[0].ch, sent[0].cfg));
      n_received++;
      void'(sent.pop_front());
    end
  end

  task automatic io_write(input io_addr_t a, input byte_t d);
    @(negedge clk) addr = a; d_in = d;
    @(negedge clk) iow_n = 1'b0;
    @(negedge clk) iow_n = 1'b1;
    @(negedge clk) d_in = 8'h00;
  endtask

  task automatic wait_not_full();
    byte_t d;
    do begin
      @(negedge clk) addr = STATUS_PORT_ADDR; ior_n = 1'b0;
      @(negedge clk) d = d_out;
      check(d_oe === 1'b1 && d[6:0] === 7'b0, "status read");
      ior_n = 1'b1;
      if (d[7]) n_full_seen++;
    end while (d[7]);
  endtask

  port_cfg_t cur;

  initial begin
    foreach (formats[i]) formats[i] = 0;
    foreach (rates[i]) rates[i] = 0;
    rst = 1'b1; addr = '0; iow_n = 1'b1; ior_n = 1'b1; d_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    cur = CFG_DEFAULT;

    // Reset format, no control write.
    for (int i = 0; i < 2; i++) begin
      byte_t ch;
      ch = 8'h41 + byte_t'(i);
      wait_not_full();
      sent.push_back('{ch, cur});
      io_write(DATA_PORT_ADDR, ch);
    end

    for (int i = 0; i < 60; i++) begin
      byte_t ch;
      port_cfg_t c;
      c = port_cfg_t'($urandom);
      if (i < 16) begin
        c.wlen = i[1:0]; c.par_en = i[2]; c.stop2 = i[3];
      end
      if (i >= 16 && i < 32) c.rate = 4'(i - 16);
      if (c.rate < 2 && i >= 32) c.rate = 4'd8;  // keep the run short
      ch = byte_t'($urandom);
      wait_not_full();
      // The format is written after the previous character has started, so
      // it must apply to this character only.
      io_write(STATUS_PORT_ADDR, c);
      cur = c;
      sent.push_back('{ch, cur});
      io_write(DATA_PORT_ADDR, ch);
      formats[{c.stop2, c.par_en, c.wlen}]++;
      rates[c.rate]++;
    end

    wait (sent.size() == 0);
    repeat (50) @(negedge clk);
    check(n_received == 62, $sformatf("received %0d of 62", n_received));
    check(rx_errors == 0, "line format, bit timing and parity");
    check(n_full_seen > 0, "mechanism: CPU saw the buffer full");
    foreach (formats[i]) check(formats[i] > 0, $sformatf("mechanism: format %0d used", i));
    foreach (rates[i]) check(rates[i] > 0, $sformatf("mechanism: rate code %0d used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
