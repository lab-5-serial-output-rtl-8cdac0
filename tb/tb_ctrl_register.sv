// tb_ctrl_register -- self-checking test of the 221H control register.
//
// Checks the reset value (9600 bps, 8 data bits, no parity, one stop bit),
// that a write to 221H is taken at the end of the strobe and not before,
// that writes to other addresses leave it alone, and that reset restores the
// default at any time.
module tb_ctrl_register;
  import serial_port_pkg::*;

  logic      clk = 1'b0;
  logic      rst;
  io_addr_t  addr;
  logic      iow_n;
  byte_t     d_in;
  port_cfg_t cfg;
  byte_t     expected;

  int checks = 0, failures = 0;

  ctrl_register dut (.rst, .addr, .iow_n, .d_in, .cfg);

  always #20 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cfg=%02h expected=%02h)", what, cfg, expected);
    end
  endtask

  task automatic bus_write(input io_addr_t a, input byte_t d);
    addr = a; d_in = d; #20;
    iow_n = 1'b0; #100;
    check(cfg === expected, "unchanged during the strobe");
    iow_n = 1'b1; #5;
    if (a == 10'h221) expected = d;
    check(cfg === expected, "value after the strobe");
    d_in = ~d; #20;
    check(cfg === expected, "holds after the data bus changes");
  endtask

  initial begin
    addr = '0; iow_n = 1'b1; d_in = '0; rst = 1'b0;
    #5 rst = 1'b1; #10 rst = 1'b0;
    expected = 8'h35;
    check(cfg === 8'h35, "reset value");
    check(cfg.rate == 4'd5 && cfg.wlen == 2'd3 && !cfg.par_en && !cfg.stop2, "reset fields: 9600 8N1");
    bus_write(10'h221, 8'hC0);
    check(cfg.stop2 && cfg.par_en && cfg.wlen == 0 && cfg.rate == 0, "field positions");
    for (int i = 0; i < 300; i++) begin
      io_addr_t a;
      a = ($urandom % 2) ? 10'h221 : io_addr_t'($urandom);
      bus_write(a, byte_t'($urandom));
    end
    rst = 1'b1; #5;
    expected = 8'h35;
    check(cfg === 8'h35, "asynchronous reset");
    rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
