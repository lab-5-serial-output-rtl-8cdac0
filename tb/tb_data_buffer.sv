// tb_data_buffer -- self-checking test of the 220H data buffer and decoder.
//
// Performs bus writes to the buffer's address and to other addresses, with
// random data, and checks that load_n is low exactly while IOW* is low at
// 220H, that the buffer keeps its old value during the write and takes the
// new data at the end of the strobe, and that writes elsewhere and reads do
// not disturb it.
module tb_data_buffer;
  import serial_port_pkg::*;

  logic     clk = 1'b0;
  io_addr_t addr;
  logic     iow_n;
  byte_t    d_in;
  logic     load_n;
  byte_t    buf_data;

  int checks = 0, failures = 0;
  byte_t expected;

  data_buffer dut (.addr, .iow_n, .d_in, .load_n, .buf_data);

  always #20 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (load_n=%b buf=%02h expected=%02h)", what, load_n, buf_data, expected);
    end
  endtask

  task automatic bus_write(input io_addr_t a, input byte_t d);
    bit hit = (a == 10'h220);
    addr = a; d_in = d; iow_n = 1'b1;
    #30;
    check(load_n === 1'b1, "load_n idle before write");
    iow_n = 1'b0;
    #10;
    check(load_n === !hit, "load_n follows decoded write");
    #100;
    check(buf_data === expected, "buffer holds old value during the strobe");
    iow_n = 1'b1;
    #10;
    if (hit) expected = d;
    check(load_n === 1'b1, "load_n released");
    check(buf_data === expected, "buffer value after the strobe");
    d_in = ~d;  // data bus changes after the write; must not be taken
    #30;
    check(buf_data === expected, "buffer holds after data bus changes");
  endtask

  initial begin
    addr = '0; iow_n = 1'b1; d_in = '0;
    #10;
    expected = 8'h5A;
    addr = 10'h220; d_in = 8'h5A; iow_n = 1'b0; #50; iow_n = 1'b1; #20;
    check(buf_data === 8'h5A, "first write");
    bus_write(10'h220, 8'h00);
    bus_write(10'h220, 8'hFF);
    bus_write(10'h221, 8'h33);   // status address: no load
    bus_write(10'h020, 8'h44);   // A9 differs
    bus_write(10'h320, 8'h55);   // A8 differs
    for (int i = 0; i < 200; i++) begin
      io_addr_t a;
      a = ($urandom % 3 == 0) ? io_addr_t'($urandom) : 10'h220;
      bus_write(a, byte_t'($urandom));
    end
    // Single-bit address neighbours of 220H never decode.
    for (int b = 0; b < 10; b++) begin
      addr = 10'h220 ^ (10'd1 << b); iow_n = 1'b0; #10;
      check(load_n === 1'b1, "neighbour address not decoded");
      iow_n = 1'b1; #10;
    end
    check(buf_data === expected, "buffer unchanged by neighbour writes");
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
