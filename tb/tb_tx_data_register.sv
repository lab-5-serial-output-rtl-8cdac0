// tb_tx_data_register -- self-checking test of the transmit data register.
//
// Drives random buffer values every cycle and random start pulses, and checks
// against a model that the register takes the buffer on a clock with start
// and holds otherwise.
module tb_tx_data_register;
  import serial_port_pkg::*;

  logic  clk = 1'b0;
  logic  start;
  byte_t buf_data, tx_data, model;

  int checks = 0, failures = 0, loads = 0;

  tx_data_register dut (.clk, .start, .buf_data, .tx_data);

  always #20 clk = ~clk;

  initial begin
    // First load defines the register.
    @(negedge clk) start = 1'b1; buf_data = 8'hC3;
    @(negedge clk) model = 8'hC3;
    for (int i = 0; i < 2000; i++) begin
      start = ($urandom % 5 == 0);
      buf_data = byte_t'($urandom);
      @(posedge clk);
      if (start) begin
        model = buf_data;
        loads++;
      end
      @(negedge clk);
      checks++;
      if (tx_data !== model) begin
        failures++;
        $display("FAIL cycle %0d: tx_data=%02h expected %02h", i, tx_data, model);
      end
    end
    checks++;
    if (loads == 0) failures++;
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
