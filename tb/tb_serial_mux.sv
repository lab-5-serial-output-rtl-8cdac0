// tb_serial_mux -- self-checking test of the serial data multiplexer.
//
// For every select code and a set of data bytes, compares the output with
// the line levels of the port: 1 for the start bit (code 1), the inverted
// data bit for codes 2..9 (bit 0 first), and 0 for the stop bit, idle and
// unused codes.
module tb_serial_mux;
  import serial_port_pkg::*;

  logic       clk = 1'b0;
  logic [3:0] bitselect;
  byte_t      tx_data;
  logic       serial_out;

  int checks = 0, failures = 0;

  serial_mux dut (.bitselect, .tx_data, .serial_out);

  always #20 clk = ~clk;

  function automatic logic expected_level(int sel, byte_t d);
    if (sel == 1) return 1'b1;
    if (sel >= 2 && sel <= 9) return ~d[sel-2];
    return 1'b0;
  endfunction

  initial begin
    for (int n = 0; n < 300; n++) begin
      tx_data = (n < 8) ? byte_t'(8'd1 << n) : (n < 16) ? ~byte_t'(8'd1 << (n - 8)) : byte_t'($urandom);
      for (int s = 0; s < 16; s++) begin
        bitselect = 4'(s);
        #1;
        checks++;
        if (serial_out !== expected_level(s, tx_data)) begin
          failures++;
          $display("FAIL: sel=%0d data=%02h out=%b", s, tx_data, serial_out);
        end
      end
    end
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
