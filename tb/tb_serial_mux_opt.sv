// tb_serial_mux_opt -- self-checking test of the optional-configuration
// multiplexer.
//
// For every select code 0..15, every word length and a set of data bytes,
// compares the output with: 1 for the start bit, inverted data bit for codes
// 2..9, inverted even parity over the first 5+wlen bits for code 11, and 0
// for stop bits, idle and unused codes.
module tb_serial_mux_opt;
  import serial_port_pkg::*;

  logic       clk = 1'b0;
  logic [3:0] bitselect;
  byte_t      tx_data;
  logic [1:0] wlen;
  logic       serial_out;

  int checks = 0, failures = 0;

  serial_mux_opt dut (.bitselect, .tx_data, .wlen, .serial_out);

  always #20 clk = ~clk;

  function automatic logic expected_level(int sel, byte_t d, int nbits);
    int ones = 0;
    for (int i = 0; i < nbits; i++) ones += d[i];
    if (sel == 1) return 1'b1;
    if (sel >= 2 && sel <= 9) return ~d[sel-2];
    if (sel == 11) return (ones % 2 == 0);  // parity bit 0 -> line 1
    return 1'b0;
  endfunction

  initial begin
    for (int n = 0; n < 300; n++) begin
      tx_data = (n < 8) ? byte_t'(8'd1 << n) : byte_t'($urandom);
      for (int w = 0; w < 4; w++) begin
        wlen = 2'(w);
        for (int s = 0; s < 16; s++) begin
          bitselect = 4'(s);
          #1;
          checks++;
          if (serial_out !== expected_level(s, tx_data, 5 + w)) begin
            failures++;
            $display("FAIL: sel=%0d wlen=%0d data=%02h out=%b", s, w, tx_data, serial_out);
          end
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
