// tb_tx_controller_opt -- self-checking test of the optional-configuration
// controller.
//
// Drives full, nextbit and the configuration at random and follows the
// controller with an independent model of the frame: start bit, 5+wlen data
// bits, optional parity bit, one or two stop bits, back to idle. The model
// takes the configuration when start fires, as the controller must. Checks
// bitselect, start and the copied configuration every cycle, and that every
// state and every format was used.
module tb_tx_controller_opt;
  import serial_port_pkg::*;

  logic       clk = 1'b0;
  logic       rst, full, nextbit;
  port_cfg_t  cfg, cfg_q;
  logic       start;
  logic [3:0] bitselect;

  int checks = 0, failures = 0;
  int visits[13];
  int formats[16];

  // Model: position in the frame as a list of state codes.
  int frame[$];
  int pos;            // index into frame, -1 when idle
  port_cfg_t m_cfg;

  tx_controller_opt dut (.clk, .rst, .full, .nextbit, .cfg, .start, .bitselect, .cfg_q);

  always #20 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s (bitselect=%0d start=%b)", $time, what, bitselect, start);
    end
  endtask

  function automatic void build_frame(port_cfg_t c);
    frame.delete();
    frame.push_back(1);
    for (int i = 0; i < 5 + c.wlen; i++) frame.push_back(2 + i);
    if (c.par_en) frame.push_back(11);
    frame.push_back(10);
    if (c.stop2) frame.push_back(12);
  endfunction

  initial begin
    int code;
    rst = 1'b1; full = 1'b0; nextbit = 1'b0; cfg = CFG_DEFAULT;
    pos = -1; m_cfg = CFG_DEFAULT;
    foreach (visits[i]) visits[i] = 0;
    foreach (formats[i]) formats[i] = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      full    = ($urandom % 3 == 0);
      nextbit = ($urandom % 3 == 0);
      if ($urandom % 7 == 0) cfg = port_cfg_t'($urandom);
      #1;
      code = (pos < 0) ? 0 : frame[pos];
      check(bitselect === 4'(code), $sformatf("bitselect, expected %0d", code));
      check(start === (full && pos < 0), "start = full and idle");
      check(cfg_q === m_cfg, "configuration copy");
      visits[code]++;
      @(posedge clk);
      if (pos < 0) begin
        if (full) begin
          m_cfg = cfg;
          build_frame(cfg);
          formats[{cfg.stop2, cfg.par_en, cfg.wlen}]++;
          pos = 0;
        end
      end else if (nextbit) begin
        pos = (pos == frame.size() - 1) ? -1 : pos + 1;
      end
    end
    foreach (visits[i]) check(visits[i] > 0, $sformatf("state %0d visited", i));
    foreach (formats[i]) check(formats[i] > 0, $sformatf("format %0d used", i));
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
