// tb_tx_controller -- self-checking test of the eleven-state controller.
//
// Drives full and nextbit at random and follows the controller with an
// independent model: position 0 is idle, 1 the start bit, 2..9 the data bits,
// 10 the stop bit. Checks start (full while idle), the bit select, that
// nothing moves without nextbit, that idle waits for start whatever nextbit
// does, and that every state is visited.
module tb_tx_controller;
  logic       clk = 1'b0;
  logic       rst, full, nextbit;
  logic       start;
  logic [3:0] bitselect;

  int checks = 0, failures = 0;
  int pos;
  int visits[11];

  tx_controller dut (.clk, .rst, .full, .nextbit, .start, .bitselect);

  always #20 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s (pos=%0d bitselect=%0d start=%b)", $time, what, pos, bitselect, start);
    end
  endtask

  initial begin
    rst = 1'b1; full = 1'b0; nextbit = 1'b0; pos = 0;
    foreach (visits[i]) visits[i] = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      full    = ($urandom % 3 == 0);
      nextbit = ($urandom % 4 == 0);
      #1;
      check(bitselect === 4'(pos), "bit select matches state");
      check(start === (full && pos == 0), "start = full and idle");
      visits[pos]++;
      @(posedge clk);
      if (pos == 0) pos = full ? 1 : 0;
      else if (nextbit) pos = (pos == 10) ? 0 : pos + 1;
    end
    // Reset in the middle of a character returns to idle.
    @(negedge clk) full = 1'b1; nextbit = 1'b0;
    @(negedge clk) full = 1'b0;
    rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    check(bitselect === 4'd0, "reset to idle");
    foreach (visits[i]) check(visits[i] > 0, $sformatf("state %0d visited", i));
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
