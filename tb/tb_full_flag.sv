// tb_full_flag -- self-checking test of the buffer-full flip-flop.
//
// Holds the load strobe low for a random number of clocks and checks that
// full rises on the first clock edge after the strobe goes back high (and not
// earlier, not while the strobe is low), that start clears it, that a rising
// edge and start in the same cycle leave it clear, and that reset clears it.
// Stimulus changes on the falling clock edge.
module tb_full_flag;
  logic clk = 1'b0;
  logic rst, load_n, start, full;

  int checks = 0, failures = 0;
  int sets = 0, clears = 0;

  full_flag dut (.clk, .rst, .load_n, .start, .full);

  always #20 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s (full=%b)", $time, what, full);
    end
  endtask

  initial begin
    rst = 1'b1; load_n = 1'b1; start = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(full === 1'b0, "empty after reset");

    for (int i = 0; i < 50; i++) begin
      logic was_full;
      int low;
      was_full = full;
      low = 1 + $urandom % 6;
      @(negedge clk) load_n = 1'b0;
      repeat (low) begin
        @(negedge clk);
        check(full === was_full, "no change while load is low");
      end
      load_n = 1'b1;
      check(full === was_full, "no change before the next clock edge");
      @(negedge clk);
      check(full === 1'b1, "set on first clock edge after load rises");
      sets++;
      repeat ($urandom % 4) begin
        @(negedge clk);
        check(full === 1'b1, "stays set");
      end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(full === 1'b0, "cleared by start");
      clears++;
      @(negedge clk);
      check(full === 1'b0, "stays clear");
    end

    // Rising edge seen in the same cycle as start: clearing wins.
    @(negedge clk) load_n = 1'b0;
    @(negedge clk) load_n = 1'b1; start = 1'b1;
    @(negedge clk) start = 1'b0;
    check(full === 1'b0, "start wins over a simultaneous load edge");

    // Start without a pending character leaves it empty; reset clears.
    @(negedge clk) load_n = 1'b0;
    @(negedge clk) load_n = 1'b1;
    @(negedge clk) check(full === 1'b1, "set again");
    rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    check(full === 1'b0, "reset clears");
    check(sets > 0 && clears > 0, "set and clear both exercised");

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
