// tb_bit_clock_gen -- self-checking test of the bit clock generator.
//
// Runs the default 25.175 MHz / 9600 bps instance and a 19200 Hz / 9600 bps
// instance side by side. For each it checks that nextbit is high for exactly
// one clock in every CLK_HZ/BIT_RATE clocks (2622 and 2), and that a start
// pulse restarts the count so that the next nextbit comes exactly
// CLK_HZ/BIT_RATE clocks after the start clock.
module tb_bit_clock_gen;
  localparam int DIV_A = 25_175_000 / 9_600;  // 2622
  localparam int DIV_B = 2;

  logic clk = 1'b0;
  logic rst, start;
  logic nextbit_a, nextbit_b;

  int checks = 0, failures = 0;

  bit_clock_gen dut_a (.clk, .rst, .start, .nextbit(nextbit_a));
  bit_clock_gen #(.CLK_HZ(19_200), .BIT_RATE(9_600)) dut_b (.clk, .rst, .start, .nextbit(nextbit_b));

  always #20 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Clocks from the last restart (or the last pulse) to the next pulse.
  int since_a, since_b, pulses_a, pulses_b;

  always @(posedge clk) begin
    if (rst || start) begin
      since_a <= 1;
      since_b <= 1;
    end else begin
      if (nextbit_a) begin
        check(since_a == DIV_A, $sformatf("period A %0d, expected %0d", since_a, DIV_A));
        pulses_a <= pulses_a + 1;
        since_a <= 1;
      end else begin
        since_a <= since_a + 1;
        check(since_a < DIV_A, "A pulse missing");
      end
      if (nextbit_b) begin
        check(since_b == DIV_B, $sformatf("period B %0d, expected %0d", since_b, DIV_B));
        pulses_b <= pulses_b + 1;
        since_b <= 1;
      end else begin
        since_b <= since_b + 1;
        check(since_b < DIV_B, "B pulse missing");
      end
    end
  end

  initial begin
    pulses_a = 0; pulses_b = 0; since_a = 1; since_b = 1;
    rst = 1'b1; start = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (3 * DIV_A + 17) @(negedge clk);
    for (int i = 0; i < 6; i++) begin
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      repeat (DIV_A + 1 + $urandom % (2 * DIV_A)) @(negedge clk);
    end
    check(pulses_a >= 6, "A produced pulses");
    check(pulses_b >= 100, "B produced pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
