// tb_bit_clock_gen_opt -- self-checking test of the selectable bit clock.
//
// At the default 25.175 MHz clock, for each rate code 0..15, restarts the
// generator with start and checks that nextbit comes every CLK_HZ / rate
// clocks (rates 300, 600, ..., 38400, 57600 bps; codes 9..15 give 9600),
// high for one clock, for three periods.
module tb_bit_clock_gen_opt;
  localparam int CLK_HZ = 25_175_000;
  localparam int RATES [9] = '{300, 600, 1200, 2400, 4800, 9600, 19200, 38400, 57600};

  logic       clk = 1'b0;
  logic       rst, start, nextbit;
  logic [3:0] rate;

  int checks = 0, failures = 0;

  bit_clock_gen_opt dut (.clk, .rst, .start, .rate, .nextbit);

  always #20 clk = ~clk;

  initial begin
    rst = 1'b1; start = 1'b0; rate = 4'd5;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int code = 0; code < 16; code++) begin
      int div, since;
      div = CLK_HZ / ((code < 9) ? RATES[code] : 9600);
      rate = 4'(code);
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      since = 1;
      for (int p = 0; p < 3; p++) begin
        while (!nextbit) begin
          @(negedge clk);
          since++;
          if (since > div + 1) break;
        end
        checks++;
        if (since != div) begin
          failures++;
          $display("FAIL: code %0d period %0d expected %0d", code, since, div);
        end
        @(negedge clk);
        since = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
