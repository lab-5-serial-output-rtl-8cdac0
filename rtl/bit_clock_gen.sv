// bit_clock_gen -- bit-rate clock generator.
//
// A counter runs from 0 to DIVISOR-1, where DIVISOR = CLK_HZ / BIT_RATE
// (integer division: 25 175 000 / 9 600 gives 2622, so the count goes to
// 2621). nextbit is high during the last count, one clock period in every
// DIVISOR, and tells the controller to move to the next bit. start clears the
// counter, so the first bit period of a character begins with the clock after
// start and lasts exactly DIVISOR clocks.
//
// Interface: clk, rst (synchronous, active high), start in; nextbit out.
// The actual bit rate is CLK_HZ / DIVISOR (9601.1 bps with the defaults).
//
// As in the lab exercise: the count range, the timing of nextbit and the reset by
// start. Own choice: the extra rst input.
module bit_clock_gen #(
  parameter int unsigned CLK_HZ   = 25_175_000,
  parameter int unsigned BIT_RATE = 9_600
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic nextbit
);

  localparam int unsigned DIVISOR = CLK_HZ / BIT_RATE;
  localparam int unsigned CNT_W   = (DIVISOR > 1) ? $clog2(DIVISOR) : 1;
  localparam logic [CNT_W-1:0] LAST = CNT_W'(DIVISOR - 1);

  logic [CNT_W-1:0] count;

  assign nextbit = (count == LAST);

  always_ff @(posedge clk) begin
    if (rst || start || nextbit) count <= '0;
    else                         count <= count + 1'b1;
  end

  initial begin
    assert (DIVISOR >= 2) else $fatal(1, "bit_clock_gen: CLK_HZ must be at least 2*BIT_RATE");
  end

endmodule
