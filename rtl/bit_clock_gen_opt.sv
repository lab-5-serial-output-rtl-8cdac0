// bit_clock_gen_opt -- bit clock generator with a selectable bit rate
// (optional configuration).
//
// Works like the basic generator: a counter runs from 0 to D-1, nextbit is
// high during the last count, and start clears the counter. D is chosen at
// run time by the 4-bit rate code from a table of divisors computed at
// elaboration as CLK_HZ / rate for the nine rates 300 .. 57600 bps
// (RATE_TABLE in the package). Codes 9..15 select 9600 bps. At 25.175 MHz
// the divisors run from 83916 (300 bps) to 437 (57600 bps).
//
// Interface: clk, rst (synchronous, active high), start, rate in; nextbit
// out. rate must be stable during a character (the controller holds a copy).
//
// As in the lab exercise: counter principle, rate list. Own choice: the codes.
module bit_clock_gen_opt
  import serial_port_pkg::*;
#(
  parameter int unsigned CLK_HZ = 25_175_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [3:0] rate,
  output logic       nextbit
);

  localparam int unsigned MAX_DIV = CLK_HZ / RATE_TABLE[0];
  localparam int unsigned CNT_W   = $clog2(MAX_DIV);

  typedef logic [CNT_W-1:0] count_t;

  typedef count_t last_table_t [16];

  // Last count for every rate code, fixed at elaboration (no run-time
  // division): CLK_HZ / rate - 1.
  function automatic last_table_t build_last_table();
    last_table_t t;
    for (int i = 0; i < 16; i++) begin
      int unsigned r;
      r = (i < N_RATES) ? RATE_TABLE[i] : RATE_TABLE[RATE_9600];
      t[i] = count_t'(CLK_HZ / r - 1);
    end
    return t;
  endfunction

  localparam last_table_t LAST_TABLE = build_last_table();

  count_t count, last;

  assign last    = LAST_TABLE[rate];
  assign nextbit = (count == last);

  always_ff @(posedge clk) begin
    if (rst || start || nextbit) count <= '0;
    else                         count <= count + 1'b1;
  end

  initial begin
    assert (CLK_HZ / RATE_TABLE[N_RATES-1] >= 2)
      else $fatal(1, "bit_clock_gen_opt: CLK_HZ must be at least twice the highest bit rate");
  end

endmodule
