// full_flag -- buffer full/empty flip-flop.
//
// full tells the CPU that the data buffer holds a character that has not yet
// been moved into the transmit data register. The write strobe load_n comes
// from the bus and is asserted (low) for several system clocks; its rising
// edge (end of the write) is found by keeping last cycle's value of load_n
// and comparing it with the present one. full is set on the first clock edge
// after that rising edge and cleared on a clock edge where start is active.
// If both happen in the same cycle, clearing wins: the buffer has already
// taken the new character when the edge is seen, so the transfer that start
// makes carries that new character.
//
// Interface: clk (system clock), rst (synchronous, active high), load_n,
// start from the controller; full to the controller and the status port.
//
// As in the lab exercise: set/clear conditions and the previous-value edge
// detector. Own choices: clear priority, the synchronous reset, and no extra
// synchronizer stage on load_n.
module full_flag (
  input  logic clk,
  input  logic rst,
  input  logic load_n,
  input  logic start,
  output logic full
);

  logic load_n_q;
  logic load_rise;

  assign load_rise = load_n && !load_n_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      load_n_q <= 1'b1;
      full     <= 1'b0;
    end else begin
      load_n_q <= load_n;
      if (start)          full <= 1'b0;
      else if (load_rise) full <= 1'b1;
    end
  end

endmodule
