// tb_uart_rx -- reference receiver for the serial output line (testbench
// helper).
//
// Decodes the port's line format independently of the design: idle and stop
// level 0, start bit 1, then eight data bits least significant first, each
// sent inverted (line 1 = data 0). It counts clock cycles itself: a frame
// starts at the first clock where the line is 1, and each of the ten bit
// periods must be exactly DIV clocks long with the line constant over the
// whole period. rst holds it idle. Any violation is counted in errors. When the stop period
// ends, data holds the byte and valid is high for one clock.
module tb_uart_rx #(
  parameter int DIV = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       line,
  output logic       valid,
  output logic [7:0] data,
  output int         errors,
  output int         frames
);

  int   cyc;       // clocks since the start of the frame, -1 when idle
  logic [9:0] bits;

  initial begin
    cyc    = -1;
    valid  = 1'b0;
    data   = '0;
    errors = 0;
    frames = 0;
    bits   = '0;
  end

  always @(posedge clk) begin
    valid <= 1'b0;
    if (rst) begin
      cyc <= -1;
    end else if (cyc < 0) begin
      if (line) begin
        cyc     <= 1;
        bits[0] <= line;
      end
    end else begin
      if (cyc % DIV == 0) begin
        bits[cyc / DIV] <= line;
      end else if (line != bits[cyc / DIV]) begin
        errors <= errors + 1;
        $display("tb_uart_rx: line changed inside bit period %0d at clock %0d of the frame",
                 cyc / DIV, cyc);
      end
      if (cyc == 10 * DIV - 1) begin
        cyc <= -1;
        if (bits[0] !== 1'b1 || line !== 1'b0) begin
          errors <= errors + 1;
          $display("tb_uart_rx: bad start or stop level");
        end
        data   <= ~bits[8:1];
        valid  <= 1'b1;
        frames <= frames + 1;
      end else begin
        cyc <= cyc + 1;
      end
    end
  end

endmodule
