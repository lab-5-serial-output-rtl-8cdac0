// tb_uart_rx_cfg -- reference receiver for the serial line with a run-time
// frame format (testbench helper for the optional configuration).
//
// Same line sense as the basic port: idle and stop level 0, start bit 1,
// data bits least significant first and inverted, parity bit inverted.
// Format inputs (div clocks per bit, nbits 5..8, par_en, stop2) are taken at
// the first clock of each frame. Every bit period must be exactly div clocks
// with the line constant; the start bit must be 1, the stop bits 0 and, when
// enabled, the parity even over data plus parity bit. Violations are counted
// in errors. At the end of the last stop bit, data holds the word (upper
// bits zero) and valid is high for one clock.
module tb_uart_rx_cfg (
  input  logic       clk,
  input  logic       rst,
  input  logic       line,
  input  int         div,
  input  int         nbits,
  input  logic       par_en,
  input  logic       stop2,
  output logic       valid,
  output logic [7:0] data,
  output int         errors,
  output int         frames
);

  int   cyc;            // clock within the frame, -1 when idle
  int   f_div, f_len;   // format of the frame in progress
  int   f_nbits;
  logic f_par;
  logic [11:0] bits;

  initial begin
    cyc = -1; valid = 1'b0; data = '0; errors = 0; frames = 0; bits = '0;
    f_div = 2; f_len = 10; f_nbits = 8; f_par = 1'b0;
  end

  always @(posedge clk) begin
    valid <= 1'b0;
    if (rst) begin
      cyc <= -1;
    end else if (cyc < 0) begin
      if (line) begin
        cyc     <= 1;
        bits    <= 12'b1;
        f_div   <= div;
        f_nbits <= nbits;
        f_par   <= par_en;
        f_len   <= 1 + nbits + int'(par_en) + 1 + int'(stop2);
      end
    end else begin
      if (cyc % f_div == 0) begin
        bits[cyc / f_div] <= line;
      end else if (line != bits[cyc / f_div]) begin
        errors <= errors + 1;
        $display("tb_uart_rx_cfg: line changed inside bit period %0d", cyc / f_div);
      end
      if (cyc == f_len * f_div - 1) begin
        logic [7:0] w;
        logic       p;
        cyc <= -1;
        w = '0;
        for (int i = 0; i < 8; i++) if (i < f_nbits) w[i] = ~bits[1 + i];
        p = f_par ? ~bits[1 + f_nbits] : 1'b0;
        if (bits[0] !== 1'b1) begin
          errors <= errors + 1;
          $display("tb_uart_rx_cfg: bad start level");
        end
        for (int i = 1 + f_nbits + int'(f_par); i < f_len; i++) begin
          if (i == f_len - 1 ? line !== 1'b0 : bits[i] !== 1'b0) begin
            errors <= errors + 1;
            $display("tb_uart_rx_cfg: bad stop level in bit %0d", i);
          end
        end
        if (f_par && ((^w) ^ p) !== 1'b0) begin
          errors <= errors + 1;
          $display("tb_uart_rx_cfg: parity error on %02h", w);
        end
        data   <= w;
        valid  <= 1'b1;
        frames <= frames + 1;
      end else begin
        cyc <= cyc + 1;
      end
    end
  end

endmodule
