// tb_status_port -- self-checking test of the 221H status port.
//
// Sweeps every address with IOR* high and low and both values of full, and
// checks the driver enable and the byte presented: {full, 7'b0} only while
// 221H is read, enable low otherwise.
module tb_status_port;
  import serial_port_pkg::*;

  logic     clk = 1'b0;
  io_addr_t addr;
  logic     ior_n;
  logic     full;
  byte_t    rd_data;
  logic     rd_oe;

  int checks = 0, failures = 0;

  status_port dut (.addr, .ior_n, .full, .rd_data, .rd_oe);

  always #20 clk = ~clk;

  initial begin
    for (int a = 0; a < 1024; a++) begin
      for (int r = 0; r < 2; r++) begin
        for (int f = 0; f < 2; f++) begin
          logic sel;
          addr = io_addr_t'(a); ior_n = r[0]; full = f[0];
          #1;
          sel = (a == 'h221) && (r == 0);
          checks++;
          if (rd_oe !== sel || (sel && rd_data !== {f[0], 7'b0})) begin
            failures++;
            $display("FAIL: addr=%03h ior_n=%0d full=%0d -> oe=%b data=%02h", a, r, f, rd_oe, rd_data);
          end
        end
      end
    end
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
