// tb_iq_decompressor: decodes all 256 codes on both I and Q and compares
// them with the reconstruction law written as integer arithmetic; also
// checks that decoding is monotonic in the magnitude code and that the
// output follows the input by one cycle.
module tb_iq_decompressor;
  import roe_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, in_valid = 0;
  ciq_t in_ciq = '0;
  logic out_valid; iq16_t out_iq;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  iq_decompressor dut (.*);

  function automatic int ref_dec(int c);
    int e, m, mag;
    e = (c / 16) % 8; m = c % 16;
    mag = (e == 0) ? 16 * m + 8 : (16 + m) * (1 << (e + 3)) + (1 << (e + 2));
    return (c >= 128) ? -mag : mag;
  endfunction

  initial begin
    int prev = -1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 256; c++) begin
      @(negedge clk); in_valid = 1; in_ciq.i = 8'(c); in_ciq.q = 8'(255 - c);
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || int'(out_iq.i) != ref_dec(c) || int'(out_iq.q) != ref_dec(255 - c)) begin
        failures++; $display("code %0d: got %0d,%0d exp %0d,%0d", c, out_iq.i, out_iq.q, ref_dec(c), ref_dec(255-c));
      end
      if (c < 128) begin
        checks++;
        if (int'(out_iq.i) <= prev) begin failures++; $display("not monotonic at %0d", c); end
        prev = out_iq.i;
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("valid without input"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
