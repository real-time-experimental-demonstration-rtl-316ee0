// tb_iq_compressor: compares the 8-bit codes with a reference written as
// arithmetic (log2 for the segment, division for the mantissa) over edge
// values and random samples, and checks the quantisation error bound
// (half a step of the segment) after decoding with the reference law.
module tb_iq_compressor;
  import roe_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, in_valid = 0;
  iq16_t in_iq = '0;
  logic out_valid; ciq_t out_ciq;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  iq_compressor dut (.*);

  function automatic int ref_code(int x);
    int s, mag, e, m, p;
    s = x < 0; mag = s ? -x : x;
    if (mag > 32767) mag = 32767;
    if (mag < 256) begin e = 0; m = mag / 16; end
    else begin p = $clog2(mag + 1) - 1; e = p - 7; m = (mag / (1 << (e + 3))) % 16; end
    return s * 128 + e * 16 + m;
  endfunction
  function automatic int ref_dec(int c);
    int e, m, mag;
    e = (c / 16) % 8; m = c % 16;
    mag = (e == 0) ? 16 * m + 8 : (16 + m) * (1 << (e + 3)) + (1 << (e + 2));
    return (c >= 128) ? -mag : mag;
  endfunction

  initial begin
    int xs[$];
    repeat (3) @(posedge clk); rst_n = 1;
    xs = '{0, 1, -1, 15, 16, 255, 256, -256, 511, 512, 4095, 4096, 16383, 16384, 32767, -32767, -32768};
    repeat (400) xs.push_back($signed(16'($urandom)));
    repeat (100) xs.push_back($signed(16'($urandom)) >>> ($urandom % 12));
    for (int k = 0; k + 1 < xs.size(); k += 2) begin
      int ci, cq, err, step, e, mi;
      @(negedge clk); in_valid = 1; in_iq.i = 16'(xs[k]); in_iq.q = 16'(xs[k+1]);
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("no output"); end
      ci = ref_code(xs[k]); cq = ref_code(xs[k+1]);
      checks++;
      if (int'(out_ciq.i) != ci || int'(out_ciq.q) != cq) begin
        failures++; $display("x=%0d,%0d got %h,%h exp %h,%h", xs[k], xs[k+1], out_ciq.i, out_ciq.q, ci, cq);
      end
      // error bound: half a segment step (+1 at the clipped ends)
      mi = xs[k] < 0 ? -xs[k] : xs[k];
      e = (int'(out_ciq.i) / 16) % 8;
      step = (e == 0) ? 16 : (1 << (e + 3));
      err = ref_dec(out_ciq.i) - xs[k]; if (err < 0) err = -err;
      checks++;
      if (err > step / 2 + 1) begin failures++; $display("error %0d too large for %0d", err, xs[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
