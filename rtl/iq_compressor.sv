// iq_compressor: non-linear resolution suppression of 16-bit I/Q to 8 bits.
//
// Each 16-bit two's-complement component is coded as sign-magnitude with a
// segmented (A-law-like) scale: code = {sign, exp[2:0], mant[3:0]}.
// Magnitudes below 256 use exp=0 and a uniform step of 16; a magnitude whose
// leading one is at bit p >= 8 uses exp = p-7 and keeps the four bits below
// the leading one, so the step doubles with every segment.  Small signals
// keep fine resolution and the quantisation error stays roughly
// proportional to amplitude, which is what gives the link its wide dynamic
// range at 8 bits per component.  -32768 is clipped to -32767.
// Timing: registered, one output per input, one cycle of latency.
// The document says only that samples are compressed to 8-bit words by a
// non-linear resolution suppression; the segment law is this design's own.
module iq_compressor
  import roe_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  iq16_t in_iq,
  output logic  out_valid,
  output ciq_t  out_ciq
);
  function automatic logic [7:0] compress(input logic signed [15:0] x);
    logic        s;
    logic [15:0] mag;
    logic [2:0]  e;
    logic [3:0]  m;
    s   = x[15];
    mag = s ? 16'(-x) : 16'(x);
    if (mag > 16'd32767) mag = 16'd32767;
    e = 3'd0;
    for (int p = 8; p <= 14; p++)
      if (mag[p]) e = 3'(p - 7);
    if (e == 3'd0) m = mag[7:4];
    else           m = 4'(mag >> (4'(e) + 4'd3));
    return {s, e, m};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ciq   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_ciq.i <= compress(in_iq.i);
        out_ciq.q <= compress(in_iq.q);
      end
    end
  end
endmodule
