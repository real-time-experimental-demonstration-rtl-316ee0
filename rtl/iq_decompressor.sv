// iq_decompressor: expands 8-bit compressed I/Q back to 16-bit samples.
//
// Inverse of iq_compressor: code {sign, exp, mant} is rebuilt at the middle
// of its quantisation interval, mag = 16*mant + 8 for exp=0 and
// mag = (16+mant) << (exp+3) + 2^(exp+2) otherwise, then the sign is
// applied.  Timing: registered, one cycle of latency, one output per input.
// The reconstruction law is this design's own, matched to its compressor.
module iq_decompressor
  import roe_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  ciq_t  in_ciq,
  output logic  out_valid,
  output iq16_t out_iq
);
  function automatic logic signed [15:0] expand(input logic [7:0] c);
    logic [15:0] mag;
    logic [2:0]  e;
    e = c[6:4];
    if (e == 3'd0) mag = {8'd0, c[3:0], 4'd8};
    else           mag = ({11'd0, 1'b1, c[3:0]} << (4'(e) + 4'd3)) | (16'd1 << (4'(e) + 4'd2));
    return c[7] ? -$signed(mag) : $signed(mag);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_iq    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_iq.i <= expand(in_ciq.i);
        out_iq.q <= expand(in_ciq.q);
      end
    end
  end
endmodule
