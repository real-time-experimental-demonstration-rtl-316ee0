// ddc_fs4: digital down-converter from real IF samples to complex baseband,
// followed by the sample-rate reduction of the compression scheme.
//
// The IF carrier sits at a quarter of the ADC sample rate (37.5 MHz with a
// 150 MSa/s converter), so the complex mixer e^{-j*pi*n/2} needs no NCO or
// multipliers: the I branch takes x, 0, -x, 0 and the Q branch 0, -x, 0, x
// on successive samples.  Each branch is then decimated by DEC with a
// boxcar (first-order CIC) filter: DEC mixed samples are summed, the sum is
// shifted right by SHIFT and saturated to 16 bits.  With DEC=6 the output
// rate is 25 MSa/s, which after 8-bit compression of I and Q gives the
// 400 Mb/s per 20 MHz LTE carrier quoted for the link.
// Timing: one output (iq_valid pulse) per DEC accepted input samples, one
// cycle after the DEC-th sample.  The mixer phase runs on across output
// samples.  The fs/4 IF, the sample rate and the boxcar filter are this
// design's choices; the document states only that the IF is down-converted
// to baseband and the sample rate reduced.
module ddc_fs4
  import roe_pkg::*;
#(
  parameter int unsigned DEC   = 6,
  parameter int unsigned SHIFT = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adc_valid,
  input  logic signed [15:0] adc_sample,
  output logic               iq_valid,
  output iq16_t              iq
);
  localparam int unsigned AW = 16 + $clog2(DEC) + 1;
  localparam int unsigned CW = $clog2(DEC) > 0 ? $clog2(DEC) : 1;

  logic [1:0]            phase;
  logic [CW-1:0]         cnt;
  logic signed [AW-1:0]  acc_i, acc_q;
  logic signed [AW-1:0]  mix_i, mix_q;

  always_comb begin
    mix_i = '0;
    mix_q = '0;
    unique case (phase)
      2'd0: mix_i =  AW'(adc_sample);
      2'd1: mix_q = -AW'(adc_sample);
      2'd2: mix_i = -AW'(adc_sample);
      2'd3: mix_q =  AW'(adc_sample);
    endcase
  end

  function automatic logic signed [15:0] sat16(input logic signed [AW-1:0] v);
    logic signed [AW-1:0] s;
    s = v >>> SHIFT;
    if (s > AW'(32767))       return 16'sh7fff;
    else if (s < -AW'(32768)) return 16'sh8000;
    else                      return s[15:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase    <= '0;
      cnt      <= '0;
      acc_i    <= '0;
      acc_q    <= '0;
      iq_valid <= 1'b0;
      iq       <= '0;
    end else begin
      iq_valid <= 1'b0;
      if (adc_valid) begin
        phase <= phase + 2'd1;
        if (cnt == CW'(DEC - 1)) begin
          cnt      <= '0;
          acc_i    <= '0;
          acc_q    <= '0;
          iq_valid <= 1'b1;
          iq.i     <= sat16(acc_i + mix_i);
          iq.q     <= sat16(acc_q + mix_q);
        end else begin
          cnt   <= cnt + 1'b1;
          acc_i <= acc_i + mix_i;
          acc_q <= acc_q + mix_q;
        end
      end
    end
  end
endmodule
