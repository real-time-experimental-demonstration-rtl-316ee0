// tb_roe_latency: latency of the datapath itself, in the spirit of a
// loop-back latency table: four copies of the link run side by side with
// the playout delay set to zero, so each frame is played as soon as it is
// complete.  Two payload sizes (64 bytes x10 copies, 512 bytes x20 copies)
// each go once straight from the central to the remote unit (internal
// loop-back) and once through the learning switch.  Reported: ADC-to-DAC
// latency of the first sample.  Checked: the 512-byte payload takes longer
// than the 64-byte one (the payload fills at the service rate before the
// frame leaves), the switch adds about one frame time of store-and-forward
// delay (the frame's beats plus at most 30 cycles), and every link then
// plays continuously without underflow and with the reference samples.
module tb_roe_latency;
  import roe_pkg::*;
  import roe_model_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int NP = 4;
  logic adc_clk = 0, eth_clk = 0, adc_rst_n = 0, eth_rst_n = 0;
  logic adc_valid = 0;
  logic signed [15:0] adc_sample = 0;
  int checks = 0, failures = 0;
  always #3.3333 adc_clk = ~adc_clk;
  always #3.2 eth_clk = ~eth_clk;

  ddc_model ddc = new(6, 2);
  int codes[$];
  realtime t_adc[$];
  realtime lat [4];
  int nout [4];
  int bad [4];
  logic [31:0] unf [4];
  logic [31:0] played [4];

  for (genvar g = 0; g < 4; g++) begin : g_link
    localparam int P = (g < 2) ? 64 : 512;
    localparam int R = (g < 2) ? 10 : 20;
    localparam bit SW = (g % 2) == 1;
    logic dac_valid, cu_tx_valid, ru_rx_valid, cdc_overflow;
    logic signed [15:0] dac_sample;
    beat_t cu_tx_beat, ru_rx_beat;
    logic [NP-1:0] sw_rx_valid, sw_tx_valid;
    beat_t sw_rx_beat [NP];
    beat_t sw_tx_beat [NP];
    logic [31:0] c_sent, s_drop, s_fl, s_uc, s_fi, s_le, r_ok, r_bad, r_re, r_df, r_dl, r_pl, r_un, r_sp;

    roe_fronthaul_top #(.PAYLOAD_BYTES(P), .REP(R), .DELAY_TICKS(32'd0)) dut (
      .adc_clk, .adc_rst_n, .adc_valid, .adc_sample, .dac_clk(adc_clk), .dac_rst_n(adc_rst_n),
      .dac_valid, .dac_sample, .eth_clk, .eth_rst_n, .ts_load(1'b0), .ts_load_value(32'd0),
      .cu_tx_valid, .cu_tx_ready(1'b1), .cu_tx_beat,
      .sw_rx_valid, .sw_rx_beat, .sw_tx_valid, .sw_tx_ready('1), .sw_tx_beat,
      .ru_rx_valid, .ru_rx_beat,
      .cu_frames_sent(c_sent), .sw_dropped(s_drop), .sw_flooded(s_fl), .sw_unicast(s_uc),
      .sw_filtered(s_fi), .sw_learned(s_le), .ru_frames_ok(r_ok), .ru_frames_bad(r_bad),
      .ru_reordered(r_re), .ru_dropped_full(r_df), .ru_dropped_late(r_dl), .ru_frames_played(r_pl),
      .ru_underflows(r_un), .ru_samples_played(r_sp), .cdc_overflow);

    always_comb begin
      for (int p = 0; p < NP; p++) sw_rx_beat[p] = '0;
      sw_rx_valid = '0;
      if (SW) begin
        sw_rx_valid[0] = cu_tx_valid; sw_rx_beat[0] = cu_tx_beat;
        ru_rx_valid = sw_tx_valid[1]; ru_rx_beat = sw_tx_beat[1];
      end else begin
        ru_rx_valid = cu_tx_valid; ru_rx_beat = cu_tx_beat;
      end
    end
    assign unf[g] = r_un;
    assign played[g] = r_pl;

    initial begin nout[g] = 0; bad[g] = 0; end
    always @(posedge adc_clk) if (adc_rst_n && dac_valid) begin
      int s, e;
      s = nout[g] / 6;
      if (nout[g] == 0) lat[g] = $realtime - t_adc[0];
      e = upmix(expand8(codes[s] >> 8), expand8(codes[s] & 255), nout[g]);
      if (int'(dac_sample) != e) bad[g]++;
      nout[g]++;
    end
  end

  initial begin
    int i, q;
    real ph = 0.0;
    repeat (4) @(posedge adc_clk); adc_rst_n = 1; eth_rst_n = 1;
    repeat (3000) begin
      int x;
      @(negedge adc_clk);
      ph += 2.0 * 3.14159265358979 * 0.2493;
      x = $rtoi(8000.0 * $cos(ph)) + int'($urandom % 201) - 100;
      adc_valid = 1; adc_sample = 16'(x);
      if (ddc.push(x, i, q)) begin codes.push_back(code8(i) * 256 + code8(q)); t_adc.push_back($realtime); end
    end
    for (int g = 0; g < 4; g++)
      $display("payload %0d B, %s: ADC-to-DAC latency %0.1f ns, frames played %0d, DAC samples %0d",
               g < 2 ? 64 : 512, g % 2 ? "via switch" : "internal loop-back", lat[g], played[g], nout[g]);
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (unf[g] != 0 || bad[g] != 0 || nout[g] < 2000) begin
        failures++; $display("link %0d: %0d underflows, %0d wrong samples, %0d samples", g, unf[g], bad[g], nout[g]);
      end
    end
    checks += 3;
    if (!(lat[2] > lat[0])) begin failures++; $display("512-byte payload not slower than 64-byte"); end
    // switch: store-and-forward of PW+3 beats of 6.4 ns, plus up to 30 cycles
    if (lat[1] - lat[0] < 11 * 6.4 || lat[1] - lat[0] > 11 * 6.4 + 30 * 6.4) begin
      failures++; $display("64 B switch delay %0.1f ns", lat[1] - lat[0]);
    end
    if (lat[3] - lat[2] < 67 * 6.4 || lat[3] - lat[2] > 67 * 6.4 + 30 * 6.4) begin
      failures++; $display("512 B switch delay %0.1f ns", lat[3] - lat[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
