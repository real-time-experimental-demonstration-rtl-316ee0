// tb_roe_ru: builds RoE frames in the testbench from random 8-bit I/Q
// samples (each repeated REP times), stamps them with the remote unit's own
// time and delivers them with a random network delay and with neighbouring
// frames swapped.  The DAC stream must be the reference up-conversion of the
// expanded samples in the original order, without gaps, and must start
// DELAY_TICKS after the first frame's timestamp (plus the fixed start-up
// delay of the up-converter and the pipeline).  Also checks the reorder
// counter and that a frame for another station is rejected.
module tb_roe_ru;
  import roe_pkg::*;
  import roe_model_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int P = 512, REP = 20, NFR = 24;
  localparam int SPF_X10 = P * 10 / (2 * REP);           // samples per frame x10 (128)
  localparam logic [31:0] DELAY = 32'd10737;             // 2.5 us
  logic eth_clk = 0, dac_clk = 0, eth_rst_n = 0, dac_rst_n = 0;
  logic ts_load = 0;
  logic [31:0] ts_load_value = 0, ts_now;
  logic rx_valid = 0;
  beat_t rx_beat = '0;
  logic dac_valid, cdc_overflow;
  logic signed [15:0] dac_sample;
  logic [31:0] frames_ok, frames_bad, reordered, dropped_full, dropped_late, frames_played,
               underflows, samples_played;
  int checks = 0, failures = 0;
  always #3.2 eth_clk = ~eth_clk;
  always #3.3333 dac_clk = ~dac_clk;

  roe_ru dut (.*);

  int codes[$];
  byte stream[$];
  int nout = 0;
  realtime t_first_frame_ts, t_first_dac;

  always @(posedge dac_clk) if (dac_rst_n && dac_valid) begin
    int s, e;
    if (nout == 0) t_first_dac = $realtime;
    s = nout / 6;
    if (s < codes.size()) begin
      e = upmix(expand8(codes[s] >> 8), expand8(codes[s] & 255), nout);
      checks++;
      if (int'(dac_sample) != e) begin failures++; if (failures < 10) $display("dac %0d: %0d exp %0d", nout, dac_sample, e); end
    end
    nout++;
  end

  task automatic send(input logic [47:0] dst, input logic [31:0] ts, input int first_byte);
    byte f[$];
    for (int n = 0; n < 6; n++) f.push_back(mac_byte(dst, n));
    for (int n = 0; n < 6; n++) f.push_back(mac_byte(CU_MAC, n));
    f.push_back(ROE_ETHERTYPE[15:8]); f.push_back(ROE_ETHERTYPE[7:0]);
    f.push_back(ts[31:24]); f.push_back(ts[23:16]); f.push_back(ts[15:8]); f.push_back(ts[7:0]);
    for (int n = 0; n < P; n++) f.push_back(stream[first_byte + n]);
    for (int k = 0; k < f.size(); k += 8) begin
      @(negedge eth_clk);
      rx_valid = 1; rx_beat = '0;
      for (int b = 0; b < 8; b++) if (k + b < f.size()) begin rx_beat.data[8*b +: 8] = f[k+b]; rx_beat.keep[b] = 1; end
      rx_beat.last = (k + 8 >= f.size());
    end
    @(negedge eth_clk); rx_valid = 0;
  endtask

  initial begin
    logic [31:0] ts0;
    int order[NFR];
    int nswap = 0;
    for (int s = 0; s < NFR * SPF_X10 / 10 + 2; s++) begin
      int c; c = int'($urandom & 16'hffff); codes.push_back(c);
      for (int r = 0; r < REP; r++) begin stream.push_back(byte'(c >> 8)); stream.push_back(byte'(c)); end
    end
    for (int k = 0; k < NFR; k++) order[k] = k;
    for (int k = 2; k + 1 < NFR; k += 5) begin order[k] = k + 1; order[k + 1] = k; nswap++; end
    repeat (4) @(posedge eth_clk); eth_rst_n = 1; dac_rst_n = 1;
    repeat (10) @(negedge eth_clk);
    ts0 = ts_now;
    t_first_frame_ts = $realtime;
    send(48'h02_00_00_00_00_77, ts0, 0);            // not for this unit
    for (int j = 0; j < NFR; j++) begin
      int k;
      k = order[j];
      // frame k holds the samples stamped at ts0 + k * 512 ns
      wait (32'(ts_now - ts0) >= 32'(2199 * j + 600 + ($urandom % 400)));
      send(RU_MAC, ts0 + 32'($rtoi(2199.023 * k)), k * P);
    end
    repeat (3000) @(negedge eth_clk);
    checks += 6;
    if (frames_ok != NFR || frames_bad != 1) begin failures++; $display("frames ok %0d bad %0d", frames_ok, frames_bad); end
    if (reordered != 32'(nswap)) begin failures++; $display("reordered %0d", reordered); end
    if (dropped_full != 0 || dropped_late != 0) begin failures++; $display("drops %0d %0d", dropped_full, dropped_late); end
    if (frames_played != NFR) begin failures++; $display("played %0d", frames_played); end
    if (samples_played < (NFR * SPF_X10 / 10) - 2) begin failures++; $display("samples %0d", samples_played); end
    if (underflows != 1 || cdc_overflow) begin failures++; $display("underflows %0d (only the final one expected)", underflows); end
    // playout starts 2.5 us after the timestamp, plus start-up and pipeline (< 1 us)
    checks++;
    if (t_first_dac - t_first_frame_ts < 2500.0 || t_first_dac - t_first_frame_ts > 3500.0) begin
      failures++; $display("first DAC sample %0t after its timestamp", t_first_dac - t_first_frame_ts);
    end
    $display("playout latency %0t", t_first_dac - t_first_frame_ts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #300us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
