// tb_roe_two_stage: end-to-end run at the default sizes (512-byte payloads,
// 20 copies) but a 3 us playout delay, with two switch stages between the units, the
// most a 5 us budget allows for this payload size in the original set-up.
// The first stage is the top's own switch; a second eth_learning_switch
// follows it (its port 0 fed from the first switch's port 1, its port 1
// feeding the remote unit).  Both switches flood, then learn the remote
// unit's address from one frame sent back through them.  Checks that the
// DAC stream matches the reference chain, that latency is constant and
// within 5 us, and that no frame is late or dropped.
module tb_roe_two_stage;
  import roe_pkg::*;
  import roe_model_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int NP = 4, NFR = 40;
  logic adc_clk = 0, dac_clk, eth_clk = 0, adc_rst_n = 0, dac_rst_n, eth_rst_n = 0;
  logic adc_valid = 0;
  logic signed [15:0] adc_sample = 0;
  logic dac_valid;
  logic signed [15:0] dac_sample;
  logic ts_load = 0;
  logic [31:0] ts_load_value = 0;
  logic cu_tx_valid, cu_tx_ready = 1;
  beat_t cu_tx_beat;
  logic [NP-1:0] sw_rx_valid = 0, sw_tx_valid, sw_tx_ready = '1;
  beat_t sw_rx_beat [NP];
  beat_t sw_tx_beat [NP];
  logic ru_rx_valid;
  beat_t ru_rx_beat;
  logic [31:0] cu_frames_sent, sw_dropped, sw_flooded, sw_unicast, sw_filtered, sw_learned,
               ru_frames_ok, ru_frames_bad, ru_reordered, ru_dropped_full, ru_dropped_late,
               ru_frames_played, ru_underflows, ru_samples_played;
  logic cdc_overflow;
  int checks = 0, failures = 0;

  always #3.3333 adc_clk = ~adc_clk;
  assign dac_clk = adc_clk;          // loop-back: converters on one board
  assign dac_rst_n = adc_rst_n;
  always #3.2 eth_clk = ~eth_clk;

  // 3 us playout: two store-and-forward stages of 512-byte frames need
  // more than the default 2.5 us allows
  roe_fronthaul_top #(.DELAY_TICKS(32'd12885)) dut (.*);

  // second switch stage: stage-1 port 1 -> stage-2 port 0, stage-2 port 1 -> remote unit
  logic [NP-1:0] s2_rx_valid, s2_tx_valid;
  beat_t s2_rx_beat [NP];
  beat_t s2_tx_beat [NP];
  logic [31:0] s2_dropped, s2_flooded, s2_unicast, s2_filtered, s2_learned;
  eth_learning_switch #(.NP(NP)) u_stage2 (
    .clk(eth_clk), .rst_n(eth_rst_n), .rx_valid(s2_rx_valid), .rx_beat(s2_rx_beat),
    .tx_valid(s2_tx_valid), .tx_ready('1), .tx_beat(s2_tx_beat),
    .dropped(s2_dropped), .flooded(s2_flooded), .unicast(s2_unicast),
    .filtered(s2_filtered), .learned(s2_learned));
  logic learn_s2_valid = 0;
  beat_t learn_s2_beat = '0;
  always_comb begin
    s2_rx_valid = '0;
    for (int p = 0; p < NP; p++) s2_rx_beat[p] = '0;
    s2_rx_valid[0] = sw_tx_valid[1]; s2_rx_beat[0] = sw_tx_beat[1];
    s2_rx_valid[1] = learn_s2_valid; s2_rx_beat[1] = learn_s2_beat;
  end
  assign ru_rx_valid = s2_tx_valid[1];
  assign ru_rx_beat  = s2_tx_beat[1];

  // ---------------- central unit -> switch port 0, with frame swaps
  typedef beat_t frame_t[$];
  frame_t linkq[$];
  frame_t cur;
  int nswap = 0, ovf = 0;
  always @(posedge eth_clk) if (eth_rst_n && cu_tx_valid && cu_tx_ready) begin
    cur.push_back(cu_tx_beat);
    if (cu_tx_beat.last) begin linkq.push_back(cur); cur.delete(); end
  end
  always @(negedge adc_clk) if (cdc_overflow) ovf++;

  task automatic put(input int port, input frame_t f);
    foreach (f[k]) begin
      @(negedge eth_clk); sw_rx_valid[port] = 1; sw_rx_beat[port] = f[k];
    end
    @(negedge eth_clk); sw_rx_valid[port] = 0;
  endtask

  initial begin : link
    int k = 0;
    for (int p = 0; p < NP; p++) sw_rx_beat[p] = '0;
    forever begin
      frame_t a, b;
      wait (linkq.size() > 0);
      a = linkq.pop_front();
      if (k % 7 == 3) begin
        wait (linkq.size() > 0);
        b = linkq.pop_front();
        put(0, b); put(0, a); nswap++; k += 2;
      end else begin
        put(0, a); k++;
      end
    end
  end

  // ---------------- reference model and DAC check
  ddc_model ddc = new(6, 2);
  int codes[$];
  realtime t_adc[$];
  int nout = 0;
  realtime lat0 = 0.0;
  int lat_bad = 0;

  always @(posedge dac_clk) if (dac_rst_n && dac_valid) begin
    int s, e;
    s = nout / 6;
    if (s < codes.size()) begin
      e = upmix(expand8(codes[s] >> 8), expand8(codes[s] & 255), nout);
      checks++;
      if (int'(dac_sample) != e) begin failures++; if (failures < 10) $display("dac %0d: %0d exp %0d", nout, dac_sample, e); end
      if (nout % 6 == 0) begin
        realtime l; l = $realtime - t_adc[s];
        if (nout == 0) lat0 = l;
        else if (l - lat0 > 1.0 || lat0 - l > 1.0) lat_bad++;
      end
    end
    nout++;
  end

  // ---------------- learning frame from the remote unit's address on port 1
  initial begin : learn_ru
    frame_t f; byte b[$];
    wait (cu_frames_sent == 5);
    for (int n = 0; n < 6; n++) b.push_back(mac_byte(CU_MAC, n));
    for (int n = 0; n < 6; n++) b.push_back(mac_byte(RU_MAC, n));
    b.push_back(8'h88); b.push_back(8'hb6);
    while (b.size() < 64) b.push_back(8'h00);
    for (int k = 0; k < 8; k++) begin
      beat_t x; x.keep = 8'hff; x.last = (k == 7);
      for (int j = 0; j < 8; j++) x.data[8*j +: 8] = b[8*k + j];
      f.push_back(x);
    end
    fork
      put(1, f);
      foreach (f[k]) begin
        @(negedge eth_clk); learn_s2_valid = 1; learn_s2_beat = f[k];
      end
    join
    @(negedge eth_clk); learn_s2_valid = 0;
  end

  initial begin
    int i, q;
    real ph = 0.0;
    repeat (4) @(posedge adc_clk); adc_rst_n = 1; eth_rst_n = 1;
    while (ru_frames_played < NFR) begin
      int x;
      @(negedge adc_clk);
      ph += 2.0 * 3.14159265358979 * 0.2493;
      x = $rtoi((2000.0 + 9000.0 * (1.0 + $sin(ph / 300.0))) * $cos(ph)) + int'($urandom % 201) - 100;
      adc_valid = 1; adc_sample = 16'(x);
      if (ddc.push(x, i, q)) begin codes.push_back(code8(i) * 256 + code8(q)); t_adc.push_back($realtime); end
    end
    @(negedge adc_clk);
    $display("frames sent %0d, flooded %0d, unicast %0d, learned %0d, reordered %0d, played %0d, DAC samples %0d",
             cu_frames_sent, sw_flooded, sw_unicast, sw_learned, ru_reordered, ru_frames_played, nout);
    $display("ADC-to-DAC latency %0t ps", lat0);
    checks += 11;
    if (sw_flooded == 0)  begin failures++; $display("no flooding"); end
    if (sw_unicast == 0)  begin failures++; $display("no unicast"); end
    if (sw_learned < 2 || s2_learned < 2) begin failures++; $display("learned %0d %0d", sw_learned, s2_learned); end
    if (s2_unicast == 0 || s2_flooded == 0 || s2_dropped != 0) begin failures++; $display("stage 2: unicast %0d flooded %0d dropped %0d", s2_unicast, s2_flooded, s2_dropped); end
    if (ru_reordered == 0 || ru_reordered != 32'(nswap) && ru_reordered + 1 != 32'(nswap)) begin
      failures++; $display("reordered %0d for %0d swaps", ru_reordered, nswap);
    end
    if (ru_dropped_full != 0 || ru_dropped_late != 0 || sw_dropped != 0 || ovf != 0) begin
      failures++; $display("drops: full %0d late %0d switch %0d cdc %0d", ru_dropped_full, ru_dropped_late, sw_dropped, ovf);
    end
    if (ru_underflows != 0) begin failures++; $display("underflows %0d", ru_underflows); end
    if (ru_frames_bad != 0) begin failures++; $display("bad frames %0d", ru_frames_bad); end
    if (lat_bad != 0)       begin failures++; $display("latency varied %0d times", lat_bad); end
    if (lat0 < 2500.0 || lat0 > 5000.0) begin failures++; $display("latency out of range"); end
    if (nout < NFR * 12 * 6) begin failures++; $display("only %0d DAC samples", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #500us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
