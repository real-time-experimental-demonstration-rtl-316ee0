// tb_roe_cu: drives the central unit with an IF tone near fs/4 plus noise
// at 150 MSa/s and parses every frame leaving on the 156.25 MHz side.
// Checks the header, that the payload is the reference baseband sequence
// (fs/4 mixing, boxcar decimation by 6, 8-bit segment code) with every
// sample repeated REP times, and that the timestamps of successive frames
// step by the frame period: PAYLOAD_BYTES / (2*REP bytes per sample) x 40 ns
// = 512 ns, i.e. 2199 units of 2^-32 s, which is the 400 Mb/s service rate
// times REP.  Runs at the default 512-byte payload and 20 copies.
module tb_roe_cu;
  import roe_pkg::*;
  import roe_model_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int P = 512, REP = 20, NFR = 30;
  logic adc_clk = 0, eth_clk = 0, adc_rst_n = 0, eth_rst_n = 0;
  logic adc_valid = 0;
  logic signed [15:0] adc_sample = 0;
  logic ts_load = 0;
  logic [31:0] ts_load_value = 0, ts_now, frames_sent;
  logic tx_valid, tx_ready = 1, cdc_overflow;
  beat_t tx_beat;
  int checks = 0, failures = 0;
  always #3.3333 adc_clk = ~adc_clk;
  always #3.2 eth_clk = ~eth_clk;

  roe_cu dut (.*);

  ddc_model ddc = new(6, 2);
  int exp_codes[$];           // expected compressed samples, {I,Q} as 16-bit
  byte fr[$], stream[$];
  int nfr = 0, ovf = 0;
  logic [31:0] last_ts;

  always @(negedge adc_clk) if (cdc_overflow) ovf++;

  always @(posedge eth_clk) if (eth_rst_n && tx_valid && tx_ready) begin
    for (int b = 0; b < 8; b++) if (tx_beat.keep[b]) fr.push_back(tx_beat.data[8*b +: 8]);
    if (tx_beat.last) begin
      logic [31:0] ts;
      checks++;
      if (fr.size() != 18 + P) begin failures++; $display("frame %0d length %0d", nfr, fr.size()); end
      else begin
        checks++;
        if ({fr[0], fr[1], fr[2], fr[3], fr[4], fr[5]} != RU_MAC ||
            {fr[6], fr[7], fr[8], fr[9], fr[10], fr[11]} != CU_MAC ||
            {fr[12], fr[13]} != ROE_ETHERTYPE) begin failures++; $display("header"); end
        ts = {fr[14], fr[15], fr[16], fr[17]};
        if (nfr > 0) begin
          checks++;
          if (32'(ts - last_ts) < 32'd2150 || 32'(ts - last_ts) > 32'd2250) begin
            failures++; $display("frame %0d: timestamp step %0d", nfr, ts - last_ts);
          end
        end
        last_ts = ts;
        for (int n = 18; n < 18 + P; n++) stream.push_back(fr[n]);
      end
      fr.delete();
      nfr++;
    end
  end

  initial begin
    int i, q, ns;
    real ph = 0.0;
    repeat (4) @(posedge adc_clk); adc_rst_n = 1; eth_rst_n = 1;
    while (nfr < NFR) begin
      int x;
      @(negedge adc_clk);
      ph += 2.0 * 3.14159265358979 * 0.2571;
      x = $rtoi(12000.0 * $cos(ph)) + int'($urandom % 401) - 200;
      adc_valid = 1; adc_sample = 16'(x);
      if (ddc.push(x, i, q)) exp_codes.push_back(code8(i) * 256 + code8(q));
    end
    @(negedge adc_clk); adc_valid = 0;
    // payload stream: sample n = 2*REP bytes, every copy identical
    ns = stream.size() / (2 * REP);
    checks++;
    if (ns < NFR * P / (2 * REP) - 2) begin failures++; $display("only %0d samples", ns); end
    for (int s = 0; s < ns; s++) begin
      int e; e = exp_codes[s];
      checks++;
      for (int r = 0; r < REP; r++) begin
        if (stream[s*2*REP + 2*r] != byte'(e >> 8) || stream[s*2*REP + 2*r + 1] != byte'(e)) begin
          failures++; $display("sample %0d copy %0d: %h%h exp %h", s, r, stream[s*2*REP+2*r], stream[s*2*REP+2*r+1], e);
          break;
        end
      end
    end
    checks += 2;
    if (frames_sent != 32'(nfr)) begin failures++; $display("frames_sent %0d", frames_sent); end
    if (ovf != 0) begin failures++; $display("clock-crossing overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
