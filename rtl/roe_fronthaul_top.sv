// roe_fronthaul_top: the switched radio-over-Ethernet fronthaul link.
//
// A central unit (roe_cu) digitises nothing itself: it takes the ADC's IF
// samples, down-converts, compresses, replicates and packs them into
// timestamped Ethernet frames.  A store-and-forward learning switch
// (eth_learning_switch, NP ports) carries them to the remote unit (roe_ru),
// which reorders and plays them out at a fixed delay after their timestamp
// and rebuilds the IF samples for the DAC.
// The 10G MACs, SFP+ transceivers and fibres between the units and the
// switch are not part of this RTL, so each link end is a port: the test
// environment (or the MAC) connects cu_tx_* to a switch receive port and a
// switch transmit port to ru_rx_*.  The two timestamp counters run on the
// same Ethernet clock and are started together by reset (or by ts_load),
// as in a loop-back set-up where both ends sit on one board.
module roe_fronthaul_top
  import roe_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES = 512,
  parameter int unsigned REP           = 20,
  parameter int unsigned NP            = 4,
  parameter int unsigned NSLOT         = 4096 / PAYLOAD_BYTES,  // 4 KiB of payload
  parameter logic [31:0] DELAY_TICKS   = 32'd10737,
  parameter int unsigned START_DELAY   = 96
) (
  input  logic               adc_clk,
  input  logic               adc_rst_n,
  input  logic               adc_valid,
  input  logic signed [15:0] adc_sample,
  input  logic               dac_clk,
  input  logic               dac_rst_n,
  output logic               dac_valid,
  output logic signed [15:0] dac_sample,
  input  logic               eth_clk,
  input  logic               eth_rst_n,
  input  logic               ts_load,
  input  logic [31:0]        ts_load_value,
  // central unit towards its 10G MAC
  output logic               cu_tx_valid,
  input  logic               cu_tx_ready,
  output beat_t              cu_tx_beat,
  // switch ports
  input  logic [NP-1:0]      sw_rx_valid,
  input  beat_t              sw_rx_beat [NP],
  output logic [NP-1:0]      sw_tx_valid,
  input  logic [NP-1:0]      sw_tx_ready,
  output beat_t              sw_tx_beat [NP],
  // remote unit from its 10G MAC
  input  logic               ru_rx_valid,
  input  beat_t              ru_rx_beat,
  // status
  output logic [31:0]        cu_frames_sent,
  output logic [31:0]        sw_dropped,
  output logic [31:0]        sw_flooded,
  output logic [31:0]        sw_unicast,
  output logic [31:0]        sw_filtered,
  output logic [31:0]        sw_learned,
  output logic [31:0]        ru_frames_ok,
  output logic [31:0]        ru_frames_bad,
  output logic [31:0]        ru_reordered,
  output logic [31:0]        ru_dropped_full,
  output logic [31:0]        ru_dropped_late,
  output logic [31:0]        ru_frames_played,
  output logic [31:0]        ru_underflows,
  output logic [31:0]        ru_samples_played,
  output logic               cdc_overflow
);
  logic [31:0] cu_ts, ru_ts;
  logic        cu_ovf, ru_ovf;

  roe_cu #(.PAYLOAD_BYTES(PAYLOAD_BYTES), .REP(REP)) u_cu (
    .adc_clk, .adc_rst_n, .adc_valid, .adc_sample,
    .eth_clk, .eth_rst_n, .ts_load, .ts_load_value, .ts_now(cu_ts),
    .tx_valid(cu_tx_valid), .tx_ready(cu_tx_ready), .tx_beat(cu_tx_beat),
    .frames_sent(cu_frames_sent), .cdc_overflow(cu_ovf));

  eth_learning_switch #(.NP(NP)) u_sw (
    .clk(eth_clk), .rst_n(eth_rst_n),
    .rx_valid(sw_rx_valid), .rx_beat(sw_rx_beat),
    .tx_valid(sw_tx_valid), .tx_ready(sw_tx_ready), .tx_beat(sw_tx_beat),
    .dropped(sw_dropped), .flooded(sw_flooded), .unicast(sw_unicast),
    .filtered(sw_filtered), .learned(sw_learned));

  roe_ru #(.PAYLOAD_BYTES(PAYLOAD_BYTES), .REP(REP), .NSLOT(NSLOT),
           .DELAY_TICKS(DELAY_TICKS), .START_DELAY(START_DELAY)) u_ru (
    .eth_clk, .eth_rst_n, .ts_load, .ts_load_value, .ts_now(ru_ts),
    .rx_valid(ru_rx_valid), .rx_beat(ru_rx_beat),
    .dac_clk, .dac_rst_n, .dac_valid, .dac_sample,
    .frames_ok(ru_frames_ok), .frames_bad(ru_frames_bad), .reordered(ru_reordered),
    .dropped_full(ru_dropped_full), .dropped_late(ru_dropped_late),
    .frames_played(ru_frames_played), .underflows(ru_underflows),
    .samples_played(ru_samples_played), .cdc_overflow(ru_ovf));

  assign cdc_overflow = cu_ovf || ru_ovf;
endmodule
