// roe_cu: central-unit datapath, from ADC samples to timestamped RoE frames.
//
// adc_clk domain: ddc_fs4 brings the real IF samples to complex baseband and
// reduces the rate by DEC; iq_compressor turns each 16+16-bit sample into an
// 8+8-bit word.  An async_fifo carries the words to the 10G Ethernet clock
// domain, where iq_replicator repeats each one REP times into 64-bit beats
// and roe_packetizer cuts the stream into PAYLOAD_BYTES payloads, each
// behind a MAC header and the 4-byte timestamp from timestamp_counter.  The
// frames leave on tx_* towards the 10G MAC/SFP+.
// Rates at the defaults: 150 MSa/s ADC, 25 MSa/s x 16 bit = 400 Mb/s per
// service, x20 copies = 8 Gb/s of payload, 8.66 Gb/s with headers and the
// MAC's preamble, FCS and gap, within the 10 Gb/s line.
// The chain DDC - compression - packetizer with timestamp follows the
// document; the clocking and the sizes not stated there are this design's.
module roe_cu
  import roe_pkg::*;
#(
  parameter int unsigned     PAYLOAD_BYTES = 512,
  parameter int unsigned     REP           = 20,
  parameter int unsigned     DEC           = 6,
  parameter longint unsigned ETH_CLK_HZ    = 156_250_000
) (
  input  logic               adc_clk,
  input  logic               adc_rst_n,
  input  logic               adc_valid,
  input  logic signed [15:0] adc_sample,
  input  logic               eth_clk,
  input  logic               eth_rst_n,
  input  logic               ts_load,
  input  logic [31:0]        ts_load_value,
  output logic [31:0]        ts_now,
  output logic               tx_valid,
  input  logic               tx_ready,
  output beat_t              tx_beat,
  output logic [31:0]        frames_sent,
  output logic               cdc_overflow
);
  iq16_t bb;
  logic  bb_valid;
  ciq_t  cw;
  logic  cw_valid;

  ddc_fs4 #(.DEC(DEC)) u_ddc (
    .clk(adc_clk), .rst_n(adc_rst_n), .adc_valid, .adc_sample,
    .iq_valid(bb_valid), .iq(bb));

  iq_compressor u_comp (
    .clk(adc_clk), .rst_n(adc_rst_n), .in_valid(bb_valid), .in_iq(bb),
    .out_valid(cw_valid), .out_ciq(cw));

  logic        q_empty, q_pop, q_full, q_underflow;
  logic [16:0] q_level;
  logic [15:0] q_data;

  async_fifo #(.WIDTH(16), .AW(4)) u_cdc (
    .wr_clk(adc_clk), .wr_rst_n(adc_rst_n), .wr_en(cw_valid), .wr_data(cw),
    .wr_full(q_full), .wr_overflow(cdc_overflow),
    .rd_clk(eth_clk), .rd_rst_n(eth_rst_n), .rd_en(q_pop), .rd_data(q_data),
    .rd_empty(q_empty), .rd_level(q_level[4:0]), .rd_underflow(q_underflow));
  assign q_level[16:5] = '0;

  timestamp_counter #(.CLK_HZ(ETH_CLK_HZ)) u_ts (
    .clk(eth_clk), .rst_n(eth_rst_n), .load(ts_load), .load_value(ts_load_value), .ts(ts_now));

  logic        r_valid, r_ready;
  logic [63:0] r_data;

  iq_replicator #(.REP(REP)) u_rep (
    .clk(eth_clk), .rst_n(eth_rst_n), .src_empty(q_empty), .src_data(q_data),
    .src_pop(q_pop), .out_valid(r_valid), .out_ready(r_ready), .out_data(r_data));

  roe_packetizer #(.PAYLOAD_BYTES(PAYLOAD_BYTES)) u_pkt (
    .clk(eth_clk), .rst_n(eth_rst_n), .ts_now,
    .in_valid(r_valid), .in_ready(r_ready), .in_data(r_data),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_beat(tx_beat), .frames_sent);
endmodule
