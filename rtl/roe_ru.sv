// roe_ru: remote-unit datapath, from received RoE frames to DAC samples.
//
// eth_clk domain: roe_depacketizer checks each frame and splits off its
// timestamp and payload; reorder_buffer stores the payloads and plays them
// in timestamp order, each DELAY_TICKS (2^-32 s units) after its timestamp,
// against the local timestamp_counter, which must run in step with the
// central unit's; iq_dereplicator keeps one copy of every replicated
// sample and iq_decompressor expands it to 16+16 bits.  An async_fifo
// crosses to the DAC clock, where duc_fs4 interpolates and mixes the
// samples back up to the digital IF for the DAC.
// The order parse - reorder/synchronise - recover IF follows the document;
// the playout rule and the sizes are this design's choices.
module roe_ru
  import roe_pkg::*;
#(
  parameter int unsigned     PAYLOAD_BYTES = 512,
  parameter int unsigned     REP           = 20,
  parameter int unsigned     INTERP        = 6,
  parameter int unsigned     NSLOT         = 4096 / PAYLOAD_BYTES,  // 4 KiB of payload
  parameter logic [31:0]     DELAY_TICKS   = 32'd10737,
  parameter int unsigned     START_DELAY   = 96,
  parameter longint unsigned ETH_CLK_HZ    = 156_250_000
) (
  input  logic               eth_clk,
  input  logic               eth_rst_n,
  input  logic               ts_load,
  input  logic [31:0]        ts_load_value,
  output logic [31:0]        ts_now,
  input  logic               rx_valid,
  input  beat_t              rx_beat,
  input  logic               dac_clk,
  input  logic               dac_rst_n,
  output logic               dac_valid,
  output logic signed [15:0] dac_sample,
  output logic [31:0]        frames_ok,
  output logic [31:0]        frames_bad,
  output logic [31:0]        reordered,
  output logic [31:0]        dropped_full,
  output logic [31:0]        dropped_late,
  output logic [31:0]        frames_played,
  output logic [31:0]        underflows,
  output logic [31:0]        samples_played,
  output logic               cdc_overflow
);
  localparam int unsigned IW = $clog2(PAYLOAD_BYTES / 8);

  timestamp_counter #(.CLK_HZ(ETH_CLK_HZ)) u_ts (
    .clk(eth_clk), .rst_n(eth_rst_n), .load(ts_load), .load_value(ts_load_value), .ts(ts_now));

  logic          pl_valid, frame_done, frame_ok;
  logic [63:0]   pl_data;
  logic [IW-1:0] pl_idx;
  logic [31:0]   frame_ts;

  roe_depacketizer #(.PAYLOAD_BYTES(PAYLOAD_BYTES)) u_depkt (
    .clk(eth_clk), .rst_n(eth_rst_n), .in_valid(rx_valid), .in_beat(rx_beat),
    .pl_valid, .pl_data, .pl_idx, .frame_done, .frame_ok, .frame_ts, .frames_ok, .frames_bad);

  logic        o_valid, o_last;
  logic [63:0] o_data;

  reorder_buffer #(.PAYLOAD_BYTES(PAYLOAD_BYTES), .NSLOT(NSLOT), .DELAY_TICKS(DELAY_TICKS)) u_rob (
    .clk(eth_clk), .rst_n(eth_rst_n), .ts_now, .pl_valid, .pl_data, .pl_idx,
    .frame_done, .frame_ok, .frame_ts, .out_valid(o_valid), .out_data(o_data), .out_last(o_last),
    .reordered, .dropped_full, .dropped_late, .frames_played);

  logic  c_valid, x_valid;
  ciq_t  c_word;
  iq16_t x_iq;

  iq_dereplicator #(.REP(REP)) u_derep (
    .clk(eth_clk), .rst_n(eth_rst_n), .in_valid(o_valid), .in_data(o_data),
    .out_valid(c_valid), .out_ciq(c_word));

  iq_decompressor u_decomp (
    .clk(eth_clk), .rst_n(eth_rst_n), .in_valid(c_valid), .in_ciq(c_word),
    .out_valid(x_valid), .out_iq(x_iq));

  logic        f_empty, f_pop, f_full, f_underflow;
  logic [5:0]  f_level;
  logic [31:0] f_data;

  async_fifo #(.WIDTH(32), .AW(5)) u_cdc (
    .wr_clk(eth_clk), .wr_rst_n(eth_rst_n), .wr_en(x_valid), .wr_data(x_iq),
    .wr_full(f_full), .wr_overflow(cdc_overflow),
    .rd_clk(dac_clk), .rd_rst_n(dac_rst_n), .rd_en(f_pop), .rd_data(f_data),
    .rd_empty(f_empty), .rd_level(f_level), .rd_underflow(f_underflow));

  duc_fs4 #(.INTERP(INTERP), .START_DELAY(START_DELAY)) u_duc (
    .clk(dac_clk), .rst_n(dac_rst_n), .src_empty(f_empty), .src_data(f_data),
    .src_pop(f_pop), .dac_valid, .dac_sample, .underflows, .samples_played);
endmodule
