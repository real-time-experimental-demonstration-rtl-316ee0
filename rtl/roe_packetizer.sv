// roe_packetizer: wraps the replicated I/Q byte stream into timestamped
// Ethernet frames.
//
// Payload beats from the replicator are written into a payload FIFO.  When
// the first beat of every PAYLOAD_BYTES-long frame is written, the current
// timestamp is pushed into a small timestamp FIFO, so each frame carries the
// time at which its first sample reached the Ethernet side.  A frame is sent
// only when its whole payload is stored, so the 10G output never starves in
// the middle of a frame.  Frame layout is given in roe_pkg: 14-byte MAC
// header, 4-byte timestamp, payload.  Because 18 header bytes are not a
// multiple of the 8-byte beat, every payload beat is sent shifted by two
// byte lanes: output beat k (2 <= k <= PW+1) is {payload[k-2][47:0],
// carry[15:0]} where carry holds the top two bytes of the previous beat (the
// low timestamp bytes for k=2), and a last beat carries the final two bytes.
// A frame is PW+3 beats long (PW = PAYLOAD_BYTES/8), sent back to back.
// Interface: valid/ready payload input, valid/ready beat output.
// The timestamp width and resolution and the header+timestamp+payload order
// follow the document; the EtherType, the field offsets and the FIFO sizes
// are this design's choices.
module roe_packetizer
  import roe_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES = 512,
  parameter logic [47:0] DST_MAC       = RU_MAC,
  parameter logic [47:0] SRC_MAC       = CU_MAC,
  parameter int unsigned FIFO_AW       = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] ts_now,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out_beat,
  output logic [31:0] frames_sent
);
  localparam int unsigned PW = PAYLOAD_BYTES / 8;
  localparam int unsigned KW = $clog2(PW + 3);

  // ---------------- input side: payload and timestamp FIFOs
  logic [KW-1:0] in_idx;
  logic          pl_full, pl_empty, ts_full, ts_empty;
  logic [63:0]   pl_head;
  logic [31:0]   ts_head;
  logic [FIFO_AW:0] pl_count;
  logic [2:0]    ts_count;
  logic          pl_pop, ts_pop, in_fire;

  assign in_ready = !pl_full && !ts_full;
  assign in_fire  = in_valid && in_ready;

  sync_fifo #(.WIDTH(64), .AW(FIFO_AW)) u_pl (
    .clk, .rst_n, .wr_en(in_fire), .wr_data(in_data),
    .rd_en(pl_pop), .rd_data(pl_head), .empty(pl_empty), .full(pl_full), .count(pl_count));

  sync_fifo #(.WIDTH(32), .AW(2)) u_ts (
    .clk, .rst_n, .wr_en(in_fire && in_idx == '0), .wr_data(ts_now),
    .rd_en(ts_pop), .rd_data(ts_head), .empty(ts_empty), .full(ts_full), .count(ts_count));

  always_ff @(posedge clk) begin
    if (!rst_n) in_idx <= '0;
    else if (in_fire) in_idx <= (in_idx == KW'(PW - 1)) ? '0 : in_idx + 1'b1;
  end

  // ---------------- output side
  logic          busy;
  logic [KW-1:0] k;            // beat index within the frame
  logic [15:0]   carry;
  logic          out_fire;
  logic [7:0]    hdr [18];

  always_comb begin
    for (int n = 0; n < 6; n++) begin
      hdr[n]     = mac_byte(DST_MAC, n);
      hdr[6 + n] = mac_byte(SRC_MAC, n);
    end
    hdr[12] = ROE_ETHERTYPE[15:8];
    hdr[13] = ROE_ETHERTYPE[7:0];
    hdr[14] = ts_head[31:24];
    hdr[15] = ts_head[23:16];
    hdr[16] = ts_head[15:8];
    hdr[17] = ts_head[7:0];
  end

  always_comb begin
    out_valid     = busy;
    out_beat.keep = 8'hff;
    out_beat.last = 1'b0;
    out_beat.data = '0;
    if (k == KW'(0)) begin
      for (int n = 0; n < 8; n++) out_beat.data[8*n +: 8] = hdr[n];
    end else if (k == KW'(1)) begin
      for (int n = 0; n < 8; n++) out_beat.data[8*n +: 8] = hdr[8 + n];
    end else if (k == KW'(PW + 2)) begin
      out_beat.data = {48'd0, carry};
      out_beat.keep = 8'h03;
      out_beat.last = 1'b1;
    end else begin
      out_beat.data = {pl_head[47:0], carry};
    end
    out_fire = out_valid && out_ready;
    pl_pop   = out_fire && k >= KW'(2) && k <= KW'(PW + 1);
    ts_pop   = out_fire && k == KW'(PW + 2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      k           <= '0;
      carry       <= '0;
      frames_sent <= '0;
    end else if (!busy) begin
      k <= '0;
      if (!ts_empty && pl_count >= (FIFO_AW+1)'(PW)) busy <= 1'b1;
    end else if (out_fire) begin
      if (k == KW'(1))                              carry <= {hdr[17], hdr[16]};
      else if (k >= KW'(2) && k <= KW'(PW + 1))     carry <= pl_head[63:48];
      if (k == KW'(PW + 2)) begin
        busy        <= 1'b0;
        k           <= '0;
        frames_sent <= frames_sent + 1'b1;
      end else begin
        k <= k + 1'b1;
      end
    end
  end

  initial assert (PAYLOAD_BYTES % 8 == 0 && PW + 1 <= 2**FIFO_AW)
    else $error("roe_packetizer: payload must be whole beats and fit the FIFO");
endmodule
