// roe_depacketizer: parses RoE frames arriving at the remote unit.
//
// Frames come in as 64-bit beats from the 10G receive path, which cannot be
// stalled.  Beat 0 holds the destination MAC, beat 1 the EtherType and the
// upper timestamp bytes, beat 2 the lower timestamp bytes and the first six
// payload bytes.  Since the payload starts two lanes into beat 2, each
// payload beat is rebuilt from two received beats: payload[k-3] =
// {beat[k][15:0], beat[k-1][63:16]} for k >= 3, emitted as pl_valid with
// its index pl_idx.  At the end of every frame frame_done pulses together
// with frame_ts and frame_ok; frame_ok is high only if the destination MAC
// is MY_MAC, the EtherType is the RoE one and the frame has exactly the
// expected length (PW+3 beats, two bytes in the last).  The consumer must
// discard the payload of a frame that ends with frame_ok low.
// Counters: frames accepted and frames rejected.
// Frame format and checks are this design's choices (see roe_pkg).
module roe_depacketizer
  import roe_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES = 512,
  parameter logic [47:0] MY_MAC        = RU_MAC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  beat_t       in_beat,
  output logic        pl_valid,
  output logic [63:0] pl_data,
  output logic [$clog2(PAYLOAD_BYTES/8)-1:0] pl_idx,
  output logic        frame_done,
  output logic        frame_ok,
  output logic [31:0] frame_ts,
  output logic [31:0] frames_ok,
  output logic [31:0] frames_bad
);
  localparam int unsigned PW = PAYLOAD_BYTES / 8;
  localparam int unsigned IW = $clog2(PW);
  localparam int unsigned KW = 16;   // beat counter, saturates on long frames

  logic [KW-1:0] k;
  logic [63:0]   prev;
  logic          hdr_ok;
  logic [47:0]   dst;
  logic [15:0]   etype;
  logic          len_ok;

  always_comb begin
    for (int n = 0; n < 6; n++) dst[8*(5-n) +: 8] = in_beat.data[8*n +: 8];
    etype  = {in_beat.data[39:32], in_beat.data[47:40]};
    len_ok = (k == KW'(PW + 2)) && (in_beat.keep == 8'h03);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k          <= '0;
      prev       <= '0;
      hdr_ok     <= 1'b0;
      pl_valid   <= 1'b0;
      pl_data    <= '0;
      pl_idx     <= '0;
      frame_done <= 1'b0;
      frame_ok   <= 1'b0;
      frame_ts   <= '0;
      frames_ok  <= '0;
      frames_bad <= '0;
    end else begin
      pl_valid   <= 1'b0;
      frame_done <= 1'b0;
      if (in_valid) begin
        prev <= in_beat.data;
        if (k != '1) k <= k + 1'b1;
        unique case (k)
          KW'(0): hdr_ok <= (dst == MY_MAC);
          KW'(1): begin
            hdr_ok          <= hdr_ok && (etype == ROE_ETHERTYPE);
            frame_ts[31:24] <= in_beat.data[55:48];
            frame_ts[23:16] <= in_beat.data[63:56];
          end
          KW'(2): begin
            frame_ts[15:8] <= in_beat.data[7:0];
            frame_ts[7:0]  <= in_beat.data[15:8];
          end
          default: ;
        endcase
        if (k >= KW'(3) && k <= KW'(PW + 2)) begin
          pl_valid <= 1'b1;
          pl_data  <= {in_beat.data[15:0], prev[63:16]};
          pl_idx   <= IW'(k - KW'(3));
        end
        if (in_beat.last) begin
          k          <= '0;
          frame_done <= 1'b1;
          frame_ok   <= hdr_ok && len_ok;
          if (hdr_ok && len_ok) frames_ok  <= frames_ok + 1'b1;
          else                  frames_bad <= frames_bad + 1'b1;
        end
      end
    end
  end
endmodule
