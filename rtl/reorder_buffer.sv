// reorder_buffer: puts received frames back in timestamp order and plays
// them out at a fixed delay after their timestamp.
//
// The buffer has NSLOT frame slots of PW 64-bit words; by default 4 KiB of
// payload, enough to hold every frame for the whole playout delay at both
// payload sizes (5 frames of 512 bytes or 20 of 64 bytes per 2.5 us).  An arriving frame
// is written into a free slot (word by word at pl_idx); when the parser
// reports it complete and valid, the slot is marked full and tagged with
// the frame's timestamp.  Frames that find no free slot are dropped
// (dropped_full), and so are frames whose timestamp is not after that of
// the last frame already played (dropped_late), since order can no longer
// be restored for them.  The read side picks the full slot with the
// earliest timestamp (wrap-around compare) and starts playing it once the
// local time has reached timestamp + DELAY_TICKS, one word per cycle.  So
// frames overtaken in the network still leave in order, and every frame
// leaves a fixed time after it was stamped at the central unit, which also
// removes the variable delay of the network (synchronisation).
// reordered counts frames that arrived with an earlier timestamp than a
// frame committed before them.
// Interface: write port from roe_depacketizer, time input, output words
// with out_valid/out_last (no back-pressure; the consumer keeps pace).
// Reordering and synchronisation by timestamp follow the document; the
// slot structure, the drop rules and the delay are this design's choices.
module reorder_buffer
  import roe_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES = 512,
  parameter int unsigned NSLOT         = 4096 / PAYLOAD_BYTES,  // 4 KiB of payload
  parameter logic [31:0] DELAY_TICKS   = 32'd10737     // 2.5 us in 2^-32 s units
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] ts_now,
  input  logic        pl_valid,
  input  logic [63:0] pl_data,
  input  logic [$clog2(PAYLOAD_BYTES/8)-1:0] pl_idx,
  input  logic        frame_done,
  input  logic        frame_ok,
  input  logic [31:0] frame_ts,
  output logic        out_valid,
  output logic [63:0] out_data,
  output logic        out_last,
  output logic [31:0] reordered,
  output logic [31:0] dropped_full,
  output logic [31:0] dropped_late,
  output logic [31:0] frames_played
);
  localparam int unsigned PW = PAYLOAD_BYTES / 8;
  localparam int unsigned IW = $clog2(PW);
  localparam int unsigned SW = $clog2(NSLOT);

  logic [63:0]       mem [NSLOT * PW];
  logic [NSLOT-1:0]  full;
  logic [31:0]       slot_ts [NSLOT];

  // ---------------- write side
  logic          wr_active, wr_drop;
  logic [SW-1:0] wslot;
  logic          free_found;
  logic [SW-1:0] free_idx;
  logic          have_commit, have_played;
  logic [31:0]   last_commit_ts, last_played_ts;

  // read-side state declared here so the free search can skip the slot being played
  logic          rd_busy;
  logic [SW-1:0] rslot;
  logic [IW-1:0] ridx;

  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    for (int s = NSLOT - 1; s >= 0; s--)
      if (!full[s] && !(rd_busy && rslot == SW'(s))) begin
        free_found = 1'b1;
        free_idx   = SW'(s);
      end
  end

  always_ff @(posedge clk) begin
    if (pl_valid && (wr_active ? !wr_drop : free_found))
      mem[{(wr_active ? wslot : free_idx), pl_idx}] <= pl_data;
  end

  // ---------------- read side: earliest full slot
  logic          cand_found;
  logic [SW-1:0] cand;
  logic          due;

  always_comb begin
    cand_found = 1'b0;
    cand       = '0;
    for (int s = 0; s < NSLOT; s++)
      if (full[s] && !(rd_busy && rslot == SW'(s)) &&
          (!cand_found || ts_before(slot_ts[s], slot_ts[cand]))) begin
        cand_found = 1'b1;
        cand       = SW'(s);
      end
    due = cand_found && !ts_before(ts_now, slot_ts[cand] + DELAY_TICKS);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full           <= '0;
      wr_active      <= 1'b0;
      wr_drop        <= 1'b0;
      wslot          <= '0;
      have_commit    <= 1'b0;
      have_played    <= 1'b0;
      last_commit_ts <= '0;
      last_played_ts <= '0;
      rd_busy        <= 1'b0;
      rslot          <= '0;
      ridx           <= '0;
      out_valid      <= 1'b0;
      out_data       <= '0;
      out_last       <= 1'b0;
      reordered      <= '0;
      dropped_full   <= '0;
      dropped_late   <= '0;
      frames_played  <= '0;
      for (int s = 0; s < NSLOT; s++) slot_ts[s] <= '0;
    end else begin
      // write side
      if (pl_valid && !wr_active) begin
        wr_active <= 1'b1;
        wr_drop   <= !free_found;
        wslot     <= free_idx;
      end
      if (frame_done) begin
        wr_active <= 1'b0;
        wr_drop   <= 1'b0;
        if (frame_ok && wr_active) begin
          if (wr_drop) begin
            dropped_full <= dropped_full + 1'b1;
          end else if (have_played && !ts_before(last_played_ts, frame_ts)) begin
            dropped_late <= dropped_late + 1'b1;
          end else begin
            full[wslot]    <= 1'b1;
            slot_ts[wslot] <= frame_ts;
            have_commit    <= 1'b1;
            last_commit_ts <= frame_ts;
            if (have_commit && ts_before(frame_ts, last_commit_ts))
              reordered <= reordered + 1'b1;
          end
        end
      end

      // read side
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (rd_busy) begin
        out_valid <= 1'b1;
        out_data  <= mem[{rslot, ridx}];
        if (ridx == IW'(PW - 1)) begin
          out_last      <= 1'b1;
          rd_busy       <= 1'b0;
          full[rslot]   <= 1'b0;
          frames_played <= frames_played + 1'b1;
        end else begin
          ridx <= ridx + 1'b1;
        end
      end else if (due) begin
        rd_busy        <= 1'b1;
        rslot          <= cand;
        ridx           <= '0;
        have_played    <= 1'b1;
        last_played_ts <= slot_ts[cand];
      end
    end
  end

  initial assert (PW >= 2 && NSLOT >= 2 && (PW & (PW - 1)) == 0)
    else $error("reorder_buffer: PW must be a power of two of at least 2");
endmodule
