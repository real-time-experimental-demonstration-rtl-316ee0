// eth_learning_switch: store-and-forward Ethernet learning switch with NP
// ports, standing for the switch stage between the central and remote units.
//
// Each receive port writes whole frames into its own input FIFO; a receive
// port cannot be stalled, so a frame that finds less than MAX_FRAME_BEATS of
// space when it starts is dropped whole (overflow counter).  A round-robin
// arbiter picks an input that holds at least one complete frame.  From the
// first beat the destination MAC is looked up in the learning table: a hit
// sends the frame to that port only (or drops it if that is the port it
// came in on), a miss or a group address floods it to every other port.
// When the second beat passes, the source MAC is learned against the input
// port.  The granted frame is then streamed to all selected transmit ports
// at once, one beat per cycle while all of them are ready.
// Latency: store-and-forward, so a frame starts leaving a few cycles after
// its last beat arrived if the output is idle.
// Counters: frames dropped on overflow, frames flooded, frames forwarded
// to a single port, frames filtered (destination on the input port).
// The document states that the switch forwards on MAC addresses and the
// ports learned for them; the buffering, arbitration and sizes here are
// this design's choices.
module eth_learning_switch
  import roe_pkg::*;
#(
  parameter int unsigned NP              = 4,
  parameter int unsigned FIFO_AW         = 9,
  parameter int unsigned MAX_FRAME_BEATS = 190,
  parameter int unsigned NENT            = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NP-1:0] rx_valid,
  input  beat_t         rx_beat  [NP],
  output logic [NP-1:0] tx_valid,
  input  logic [NP-1:0] tx_ready,
  output beat_t         tx_beat  [NP],
  output logic [31:0]   dropped,
  output logic [31:0]   flooded,
  output logic [31:0]   unicast,
  output logic [31:0]   filtered,
  output logic [31:0]   learned
);
  localparam int unsigned PW = $clog2(NP);
  localparam int unsigned BW = $bits(beat_t);

  // ---------------- input FIFOs with whole-frame drop
  logic [NP-1:0]    in_frame, in_drop, fifo_empty, fifo_full, fifo_pop;
  logic [FIFO_AW:0] fifo_count [NP];
  beat_t            fifo_head  [NP];
  logic [15:0]      frames_in  [NP];   // complete frames stored per input
  logic [NP-1:0]    frame_wr_done, frame_rd_done;

  for (genvar p = 0; p < NP; p++) begin : g_in
    logic wr;
    logic space_ok;
    assign space_ok = (32'(2**FIFO_AW) - 32'(fifo_count[p])) >= 32'(MAX_FRAME_BEATS);
    // first beat of a frame decides whether the whole frame is stored
    assign wr = rx_valid[p] && (in_frame[p] ? !in_drop[p] : space_ok);
    assign frame_wr_done[p] = wr && rx_beat[p].last;

    sync_fifo #(.WIDTH(BW), .AW(FIFO_AW)) u_fifo (
      .clk, .rst_n, .wr_en(wr), .wr_data(rx_beat[p]),
      .rd_en(fifo_pop[p]), .rd_data(fifo_head[p]), .empty(fifo_empty[p]),
      .full(fifo_full[p]), .count(fifo_count[p]));

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        in_frame[p]  <= 1'b0;
        in_drop[p]   <= 1'b0;
        frames_in[p] <= '0;
      end else begin
        if (rx_valid[p]) begin
          if (!in_frame[p]) in_drop[p] <= !space_ok;
          in_frame[p] <= !rx_beat[p].last;
        end
        frames_in[p] <= frames_in[p] + 16'(frame_wr_done[p]) - 16'(frame_rd_done[p]);
      end
    end
  end

  // ---------------- arbitration and forwarding
  logic           busy;
  logic [PW-1:0]  grant, rr;
  logic [NP-1:0]  mask;
  logic [15:0]    beat_no;
  beat_t          head;
  logic           req_found;
  logic [PW-1:0]  req_port;

  assign head = fifo_head[grant];

  always_comb begin
    req_found = 1'b0;
    req_port  = '0;
    for (int n = 0; n < NP; n++) begin
      logic [PW-1:0] cand;
      cand = PW'((32'(rr) + 32'(n)) % NP);
      if (!req_found && frames_in[cand] != '0) begin
        req_found = 1'b1;
        req_port  = cand;
      end
    end
  end

  // table lookup on the first beat of the granted frame
  logic [47:0]   dst_mac, src_mac;
  logic          lkp_hit;
  logic [PW-1:0] lkp_port;
  logic [NP-1:0] new_mask;
  logic          learn;

  always_comb begin
    for (int n = 0; n < 6; n++) dst_mac[8*(5-n) +: 8] = head.data[8*n +: 8];
    if (dst_mac[40] || !lkp_hit) new_mask = ~(NP'(1) << grant);
    else if (lkp_port == grant)  new_mask = '0;
    else                         new_mask = NP'(1) << lkp_port;
  end

  logic [15:0] src_hi;   // source MAC bytes 6,7 (from beat 0)
  always_comb begin
    src_mac = {src_hi, head.data[7:0], head.data[15:8], head.data[23:16], head.data[31:24]};
    learn   = busy && beat_no == 16'd2 && !fifo_empty[grant] && (&(tx_ready | ~mask));
  end

  mac_learn_table #(.NENT(NENT), .NP(NP)) u_table (
    .clk, .rst_n, .lkp_mac(dst_mac), .lkp_hit, .lkp_port,
    .learn, .learn_mac(src_mac), .learn_port(grant), .learned);

  logic advance;
  assign advance = busy && beat_no != 16'd0 && !fifo_empty[grant] && (&(tx_ready | ~mask));

  always_comb begin
    fifo_pop      = '0;
    frame_rd_done = '0;
    fifo_pop[grant]      = advance;
    frame_rd_done[grant] = advance && head.last;
    for (int p = 0; p < NP; p++) begin
      tx_valid[p] = busy && beat_no != 16'd0 && mask[p] && !fifo_empty[grant];
      tx_beat[p]  = head;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      grant    <= '0;
      rr       <= '0;
      mask     <= '0;
      beat_no  <= '0;
      src_hi   <= '0;
      dropped  <= '0;
      flooded  <= '0;
      unicast  <= '0;
      filtered <= '0;
    end else begin
      if (!busy) begin
        if (req_found) begin
          busy    <= 1'b1;
          grant   <= req_port;
          beat_no <= '0;
          mask    <= '0;
        end
      end else begin
        if (beat_no == 16'd0 && !fifo_empty[grant]) begin
          // decide the output ports, then stream from the next cycle
          mask    <= new_mask;
          src_hi  <= {head.data[55:48], head.data[63:56]};
          beat_no <= 16'd1;
          if (new_mask == '0)                  filtered <= filtered + 1'b1;
          else if ($countones(new_mask) == 1) unicast  <= unicast + 1'b1;
          else                                  flooded  <= flooded + 1'b1;
        end else if (advance) begin
          if (beat_no != '1) beat_no <= beat_no + 1'b1;
          if (head.last) begin
            busy <= 1'b0;
            rr   <= PW'((32'(grant) + 1) % NP);
          end
        end
      end
      // whole-frame drops on receive overflow
      for (int p = 0; p < NP; p++)
        if (rx_valid[p] && !in_frame[p] &&
            (32'(2**FIFO_AW) - 32'(fifo_count[p])) < 32'(MAX_FRAME_BEATS))
          dropped <= dropped + 1'b1;
    end
  end
endmodule
