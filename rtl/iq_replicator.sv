// iq_replicator: repeats every compressed I/Q word REP times and packs the
// result into 64-bit beats for the Ethernet side.
//
// The link carries REP copies of one 400 Mb/s service to load the 10G
// channel the way REP independent 20 MHz carriers would (10 copies with
// 64-byte payloads, 20 copies with 512-byte payloads).  The output is a
// continuous byte stream: sample n occupies bytes [2*REP*n, 2*REP*(n+1)),
// each copy as I then Q.  A beat holds four 16-bit units, lane l in
// bits [16l+15:16l] with I in the low byte.  The block keeps the current
// sample and the number of its copies still to be sent; when fewer than four
// remain, the next sample (the head of the show-ahead source FIFO) fills the
// rest of the beat.  REP must be at least 4, so a beat never spans more than
// two samples.
// Interface: show-ahead source (src_empty/src_data/src_pop) on the input,
// valid/ready on the output.  Throughput: one beat per cycle while samples
// are available, i.e. 4/REP samples per cycle.
module iq_replicator
  import roe_pkg::*;
#(
  parameter int unsigned REP = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        src_empty,
  input  ciq_t        src_data,
  output logic        src_pop,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [63:0] out_data
);
  localparam int unsigned RW = $clog2(REP + 1);

  logic          have_cur;
  ciq_t          cur;
  logic [RW-1:0] rem;          // copies of cur still to send, 1..REP
  logic          fire;

  // unit in wire order: I in the low byte
  function automatic logic [15:0] unit16(input ciq_t s);
    return {s.q, s.i};
  endfunction

  always_comb begin
    out_valid = have_cur && ((rem >= RW'(4)) || !src_empty);
    for (int l = 0; l < 4; l++)
      out_data[16*l +: 16] = (RW'(l) < rem) ? unit16(cur) : unit16(src_data);
    fire    = out_valid && out_ready;
    src_pop = !src_empty && ((!have_cur) || (fire && rem <= RW'(4)));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_cur <= 1'b0;
      cur      <= '0;
      rem      <= '0;
    end else if (!have_cur) begin
      if (!src_empty) begin
        have_cur <= 1'b1;
        cur      <= src_data;
        rem      <= RW'(REP);
      end
    end else if (fire) begin
      if (rem > RW'(4)) begin
        rem <= rem - RW'(4);
      end else if (rem == RW'(4)) begin
        if (!src_empty) begin
          cur <= src_data;
          rem <= RW'(REP);
        end else begin
          have_cur <= 1'b0;
        end
      end else begin
        cur <= src_data;
        rem <= RW'(REP) - (RW'(4) - rem);
      end
    end
  end

  initial assert (REP >= 4) else $error("iq_replicator: REP must be at least 4");
endmodule
