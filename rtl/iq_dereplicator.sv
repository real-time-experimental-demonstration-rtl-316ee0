// iq_dereplicator: recovers the I/Q word stream from the replicated payload.
//
// The played-out payload words form the same continuous byte stream the
// replicator produced: sample n occupies 2*REP bytes, REP copies of I then
// Q.  The block tracks pos, the byte offset of the current word's first byte
// within its sample group.  A group starts inside the word at byte
// o = (2*REP - pos) mod 2*REP when o < 8; the copy at lanes o, o+1 is then
// emitted (the first copy of each sample is kept, the others are ignored).
// Because 2*REP >= 8 at most one sample starts per word, and it never
// straddles two words since o is even.  Timing: out_valid one cycle after
// the word that holds a sample start.  The stream is assumed to start at a
// sample boundary after reset; frames lost in the network are not
// re-aligned.  Keeping the first copy is this design's choice.
module iq_dereplicator
  import roe_pkg::*;
#(
  parameter int unsigned REP = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] in_data,
  output logic        out_valid,
  output ciq_t        out_ciq
);
  localparam int unsigned G  = 2 * REP;
  localparam int unsigned PW_ = $clog2(G);

  logic [PW_-1:0] pos;
  logic [PW_-1:0] o;
  logic [7:0]     b0, b1;

  always_comb begin
    o  = (pos == '0) ? '0 : PW_'(G) - pos;
    b0 = in_data[8*o[2:0] +: 8];
    b1 = in_data[8*(o[2:0] + 3'd1) +: 8];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos       <= '0;
      out_valid <= 1'b0;
      out_ciq   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        pos <= (pos + PW_'(8) >= PW_'(G)) ? pos + PW_'(8) - PW_'(G) : pos + PW_'(8);
        if (o < PW_'(8)) begin
          out_valid <= 1'b1;
          out_ciq.i <= b0;
          out_ciq.q <= b1;
        end
      end
    end
  end

  initial assert (REP >= 4) else $error("iq_dereplicator: REP must be at least 4");
endmodule
