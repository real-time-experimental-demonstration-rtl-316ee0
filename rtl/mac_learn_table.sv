// mac_learn_table: MAC address to port table of the learning switch.
//
// NENT entries of {valid, MAC, port}.  Lookup is combinational: lkp_hit and
// lkp_port for the entry whose MAC equals lkp_mac.  A learn request writes
// the source MAC of a received frame with its input port: an existing entry
// is updated in place (a station that moved), a new MAC takes the next
// entry in round-robin order, overwriting the oldest one once the table is
// full.  Group addresses (first byte bit 0 set) are never learned.
// Timing: a learned entry is visible to lookups from the next cycle.
// learned counts new entries.  The table size, the replacement rule and the
// absence of ageing are this design's choices; the document states only
// that the switch forwards on previously learned MAC/port pairs.
module mac_learn_table #(
  parameter int unsigned NENT = 16,
  parameter int unsigned NP   = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [47:0]           lkp_mac,
  output logic                  lkp_hit,
  output logic [$clog2(NP)-1:0] lkp_port,
  input  logic                  learn,
  input  logic [47:0]           learn_mac,
  input  logic [$clog2(NP)-1:0] learn_port,
  output logic [31:0]           learned
);
  localparam int unsigned EW = $clog2(NENT);
  localparam int unsigned PW = $clog2(NP);

  logic [NENT-1:0] valid;
  logic [47:0]     mac  [NENT];
  logic [PW-1:0]   port [NENT];
  logic [EW-1:0]   next;
  logic            l_hit;
  logic [EW-1:0]   l_idx;

  always_comb begin
    lkp_hit  = 1'b0;
    lkp_port = '0;
    l_hit    = 1'b0;
    l_idx    = '0;
    for (int e = 0; e < NENT; e++) begin
      if (valid[e] && mac[e] == lkp_mac) begin
        lkp_hit  = 1'b1;
        lkp_port = port[e];
      end
      if (valid[e] && mac[e] == learn_mac) begin
        l_hit = 1'b1;
        l_idx = EW'(e);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid   <= '0;
      next    <= '0;
      learned <= '0;
      for (int e = 0; e < NENT; e++) begin
        mac[e]  <= '0;
        port[e] <= '0;
      end
    end else if (learn && !learn_mac[40]) begin
      if (l_hit) begin
        port[l_idx] <= learn_port;
      end else begin
        valid[next] <= 1'b1;
        mac[next]   <= learn_mac;
        port[next]  <= learn_port;
        next        <= (next == EW'(NENT - 1)) ? '0 : next + 1'b1;
        learned     <= learned + 1'b1;
      end
    end
  end
endmodule
