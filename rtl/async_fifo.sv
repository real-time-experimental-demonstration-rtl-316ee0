// async_fifo: dual-clock FIFO carrying samples between the converter clock
// (ADC/DAC) and the 10G Ethernet clock.
//
// Classic Gray-coded pointer FIFO: each side keeps a binary and a Gray
// pointer one bit wider than the address, the Gray pointer is passed through
// a two-flop synchroniser to the other side, and full/empty are computed from
// the local pointer against the synchronised remote one.  The read side is
// show-ahead: rd_data holds the oldest word whenever rd_empty is low, and
// rd_en pops it.  wr_en while full and rd_en while empty are ignored and
// counted as overflow/underflow pulses.  rd_level is the fill level seen from
// the read side (pessimistic by the synchroniser delay).
// Depth and width are this design's choice; the document only implies a
// clock-domain crossing between the converters and the Ethernet logic.
module async_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = 5          // depth = 2**AW
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,
  output logic             wr_overflow,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty,
  output logic [AW:0]      rd_level,
  output logic             rd_underflow
);
  logic [WIDTH-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int k = AW - 1; k >= 0; k--) b[k] = b[k+1] ^ g[k];
    return b;
  endfunction

  // ---------------- write side
  assign wr_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  logic do_wr;
  assign do_wr = wr_en && !wr_full;

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (!wr_rst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; wr_overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
      wr_overflow <= wr_en && wr_full;
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // ---------------- read side
  assign rd_empty = (rgray == wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];
  assign rd_level = gray2bin(wgray_r2) - rbin;
  logic do_rd;
  assign do_rd = rd_en && !rd_empty;

  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0; rd_underflow <= 1'b0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
      rd_underflow <= rd_en && rd_empty;
      if (do_rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
