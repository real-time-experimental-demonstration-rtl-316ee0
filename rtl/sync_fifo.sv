// sync_fifo: single-clock show-ahead FIFO used as frame and payload storage.
//
// A memory array with binary read/write pointers one bit wider than the
// address.  rd_data is the oldest entry whenever empty is low; rd_en pops it.
// count is the number of stored entries.  Writes while full and reads while
// empty are ignored (callers check full/empty first).  Synchronous reset.
module sync_fifo #(
  parameter int unsigned WIDTH = 73,
  parameter int unsigned AW    = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0] wp, rp;

  assign count   = wp - rp;
  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(2**AW));
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end
endmodule
