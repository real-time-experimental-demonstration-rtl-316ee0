// timestamp_counter: free-running time of day as a fraction of a second in
// units of 2^-32 s, the 4-byte timestamp carried in every RoE frame.
//
// A 64-bit accumulator holds time in units of 2^-64 s; every clock it adds
// INC = round(2^64 / CLK_HZ).  Its upper 32 bits are the timestamp, which
// therefore wraps once per second and advances by about 27.49 LSBs per
// 156.25 MHz clock without drift.  load/load_value set the timestamp (the
// fraction bits are cleared) so that the two ends of the link can be
// aligned.  Timing: ts changes on every clock edge after reset.
// The 2^-32 s resolution and 4-byte width follow the document; the clock
// frequency and the load port are this design's choices.
module timestamp_counter #(
  parameter longint unsigned CLK_HZ = 156_250_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [31:0] load_value,
  output logic [31:0] ts
);
  localparam logic [127:0] ONE64 = 128'd1 << 64;
  localparam logic [63:0]  INC   = 64'((ONE64 + 128'(CLK_HZ / 2)) / 128'(CLK_HZ));

  logic [63:0] acc;
  assign ts = acc[63:32];

  always_ff @(posedge clk) begin
    if (!rst_n)     acc <= '0;
    else if (load)  acc <= {load_value, 32'd0};
    else            acc <= acc + INC;
  end
endmodule
