// tb_eth_learning_switch: sends frames between stations on a 4-port switch
// and checks on every transmit port that exactly the expected frames come
// out, beat for beat: flooding of an unknown destination, unicast once the
// destination has been learned, filtering of a frame whose destination sits
// on its own input port, flooding of broadcast, frames arriving on several
// ports at once, and whole-frame drops when an input FIFO overflows while
// the outputs are stalled.  The expected ports are worked out by hand from
// the order of the frames.
module tb_eth_learning_switch;
  import roe_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int NP = 4, AW = 6, MAXB = 20;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] rx_valid = 0, tx_valid, tx_ready = '1;
  beat_t rx_beat [NP];
  beat_t tx_beat [NP];
  logic [31:0] dropped, flooded, unicast, filtered, learned;
  int checks = 0, failures = 0;
  always #3.2 clk = ~clk;

  eth_learning_switch #(.NP(NP), .FIFO_AW(AW), .MAX_FRAME_BEATS(MAXB), .NENT(8)) dut (.*);

  localparam logic [47:0] A = 48'h02_00_00_00_00_0a, B = 48'h02_00_00_00_00_0b,
                          C = 48'h02_00_00_00_00_0c, BC = 48'hff_ff_ff_ff_ff_ff;

  typedef beat_t frame_t[$];
  frame_t expq [NP][$];
  frame_t cur  [NP];
  int nrx [NP];

  for (genvar p = 0; p < NP; p++) begin : g_mon
    always @(posedge clk) if (rst_n && tx_valid[p] && tx_ready[p]) begin
      cur[p].push_back(tx_beat[p]);
      if (tx_beat[p].last) begin
        checks++;
        if (expq[p].size() == 0) begin failures++; $display("port %0d: unexpected frame", p); end
        else begin
          frame_t e; e = expq[p].pop_front();
          if (e.size() != cur[p].size()) begin failures++; $display("port %0d: length", p); end
          else foreach (e[k]) if (e[k] != cur[p][k]) begin failures++; $display("port %0d beat %0d", p, k); break; end
        end
        nrx[p]++;
        cur[p].delete();
      end
    end
  end

  function automatic frame_t make(input logic [47:0] dst, input logic [47:0] src, input int nb);
    frame_t f; byte b[$];
    for (int n = 0; n < 6; n++) b.push_back(mac_byte(dst, n));
    for (int n = 0; n < 6; n++) b.push_back(mac_byte(src, n));
    while (b.size() < nb * 8 - 3) b.push_back(byte'($urandom));
    for (int k = 0; k < nb; k++) begin
      beat_t x; x = '0;
      for (int j = 0; j < 8; j++) if (8*k + j < b.size()) begin x.data[8*j +: 8] = b[8*k + j]; x.keep[j] = 1; end
      x.last = (k == nb - 1);
      f.push_back(x);
    end
    return f;
  endfunction

  task automatic send(input int port, input frame_t f, input logic [NP-1:0] outs);
    for (int p = 0; p < NP; p++) if (outs[p]) expq[p].push_back(f);
    foreach (f[k]) begin
      @(negedge clk); rx_valid[port] = 1; rx_beat[port] = f[k];
    end
    @(negedge clk); rx_valid[port] = 0;
  endtask

  task automatic drain();
    int idle = 0;
    while (idle < 40) begin
      @(negedge clk);
      idle = (tx_valid == 0) ? idle + 1 : 0;
    end
  endtask

  initial begin
    for (int p = 0; p < NP; p++) rx_beat[p] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    send(0, make(B, A, 6), 4'b1110);         // B unknown: flood, learn A on 0
    drain();
    send(1, make(A, B, 5), 4'b0001);         // A known: unicast, learn B on 1
    drain();
    send(0, make(B, A, 9), 4'b0010);         // unicast to 1
    send(0, make(A, A, 4), 4'b0000);         // destination on its own port: filtered
    send(2, make(BC, C, 3), 4'b1011);        // broadcast, learn C on 2
    drain();
    // simultaneous arrivals on three ports
    fork
      send(0, make(C, A, 7), 4'b0100);
      send(1, make(C, B, 8), 4'b0100);
      send(3, make(B, 48'h02_00_00_00_00_0d, 6), 4'b0010);
    join
    drain();
    checks += 4;
    if (learned != 4) begin failures++; $display("learned %0d", learned); end
    if (filtered != 1) begin failures++; $display("filtered %0d", filtered); end
    if (flooded != 2) begin failures++; $display("flooded %0d", flooded); end
    if (unicast != 5) begin failures++; $display("unicast %0d", unicast); end
    // overflow: port 0 output stalled, 15-beat frames into port 3 towards A
    tx_ready = 4'b1110;
    for (int f = 0; f < 5; f++) send(3, make(A, 48'h02_00_00_00_00_0d, 15), (f < 3 || f == 4 && 0) ? 4'b0001 : 4'b0000);
    repeat (20) @(negedge clk);
    tx_ready = '1;
    drain();
    checks++;
    if (dropped != 2) begin failures++; $display("dropped %0d", dropped); end
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (expq[p].size() != 0) begin failures++; $display("port %0d: %0d frames missing", p, expq[p].size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
