// tb_roe_depacketizer: sends good frames and frames with a wrong
// destination, a wrong EtherType and a wrong length, built byte by byte in
// the testbench, with random idle cycles between beats.  Checks every
// rebuilt payload word and its index, the timestamp, frame_ok, and the
// accept/reject counters.
module tb_roe_depacketizer;
  import roe_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int P = 64, PW = P / 8;
  logic clk = 0, rst_n = 0, in_valid = 0;
  beat_t in_beat = '0;
  logic pl_valid, frame_done, frame_ok;
  logic [63:0] pl_data;
  logic [$clog2(PW)-1:0] pl_idx;
  logic [31:0] frame_ts, frames_ok, frames_bad;
  int checks = 0, failures = 0;
  always #3.2 clk = ~clk;

  roe_depacketizer #(.PAYLOAD_BYTES(P)) dut (.*);

  byte exp_pl[$];
  logic [31:0] exp_ts_q[$];
  logic exp_ok_q[$];
  logic [31:0] exp_ts;
  logic exp_ok;
  always_comb begin
    exp_ok = (exp_ok_q.size() != 0) ? exp_ok_q[0] : 1'b0;
    exp_ts = (exp_ts_q.size() != 0) ? exp_ts_q[0] : '0;
  end
  int widx = 0, nframes = 0, ok_frames = 0, bad_frames = 0;

  always @(posedge clk) if (rst_n) begin
    if (pl_valid) begin
      checks++;
      if (int'(pl_idx) != widx) begin failures++; $display("idx %0d exp %0d", pl_idx, widx); end
      if (exp_ok) for (int b = 0; b < 8; b++) begin
        if (pl_data[8*b +: 8] != exp_pl[8*widx + b]) begin failures++; $display("frame %0d word %0d byte %0d", nframes, widx, b); break; end
      end
      widx++;
    end
    if (frame_done) begin
      checks++;
      if (frame_ok != exp_ok) begin failures++; $display("frame %0d ok=%b exp %b", nframes, frame_ok, exp_ok); end
      if (exp_ok) begin
        checks++;
        if (frame_ts != exp_ts) begin failures++; $display("ts %h exp %h", frame_ts, exp_ts); end
      end
      widx = 0; nframes++;
      void'(exp_ok_q.pop_front()); void'(exp_ts_q.pop_front());
      repeat (P) if (exp_pl.size() != 0) void'(exp_pl.pop_front());
    end
  end

  task automatic send(input logic [47:0] dst, input logic [15:0] et, input int plen, input logic [31:0] ts);
    byte f[$];
    for (int n = 0; n < 6; n++) f.push_back(mac_byte(dst, n));
    for (int n = 0; n < 6; n++) f.push_back(mac_byte(CU_MAC, n));
    f.push_back(et[15:8]); f.push_back(et[7:0]);
    f.push_back(ts[31:24]); f.push_back(ts[23:16]); f.push_back(ts[15:8]); f.push_back(ts[7:0]);
    for (int n = 0; n < plen; n++) begin byte v; v = byte'($urandom); f.push_back(v); if (n < P) exp_pl.push_back(v); end
    for (int n = plen; n < P; n++) exp_pl.push_back(8'h00);
    exp_ts_q.push_back(ts);
    exp_ok_q.push_back((dst == RU_MAC) && (et == ROE_ETHERTYPE) && (plen == P));
    if ((dst == RU_MAC) && (et == ROE_ETHERTYPE) && (plen == P)) ok_frames++; else bad_frames++;
    for (int k = 0; k < f.size(); k += 8) begin
      @(negedge clk);
      in_valid = 1;
      in_beat = '0;
      for (int b = 0; b < 8; b++) if (k + b < f.size()) begin
        in_beat.data[8*b +: 8] = f[k+b]; in_beat.keep[b] = 1'b1;
      end
      in_beat.last = (k + 8 >= f.size());
      if ($urandom % 4 == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      case (r % 5)
        1: send(48'h02_00_00_00_00_09, ROE_ETHERTYPE, P, $urandom);
        3: send(RU_MAC, 16'h0800, P, $urandom);
        4: send(RU_MAC, ROE_ETHERTYPE, (r % 2) ? P - 8 : P + 8, $urandom);
        default: send(RU_MAC, ROE_ETHERTYPE, P, $urandom);
      endcase
    end
    repeat (4) @(negedge clk);
    checks++;
    if (frames_ok != 32'(ok_frames) || frames_bad != 32'(bad_frames) || nframes != 20) begin
      failures++; $display("counters ok=%0d bad=%0d done=%0d", frames_ok, frames_bad, nframes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
