// tb_reorder_buffer: writes frames with out-of-order timestamps and checks
// that they are played in timestamp order, each starting within three
// cycles of local time reaching timestamp + DELAY_TICKS, with the right
// payload words.  Also checks the reorder counter, that a frame older than
// one already played is dropped as late, that a frame finding all slots
// full is dropped, and that a frame marked bad by the parser is ignored.
module tb_reorder_buffer;
  import roe_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int P = 64, PW = P / 8, NSLOT = 4;
  localparam logic [31:0] D = 32'd1000;
  logic clk = 0, rst_n = 0;
  logic [31:0] ts_now = 32'hFFFF_F000;    // start close to the one-second wrap
  logic pl_valid = 0, frame_done = 0, frame_ok = 0;
  logic [63:0] pl_data = 0;
  logic [$clog2(PW)-1:0] pl_idx = 0;
  logic [31:0] frame_ts = 0;
  logic out_valid, out_last;
  logic [63:0] out_data;
  logic [31:0] reordered, dropped_full, dropped_late, frames_played;
  int checks = 0, failures = 0;
  always #3.2 clk = ~clk;
  always @(posedge clk) ts_now <= ts_now + 32'd10;

  reorder_buffer #(.PAYLOAD_BYTES(P), .NSLOT(NSLOT), .DELAY_TICKS(D)) dut (.*);

  logic [31:0] exp_order[$];
  int widx = 0;
  logic [31:0] cur_ts;

  always @(posedge clk) if (rst_n && out_valid) begin
    if (widx == 0) begin
      logic [31:0] late;
      cur_ts = (exp_order.size() != 0) ? exp_order.pop_front() : 32'hx;
      late = ts_now - (cur_ts + D);
      checks++;
      if (late > 32'd30) begin failures++; $display("frame ts %h released %0d ticks after due", cur_ts, late); end
    end
    checks++;
    if (out_data != {cur_ts, 32'(widx)}) begin failures++; $display("word %0d of frame %h: %h", widx, cur_ts, out_data); end
    checks++;
    if (out_last != (widx == PW - 1)) begin failures++; $display("last flag"); end
    widx = (widx == PW - 1) ? 0 : widx + 1;
  end

  task automatic write_frame(input logic [31:0] ts, input logic ok);
    for (int w = 0; w < PW; w++) begin
      @(negedge clk); pl_valid = 1; pl_idx = w[$clog2(PW)-1:0]; pl_data = {ts, 32'(w)};
    end
    @(negedge clk); pl_valid = 0; frame_done = 1; frame_ok = ok; frame_ts = ts;
    @(negedge clk); frame_done = 0;
  endtask

  initial begin
    logic [31:0] t0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); t0 = ts_now;
    // three frames arriving out of order across the timestamp wrap
    write_frame(t0 + 32'd100, 1);
    write_frame(t0 + 32'd4300, 1);
    write_frame(t0 + 32'd2200, 1);
    write_frame(t0 + 32'd3000, 0);          // bad frame, must be ignored
    exp_order = '{t0 + 32'd100, t0 + 32'd2200, t0 + 32'd4300};
    wait (frames_played == 3);
    repeat (12) @(negedge clk);
    checks += 2;
    if (reordered != 1) begin failures++; $display("reordered=%0d", reordered); end
    if (exp_order.size() != 0) begin failures++; $display("frames missing"); end
    // a frame older than the last one played
    write_frame(t0 + 32'd3500, 1);
    repeat (4) @(negedge clk);
    checks++;
    if (dropped_late != 1) begin failures++; $display("dropped_late=%0d", dropped_late); end
    // fill all slots with future frames, one more is dropped
    t0 = ts_now;
    for (int f = 0; f < NSLOT + 1; f++) begin
      write_frame(t0 + 32'd2000 + 32'(f * 100), 1);
      if (f < NSLOT) exp_order.push_back(t0 + 32'd2000 + 32'(f * 100));
    end
    checks++;
    if (dropped_full != 1) begin failures++; $display("dropped_full=%0d", dropped_full); end
    wait (frames_played == 3 + NSLOT);
    repeat (12) @(negedge clk);
    checks += 2;
    if (exp_order.size() != 0) begin failures++; $display("frames missing"); end
    if (frames_played != 3 + NSLOT) begin failures++; $display("played %0d", frames_played); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
