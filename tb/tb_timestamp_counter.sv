// tb_timestamp_counter: checks that the timestamp advances by 2^32/CLK_HZ
// per clock (27.49 LSB at 156.25 MHz), i.e. that it counts in units of
// 2^-32 s, that it wraps after one second, and that load sets it.
module tb_timestamp_counter;
  timeunit 1ns; timeprecision 1ps;
  localparam longint unsigned HZ = 156_250_000;
  logic clk = 0, rst_n = 0, load = 0;
  logic [31:0] load_value = 0, ts;
  int checks = 0, failures = 0;
  always #3.2 clk = ~clk;

  timestamp_counter #(.CLK_HZ(HZ)) dut (.*);

  // expected value after n clocks: floor(n * 2^32 / HZ), accurate in 128-bit arithmetic
  function automatic longint unsigned expect_ts(longint unsigned n);
    logic [127:0] v;
    v = (128'(n) * ((128'd1 << 64) + 128'(HZ/2)) / 128'(HZ)) >> 32;
    return longint'(v[31:0]);
  endfunction

  initial begin
    longint unsigned n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk); n++;
      if (k % 37 == 0) begin
        longint unsigned e; longint d;
        e = expect_ts(n); d = longint'(ts) - longint'(e);
        checks++;
        if (d < -1 || d > 1) begin failures++; $display("n=%0d ts=%0d exp=%0d", n, ts, e); end
      end
    end
    // 1 us = 156.25 clocks -> 4294.97 LSB
    begin
      logic [31:0] t0; t0 = ts;
      repeat (15625) @(negedge clk);
      checks++;
      if (32'(ts - t0) < 32'd429496 || 32'(ts - t0) > 32'd429498) begin
        failures++; $display("100 us gave %0d LSB", ts - t0);
      end
    end
    // wrap: load just before one second
    @(negedge clk); load = 1; load_value = 32'hFFFF_FFF0;
    @(negedge clk); load = 0;
    checks++;
    if (ts != 32'hFFFF_FFF0) begin failures++; $display("load failed %h", ts); end
    @(negedge clk);
    checks++;
    if (ts >= 32'h0000_0020 || ts < 32'h0000_0008) begin failures++; $display("wrap gave %h", ts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
