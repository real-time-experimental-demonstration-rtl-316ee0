// tb_async_fifo: writes a random-valued sequence at 150 MHz with random
// gaps and reads it at 156.25 MHz with random pauses; every word must come
// out once, in order.  Also checks that full stops writes (and flags
// overflow) and that reads from an empty FIFO are flagged as underflow.
module tb_async_fifo;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 16, AW = 3, N = 2000;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = 0, rd_data;
  logic wr_full, wr_overflow, rd_empty, rd_underflow;
  logic [AW:0] rd_level;
  int checks = 0, failures = 0;
  always #3.333 wr_clk = ~wr_clk;
  always #3.2 rd_clk = ~rd_clk;

  async_fifo #(.WIDTH(W), .AW(AW)) dut (.*);

  logic [W-1:0] sb[$];
  int nread = 0, nwritten = 0, ovf = 0, unf = 0, fullseen = 0;
  logic stop_reads = 0;

  always @(negedge wr_clk) if (wr_overflow) ovf++;
  always @(negedge rd_clk) if (rd_underflow) unf++;

  initial begin
    repeat (3) @(posedge wr_clk); wr_rst_n = 1; rd_rst_n = 1;
    // phase 1: reads paused, fill until full
    stop_reads = 1;
    while (!wr_full) begin
      @(negedge wr_clk); wr_en = 1; wr_data = W'($urandom); sb.push_back(wr_data); nwritten++;
      @(negedge wr_clk); wr_en = 0;
    end
    fullseen = 1;
    @(negedge wr_clk); wr_en = 1; wr_data = 16'hdead;       // ignored, overflow
    @(negedge wr_clk); wr_en = 0;
    stop_reads = 0;
    while (nwritten < N) begin
      @(negedge wr_clk);
      if (!wr_full && ($urandom % 4 != 0)) begin
        wr_en = 1; wr_data = W'($urandom); sb.push_back(wr_data); nwritten++;
      end else wr_en = 0;
    end
    @(negedge wr_clk); wr_en = 0;
  end

  initial begin
    @(posedge rd_rst_n);
    while (nread < N) begin
      @(negedge rd_clk);
      rd_en = 0;
      if (!stop_reads && !rd_empty && ($urandom % 3 != 0)) begin
        checks++;
        if (sb.size() == 0 || rd_data != sb[0]) begin failures++; $display("read %0d: got %h", nread, rd_data); end
        else void'(sb.pop_front());
        rd_en = 1; nread++;
      end
    end
    @(negedge rd_clk); rd_en = 0;
    repeat (6) @(negedge rd_clk);
    rd_en = 1; @(negedge rd_clk); rd_en = 0;   // read while empty
    repeat (3) @(negedge rd_clk);
    checks += 4;
    if (!fullseen) failures++;
    if (ovf != 1) begin failures++; $display("overflow pulses %0d", ovf); end
    if (unf != 1) begin failures++; $display("underflow pulses %0d", unf); end
    if (!rd_empty || rd_level != 0) begin failures++; $display("not empty at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
