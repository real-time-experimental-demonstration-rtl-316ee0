// tb_iq_replicator: feeds random compressed words through a show-ahead
// source model and rebuilds the byte stream from the 64-bit beats; it must
// be each word repeated REP times (I byte then Q byte), for REP = 10 and
// REP = 20.  With the source never empty and the output always ready, the
// block must produce one beat every cycle (REP/4 beats per sample).
module tb_iq_replicator;
  import roe_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 2; g++) begin : g_rep
    localparam int REP = (g == 0) ? 10 : 20;
    logic src_empty, src_pop, out_valid, out_ready;
    ciq_t src_data;
    logic [63:0] out_data;
    ciq_t q[$];
    byte  exp_bytes[$];
    int   nbeats = 0, ncycles = 0;
    logic gaps = 1;

    iq_replicator #(.REP(REP)) dut (.clk, .rst_n, .src_empty, .src_data, .src_pop,
                                    .out_valid, .out_ready, .out_data);
    function automatic void refresh();
      src_empty = (q.size() == 0);
      src_data  = (q.size() == 0) ? '0 : q[0];
    endfunction
    initial refresh();

    always @(posedge clk) if (rst_n) begin
      if (!gaps) ncycles++;
      if (out_valid && out_ready) begin
        nbeats++;
        for (int b = 0; b < 8; b++) begin
          checks++;
          if (exp_bytes.size() == 0 || out_data[8*b +: 8] != exp_bytes[0]) begin
            failures++; $display("REP=%0d beat %0d byte %0d wrong", REP, nbeats, b);
          end
          if (exp_bytes.size() != 0) void'(exp_bytes.pop_front());
        end
      end
      if (src_pop) void'(q.pop_front());
      src_empty <= (q.size() == 0);
      src_data  <= (q.size() == 0) ? '0 : q[0];
    end

    initial begin
      out_ready = 0;
      @(posedge rst_n);
      // phase 1: random source gaps and random back-pressure
      for (int s = 0; s < 200; s++) begin
        ciq_t w; w = ciq_t'($urandom);
        for (int r = 0; r < REP; r++) begin exp_bytes.push_back(w.i); exp_bytes.push_back(w.q); end
        @(negedge clk); q.push_back(w); refresh();
        out_ready = ($urandom % 4 != 0);
        repeat ($urandom % 3) begin @(negedge clk); out_ready = ($urandom % 4 != 0); end
      end
      while (exp_bytes.size() > 8 * REP) begin @(negedge clk); out_ready = 1; end
      // phase 2: full rate, 100 samples queued up front
      @(negedge clk);
      out_ready = 1;
      for (int s = 0; s < 100 * 4; s++) begin
        ciq_t w; w = ciq_t'($urandom);
        for (int r = 0; r < REP; r++) begin exp_bytes.push_back(w.i); exp_bytes.push_back(w.q); end
        q.push_back(w);
      end
      refresh();
      nbeats = 0; gaps = 0;
      repeat (100 * REP / 4) @(negedge clk);
      checks++;
      if (nbeats < 100 * REP / 4 - 2) begin failures++; $display("REP=%0d: %0d beats in %0d cycles", REP, nbeats, 100*REP/4); end
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    #60us;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
