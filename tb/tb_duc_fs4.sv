// tb_duc_fs4: supplies random baseband samples through a show-ahead source
// model and checks the DAC stream against a reference: every sample held
// for INTERP clocks and mixed with I, -Q, -I, Q on successive output clocks.
// Also checks the start-up delay after the first sample, the one sample per
// INTERP clocks consumption rate, and the underflow counter and restart
// when the source runs dry.
module tb_duc_fs4;
  import roe_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int INTERP = 6, SD = 10;
  logic clk = 0, rst_n = 0;
  logic src_empty = 1, src_pop, dac_valid;
  iq16_t src_data = '0;
  logic signed [15:0] dac_sample;
  logic [31:0] underflows, samples_played;
  int checks = 0, failures = 0;
  always #3.333 clk = ~clk;

  duc_fs4 #(.INTERP(INTERP), .START_DELAY(SD)) dut (.*);

  iq16_t q[$], played[$];
  int cyc = 0, first_avail = -1, first_out = -1, nout = 0, ph = 0;

  function automatic int negs(int v); return (v == -32768) ? 32767 : -v; endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (src_pop) begin played.push_back(q[0]); void'(q.pop_front()); end
    if (dac_valid) begin
      int e; iq16_t s;
      if (first_out < 0) first_out = cyc;
      s = played[nout / INTERP];
      case (ph % 4) 0: e = s.i; 1: e = negs(s.q); 2: e = negs(s.i); default: e = s.q; endcase
      checks++;
      if (int'(dac_sample) != e) begin failures++; $display("out %0d: %0d exp %0d", nout, dac_sample, e); end
      nout++; ph++;
    end
    src_empty <= (q.size() == 0);
    src_data  <= (q.size() == 0) ? '0 : q[0];
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    for (int s = 0; s < 40; s++) q.push_back(iq16_t'({16'($urandom), s == 3 ? 16'h8000 : 16'($urandom)}));
    first_avail = cyc;
    wait (samples_played == 40);
    repeat (INTERP + 4) @(negedge clk);
    checks += 4;
    if (first_out - first_avail < SD || first_out - first_avail > SD + 5) begin
      failures++; $display("start delay %0d", first_out - first_avail);
    end
    if (nout != 40 * INTERP) begin failures++; $display("%0d outputs for 40 samples", nout); end
    if (underflows != 1) begin failures++; $display("underflows %0d", underflows); end
    if (dac_valid) begin failures++; $display("still playing after underflow"); end
    // restart
    nout = 0; played.delete();
    for (int s = 0; s < 10; s++) q.push_back(iq16_t'($urandom));
    wait (samples_played == 50);
    repeat (INTERP + 4) @(negedge clk);
    checks++;
    if (nout != 10 * INTERP || underflows != 2) begin failures++; $display("restart: %0d outputs, %0d underflows", nout, underflows); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
