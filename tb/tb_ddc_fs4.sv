// tb_ddc_fs4: checks the fs/4 down-converter and boxcar decimator against a
// reference computed in the testbench from the same random ADC samples, and
// checks that exactly one output comes out per DEC input samples.
module tb_ddc_fs4;
  import roe_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int DEC = 6, SHIFT = 2, N = 600;
  logic clk = 0, rst_n = 0, adc_valid = 0;
  logic signed [15:0] adc_sample = 0;
  logic iq_valid; iq16_t iq;
  int checks = 0, failures = 0;
  always #3.333 clk = ~clk;

  ddc_fs4 #(.DEC(DEC), .SHIFT(SHIFT)) dut (.*);

  int exp_i[$], exp_q[$];
  function automatic int sat(int v);
    v = v >>> SHIFT;
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  int nout = 0;
  always @(posedge clk) if (rst_n && iq_valid) begin
    checks++; nout++;
    if (exp_i.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      int ei, eq;
      ei = exp_i.pop_front(); eq = exp_q.pop_front();
      if (int'(iq.i) != ei || int'(iq.q) != eq) begin
        failures++; $display("mismatch out %0d: got %0d,%0d exp %0d,%0d", nout, iq.i, iq.q, ei, eq);
      end
    end
  end

  initial begin
    int ai = 0, aq = 0, n = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < N; s++) begin
      int x;
      // a few samples at full scale to exercise saturation
      x = (s % 97 < 12) ? ((s % 2) ? -32768 : 32767) : $signed(16'($urandom));
      if (s % 97 < 12) x = ((s % 4) == 0 || (s % 4) == 3) ? 32767 : -32768;
      @(negedge clk);
      adc_valid = 1; adc_sample = 16'(x);
      case (n % 4)
        0: ai += x; 1: aq -= x; 2: ai -= x; 3: aq += x;
      endcase
      n++;
      if (n % DEC == 0) begin exp_i.push_back(sat(ai)); exp_q.push_back(sat(aq)); ai = 0; aq = 0; end
      if (s % 50 == 49) begin @(negedge clk); adc_valid = 0; end   // gaps in the input
    end
    @(negedge clk); adc_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (nout != N / DEC || exp_i.size() != 0) begin failures++; $display("rate: %0d outputs for %0d inputs", nout, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
