// tb_iq_dereplicator: builds the replicated byte stream of random samples
// (REP copies, I then Q) in the testbench, cuts it into 64-bit words with
// random gaps and checks that each sample comes out exactly once, in order,
// for REP = 10 and REP = 20.
module tb_iq_dereplicator;
  import roe_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;
  int checks = 0, failures = 0, done = 0;

  for (genvar g = 0; g < 2; g++) begin : g_rep
    localparam int REP = (g == 0) ? 10 : 20;
    localparam int NS = 300;
    logic in_valid = 0, out_valid;
    logic [63:0] in_data = 0;
    ciq_t out_ciq;
    ciq_t samples[$];
    byte stream[$];
    int nout = 0;

    iq_dereplicator #(.REP(REP)) dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_ciq);

    always @(posedge clk) if (rst_n && out_valid) begin
      checks++;
      if (nout >= NS || out_ciq != samples[nout]) begin failures++; $display("REP=%0d sample %0d wrong", REP, nout); end
      nout++;
    end

    initial begin
      for (int s = 0; s < NS; s++) begin
        ciq_t w; w = ciq_t'($urandom); samples.push_back(w);
        for (int r = 0; r < REP; r++) begin
          // only the first copy is used; make the others differ so a wrong pick shows
          stream.push_back(r == 0 ? w.i : byte'($urandom));
          stream.push_back(r == 0 ? w.q : byte'($urandom));
        end
      end
      @(posedge rst_n);
      for (int k = 0; k + 8 <= stream.size(); k += 8) begin
        @(negedge clk); in_valid = 1;
        for (int b = 0; b < 8; b++) in_data[8*b +: 8] = stream[k + b];
        if ($urandom % 3 == 0) begin @(negedge clk); in_valid = 0; end
      end
      @(negedge clk); in_valid = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (nout != NS) begin failures++; $display("REP=%0d: %0d samples", REP, nout); end
      done++;
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
