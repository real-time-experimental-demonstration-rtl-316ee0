// tb_roe_packetizer: feeds numbered payload beats with random gaps and
// random output back-pressure and rebuilds every frame byte by byte: MAC
// addresses, EtherType, the timestamp sampled when the frame's first
// payload beat was accepted, the payload bytes in order, the frame length
// (PW+3 beats, two bytes in the last) and back-to-back beats once a frame
// has started with the output ready.  Runs with 64-byte and 512-byte payloads.
module tb_roe_packetizer;
  import roe_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  logic [31:0] ts_now = 0;
  always #3.2 clk = ~clk;
  always @(posedge clk) ts_now <= ts_now + 32'd27;
  int checks = 0, failures = 0;
  int done = 0;

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int P = (g == 0) ? 64 : 512;
    localparam int PW = P / 8;
    localparam int NFR = (g == 0) ? 12 : 4;
    logic in_valid = 0, in_ready, out_valid, out_ready = 0;
    logic [63:0] in_data = 0;
    beat_t out_beat;
    logic [31:0] frames_sent;
    logic [31:0] exp_ts[$];
    byte  fr[$];
    int   nin = 0, nfr = 0, stall_in_frame = 0;
    logic in_frame = 0;

    roe_packetizer #(.PAYLOAD_BYTES(P)) dut (.clk, .rst_n, .ts_now, .in_valid, .in_ready, .in_data,
                                             .out_valid, .out_ready, .out_beat, .frames_sent);

    function automatic byte pbyte(int idx);   // payload byte idx of the whole stream
      return byte'((idx / 8) * 7 + (idx % 8) * 3);
    endfunction

    always @(posedge clk) if (rst_n) begin
      if (in_valid && in_ready) begin
        if (nin % PW == 0) exp_ts.push_back(ts_now);
        nin++;
      end
      if (in_frame && !out_valid) stall_in_frame++;
      if (out_valid && out_ready) begin
        in_frame = !out_beat.last;
        for (int b = 0; b < 8; b++) if (out_beat.keep[b]) fr.push_back(out_beat.data[8*b +: 8]);
        if (out_beat.last) begin
          logic [31:0] ts;
          checks++;
          if (fr.size() != 18 + P) begin failures++; $display("P=%0d frame %0d length %0d", P, nfr, fr.size()); end
          else begin
            for (int n = 0; n < 6; n++) begin
              if (fr[n] != mac_byte(RU_MAC, n) || fr[6+n] != mac_byte(CU_MAC, n)) begin failures++; $display("mac"); break; end
            end
            checks++;
            if ({fr[12], fr[13]} != ROE_ETHERTYPE) begin failures++; $display("ethertype"); end
            ts = {fr[14], fr[15], fr[16], fr[17]};
            checks++;
            if (exp_ts.size() == 0 || ts != exp_ts[0]) begin failures++; $display("P=%0d frame %0d ts %h", P, nfr, ts); end
            if (exp_ts.size() != 0) void'(exp_ts.pop_front());
            for (int n = 0; n < P; n++) begin
              checks++;
              if (fr[18+n] != pbyte(nfr * P + n)) begin failures++; $display("P=%0d frame %0d byte %0d", P, nfr, n); break; end
            end
          end
          fr.delete();
          nfr++;
        end
      end
    end

    initial begin
      @(posedge rst_n);
      for (int w = 0; w < NFR * PW; ) begin
        @(negedge clk);
        out_ready = (nfr < NFR / 2) ? ($urandom % 5 != 0) : 1'b1;
        if (in_valid && in_ready) w++;
        if (w < NFR * PW && ($urandom % 3 != 0)) begin
          in_valid = 1;
          for (int b = 0; b < 8; b++) in_data[8*b +: 8] = pbyte(w * 8 + b);
        end else in_valid = 0;
      end
      @(negedge clk); in_valid = 0; out_ready = 1;
      stall_in_frame = 0;
      repeat (PW * 6) @(negedge clk);
      checks += 2;
      if (nfr != NFR || frames_sent != 32'(NFR)) begin failures++; $display("P=%0d: %0d frames", P, nfr); end
      if (stall_in_frame != 0) begin failures++; $display("P=%0d: gaps inside frames", P); end
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
