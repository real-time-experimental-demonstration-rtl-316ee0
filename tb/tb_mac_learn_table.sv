// tb_mac_learn_table: learns addresses on several ports and checks lookups,
// that a known address moving to another port is updated in place, that
// group addresses are not learned, and that a full table replaces its
// entries in round-robin order (oldest first).
module tb_mac_learn_table;
  timeunit 1ns; timeprecision 1ps;
  localparam int NENT = 4, NP = 4;
  logic clk = 0, rst_n = 0, learn = 0, lkp_hit;
  logic [47:0] lkp_mac = 0, learn_mac = 0;
  logic [1:0] lkp_port, learn_port = 0;
  logic [31:0] learned;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mac_learn_table #(.NENT(NENT), .NP(NP)) dut (.*);

  task automatic do_learn(input logic [47:0] m, input int p);
    @(negedge clk); learn = 1; learn_mac = m; learn_port = 2'(p);
    @(negedge clk); learn = 0;
  endtask
  task automatic expect_lookup(input logic [47:0] m, input logic hit, input int p);
    lkp_mac = m; #1;
    checks++;
    if (lkp_hit !== hit || (hit && int'(lkp_port) != p)) begin
      failures++; $display("lookup %h: hit=%b port=%0d exp %b/%0d", m, lkp_hit, lkp_port, hit, p);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    expect_lookup(48'h02_00_00_00_00_01, 0, 0);
    do_learn(48'h02_00_00_00_00_01, 0);
    do_learn(48'h02_00_00_00_00_02, 1);
    do_learn(48'h01_00_5e_00_00_01, 2);          // multicast: ignored
    expect_lookup(48'h02_00_00_00_00_01, 1, 0);
    expect_lookup(48'h02_00_00_00_00_02, 1, 1);
    expect_lookup(48'h01_00_5e_00_00_01, 0, 0);
    do_learn(48'h02_00_00_00_00_02, 3);          // station moved
    expect_lookup(48'h02_00_00_00_00_02, 1, 3);
    checks++;
    if (learned != 2) begin failures++; $display("learned %0d", learned); end
    do_learn(48'h02_00_00_00_00_03, 2);
    do_learn(48'h02_00_00_00_00_04, 2);
    do_learn(48'h02_00_00_00_00_05, 1);          // replaces ..01, the oldest
    expect_lookup(48'h02_00_00_00_00_01, 0, 0);
    expect_lookup(48'h02_00_00_00_00_05, 1, 1);
    expect_lookup(48'h02_00_00_00_00_02, 1, 3);
    expect_lookup(48'h02_00_00_00_00_04, 1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10us; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
