// tb_clock_manager: self-checking test of the clock manager.
//
// Counts clk320 periods between rising edges of each derived clock:
// 10 for clk32, 8 for clk40, 32 for clk10; checks that word_load comes
// once every 10 clk320 cycles while clk32 is low (middle of its period),
// that the external clock inputs are used when selected, and that every
// domain reset is released after rst_n.
`timescale 1ns/1ps
module tb_clock_manager;

  logic clk320 = 0, clk40_ext = 0, clk10_ext = 0, rst_n = 0;
  logic sel_ext40 = 0, sel_ext10 = 0;
  logic clk32, clk40, clk10, word_load;
  logic rst320_n, rst32_n, rst40_n, rst10_n;

  always #1.5625 clk320 = ~clk320;
  always #7      clk40_ext = ~clk40_ext;   // deliberately not 40 MHz
  always #33     clk10_ext = ~clk10_ext;

  clock_manager dut (.*);

  int checks = 0, failures = 0;
  int n320 = 0;
  int last32 = -1, last40 = -1, last10 = -1, lastld = -1;
  int p32 [$], p40 [$], p10 [$], pld [$];
  logic ld_while_high = 0;

  always @(posedge clk320) begin
    n320++;
    if (word_load) begin
      if (lastld >= 0) pld.push_back(n320 - lastld);
      lastld = n320;
      if (clk32) ld_while_high = 1;
    end
  end
  always @(posedge clk32) begin if (last32 >= 0) p32.push_back(n320 - last32); last32 = n320; end
  always @(posedge clk40) begin if (last40 >= 0) p40.push_back(n320 - last40); last40 = n320; end
  always @(posedge clk10) begin if (last10 >= 0) p10.push_back(n320 - last10); last10 = n320; end

  task automatic check_all(input int q [$], input int val, input string what);
    checks++;
    if (q.size() < 3) begin failures++; $display("FAIL %s: only %0d edges", what, q.size()); return; end
    foreach (q[i]) if (q[i] != val) begin
      failures++; $display("FAIL %s: period %0d expected %0d", what, q[i], val); return;
    end
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20 rst_n = 1;
    #200;
    p32 = {}; p40 = {}; p10 = {}; pld = {};
    #3000;
    check_all(p32, 10, "clk32");
    check_all(p40, 8, "clk40");
    check_all(p10, 32, "clk10");
    check_all(pld, 10, "word_load");
    checks++;
    if (ld_while_high) begin failures++; $display("FAIL word_load while clk32 high"); end
    checks++;
    if (!(rst320_n && rst32_n && rst40_n && rst10_n)) begin failures++; $display("FAIL resets not released"); end
    // External clocks.
    sel_ext40 = 1; sel_ext10 = 1;
    #1000;
    repeat (20) begin
      #0.7;
      checks++;
      if (clk40 !== clk40_ext || clk10 !== clk10_ext) begin failures++; $display("FAIL external clock not selected"); end
    end
    // Reset asserts every domain reset at once.
    rst_n = 0; #1;
    checks++;
    if (rst320_n || rst32_n || rst40_n || rst10_n) begin failures++; $display("FAIL resets not asserted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
