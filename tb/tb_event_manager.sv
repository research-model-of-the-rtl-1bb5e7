// tb_event_manager: self-checking test of the time-window generator.
//
// Continuous mode: windows of ns_e samples must follow each other without
// a gap, tc counting 0 .. ns_e-1 with first/last on the ends. Triggered
// mode: a trigger edge opens a window on the next cycle; an edge inside an
// open window is refused and reported on trg_early; an edge on the last
// sample starts the next window right after it. The window counter must
// count every window.
`timescale 1ns/1ps
module tb_event_manager;
  import sampa_pkg::*;

  logic clk10 = 0, rst_n = 0;
  always #50 clk10 = ~clk10;

  logic    cont = 0, trg = 0, trg_early;
  word_t   ns_e = 10'd7;
  tw_tag_t tag;
  logic [15:0] win_cnt;

  event_manager dut (.clk10, .rst_n, .cont, .trg, .ns_e, .tag, .trg_early, .win_cnt);

  int checks = 0, failures = 0;
  int early = 0;
  always @(posedge clk10) if (rst_n && trg_early) early++;

  task automatic expect_tag(input logic tw, input int tc, input logic first, input logic last, input string what);
    checks++;
    if (tag.tw !== tw || (tw && (int'(tag.tc) != tc || tag.first !== first || tag.last !== last))) begin
      failures++;
      $display("FAIL %s: tw=%b tc=%0d first=%b last=%b, expected %b %0d %b %b",
               what, tag.tw, tag.tc, tag.first, tag.last, tw, tc, first, last);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk10);
    rst_n = 1;
    repeat (3) @(posedge clk10); #1;
    expect_tag(0, 0, 0, 0, "idle after reset");

    // Triggered mode.
    // The edge is seen on the next clock, and the window's first sample
    // is the one of the cycle after that clock.
    @(negedge clk10) trg = 1;
    for (int i = 0; i < 7; i++) begin
      @(posedge clk10); #1;
      expect_tag(1, i, i == 0, i == 6, "triggered window");
      if (i == 3) begin
        // A second edge inside the window is refused.
        trg = 0; @(posedge clk10); #1;
        expect_tag(1, 4, 0, 0, "refused trigger");
        trg = 1; i++;
      end
    end
    @(posedge clk10); #1;
    checks++;
    if (early != 1) begin failures++; $display("FAIL trg_early reported %0d times", early); end
    expect_tag(0, 0, 0, 0, "window closed");
    trg = 0;
    checks++;
    if (win_cnt != 16'd1) begin failures++; $display("FAIL win_cnt=%0d", win_cnt); end

    // Continuous mode, several window lengths.
    foreach (ns_e_list[k]) begin
      ns_e = ns_e_list[k];
      @(negedge clk10) cont = 1;
      for (int w = 0; w < 3; w++)
        for (int i = 0; i < int'(ns_e); i++) begin
          @(posedge clk10); #1;
          expect_tag(1, i, i == 0, i == int'(ns_e) - 1, "continuous");
        end
      cont = 0;
      @(posedge clk10);   // current window finishes
      while (tag.tw) @(posedge clk10);
    end
    checks++;
    if (win_cnt < 16'd10) begin failures++; $display("FAIL win_cnt=%0d", win_cnt); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t ns_e_list [3] = '{10'd2, 10'd5, 10'd300};
endmodule
