// tb_global_counter: self-checking test of the 20-bit global counter.
//
// The count must advance by one per enabled clk40 edge, hold when
// disabled, and wrap from 2^20-1 to 0 (checked on a reduced 6-bit copy as
// well as on the 20-bit default).
`timescale 1ns/1ps
module tb_global_counter;

  logic clk40 = 0, rst_n = 0, en = 0;
  always #12.5 clk40 = ~clk40;

  logic [19:0] count;
  logic [5:0]  count6;

  global_counter dut (.clk40, .rst_n, .en, .count);
  global_counter #(.W(6)) dut6 (.clk40, .rst_n, .en, .count(count6));

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk40);
    rst_n = 1;
    @(negedge clk40) en = 1;
    for (int i = 1; i <= 200; i++) begin
      @(posedge clk40); #1;
      checks++;
      if (count != 20'(i) || count6 != 6'(i)) begin
        failures++; $display("FAIL step %0d: %0d %0d", i, count, count6);
      end
      if (i == 100) begin
        en = 0;
        repeat (5) @(posedge clk40); #1;
        checks++;
        if (count != 20'd100) begin failures++; $display("FAIL hold: %0d", count); end
        @(negedge clk40) en = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
