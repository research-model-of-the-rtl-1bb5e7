// tb_stim_shift_reg: self-checking test of the test-pattern register.
//
// The host loads 300 bytes; outside a window the output is the idle value
// 09h; while the host holds its enable nothing plays; inside windows the
// 300 bytes come out in load order, one per cycle, and the pattern
// recirculates across windows.
`timescale 1ns/1ps
module tb_stim_shift_reg;
  import sampa_pkg::*;

  logic clk10 = 0, rst_n = 0;
  always #50 clk10 = ~clk10;

  logic       host_en = 1, load = 0, tw = 0;
  logic [7:0] load_data = 0;
  word_t      dout;

  stim_shift_reg dut (.clk10, .rst_n, .host_en, .load, .load_data, .tw, .dout);

  int checks = 0, failures = 0;
  logic [7:0] pat [300];

  initial begin : watchdog
    repeat (10000) @(posedge clk10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos = 0;
    repeat (2) @(posedge clk10);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      pat[i] = 8'($urandom);
      @(negedge clk10); load = 1; load_data = pat[i];
    end
    @(negedge clk10); load = 0;
    // Window open but host still owns the register: idle value.
    tw = 1;
    repeat (3) begin
      @(posedge clk10); #1;
      checks++;
      if (dout != 10'h009) begin failures++; $display("FAIL played while host enabled"); end
    end
    @(negedge clk10); tw = 0; host_en = 0;
    // Three windows of 160, 100 and 120 samples.
    foreach (wl[k]) begin
      @(negedge clk10); tw = 1;
      for (int i = 0; i < wl[k]; i++) begin
        @(posedge clk10); #1;
        checks++;
        if (dout != word_t'(pat[pos % 300])) begin
          failures++;
          if (failures < 5) $display("FAIL sample %0d: %h expected %h", pos, dout, pat[pos % 300]);
        end
        pos++;
        if (i == wl[k] - 1) begin @(negedge clk10); tw = 0; end
      end
      repeat (2) begin
        @(posedge clk10); #1;
        checks++;
        if (dout != 10'h009) begin failures++; $display("FAIL idle value %h", dout); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int wl [3] = '{160, 100, 120};
endmodule
