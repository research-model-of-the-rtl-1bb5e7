// tb_presamples: self-checking test of the presamples block.
//
// Random two's complement ADC words must come out with 512 added (MSB
// inverted) after npre + 1 cycles, for several npre; test-input words must
// pass unchanged with the same delay.
`timescale 1ns/1ps
module tb_presamples;
  import sampa_pkg::*;

  logic clk10 = 0, rst_n = 0;
  always #50 clk10 = ~clk10;

  word_t adc_in = 0, test_in = 0, dout;
  logic  use_test = 0;
  logic [4:0] npre = 0;

  presamples dut (.clk10, .rst_n, .adc_in, .test_in, .use_test, .npre, .dout);

  int checks = 0, failures = 0;
  word_t hist [$];

  initial begin : watchdog
    repeat (20000) @(posedge clk10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int np [4] = '{0, 2, 3, 31};
    repeat (2) @(posedge clk10);
    rst_n = 1;
    foreach (np[k]) for (int m = 0; m < 2; m++) begin
      npre = 5'(np[k]); use_test = m[0];
      hist = {};
      for (int i = 0; i < 100; i++) begin
        @(negedge clk10);
        adc_in  = $urandom; test_in = $urandom;
        hist.push_front(use_test ? test_in : word_t'(int'($signed(adc_in)) + 512));
        @(posedge clk10); #1;
        if (i > np[k] + 1) begin
          checks++;
          if (dout !== hist[np[k]]) begin
            failures++;
            if (failures < 5) $display("FAIL npre=%0d: %h expected %h", np[k], dout, hist[np[k]]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
