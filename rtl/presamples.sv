// presamples: first digital stage of a channel, right after the ADC.
//
// The ADC delivers 10-bit two's complement samples (-512 .. 511) while the
// rest of the chip works on unsigned samples (0 .. 1023). Inverting the
// MSB adds 512 and does that conversion, as the SAMPA description states.
// The block also delays the stream by npre samples, so that a time window
// opened by a trigger starts npre samples before the trigger arrived:
// these are the before-trigger samples, useful in triggered mode.
//
// The delay line depth (PRE_MAX) and the test-input selection are this
// design's own: with use_test = 1 the channel takes test_in, which is
// already unsigned, instead of the ADC word.
//
// Timing: the output register dout follows the selected input by
// npre + 1 clk10 cycles (npre is clamped to PRE_MAX - 1).
module presamples
  import sampa_pkg::*;
#(
  parameter int unsigned PRE_MAX = 32
) (
  input  logic  clk10,
  input  logic  rst_n,
  input  word_t adc_in,    // two's complement
  input  word_t test_in,   // unsigned test pattern
  input  logic  use_test,
  input  logic [$clog2(PRE_MAX)-1:0] npre,
  output word_t dout       // unsigned
);

  word_t line [PRE_MAX];

  always_ff @(posedge clk10 or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < int'(PRE_MAX); i++) line[i] <= '0;
    end else begin
      line[0] <= use_test ? test_in : to_unsigned(adc_in);
      for (int i = 1; i < int'(PRE_MAX); i++) line[i] <= line[i-1];
    end

  assign dout = line[npre];

endmodule
