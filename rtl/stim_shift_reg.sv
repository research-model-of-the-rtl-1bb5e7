// stim_shift_reg: test-pattern source of the FPGA research platform.
//
// On the test board a host processor writes an input waveform into this
// shift register, and the register plays it into the SAMPA channels at the
// 10 MHz sample rate in place of the ADC. Its 8-bit x 300 size, the idle
// value 09h sent outside a window, and the rule that it plays only while a
// time window is open and the host's enable is released follow the
// description of that platform. This design's own choices: everything runs
// on clk10 (the original switched the register's clock between the host
// and the ADC clock), and the pattern recirculates, so every window
// replays it from where the previous one stopped.
//
// How it works: with host_en high, each load pulse shifts load_data in at
// the tail. With host_en low and tw high, the head word is sent and
// rotated to the tail. dout is registered and zero-extended to 10 bits,
// so its two top bits are always 0: the register holds bytes, and the
// waveforms of the platform show the pattern as small 10-bit values
// (009h baseline, pulse up to 00Fh).
module stim_shift_reg
  import sampa_pkg::*;
#(
  parameter int unsigned LEN  = 300,
  parameter int unsigned W    = 8,
  parameter logic [W-1:0] IDLE = 8'h09
) (
  input  logic         clk10,
  input  logic         rst_n,
  input  logic         host_en,    // 1: host owns the register
  input  logic         load,       // host write strobe
  input  logic [W-1:0] load_data,
  input  logic         tw,         // time window open
  output word_t        dout
);

  logic [W-1:0] sr [LEN];

  always_ff @(posedge clk10 or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < int'(LEN); i++) sr[i] <= IDLE;
      dout <= word_t'(IDLE);
    end else begin
      dout <= word_t'(IDLE);
      if (host_en && load) begin
        for (int i = 0; i < int'(LEN) - 1; i++) sr[i] <= sr[i+1];
        sr[LEN-1] <= load_data;
      end else if (!host_en && tw) begin
        for (int i = 0; i < int'(LEN) - 1; i++) sr[i] <= sr[i+1];
        sr[LEN-1] <= sr[0];
        dout      <= word_t'(sr[0]);
      end
    end

endmodule
