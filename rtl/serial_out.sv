// serial_out: one 320 Mbit/s serial output link.
//
// The link side of the SAMPA runs at 320 MHz and is fed from the ring
// buffers at 32 MHz, ten bits per 32 MHz cycle, so one 10-bit word leaves
// per 32 MHz period. That rate relation follows the SAMPA description; the
// bit order (LSB first), the idle word (all zeros, sent whenever no packet
// word is available) and the loading scheme are this design's own.
//
// How it works: the clock manager's word_load strobe comes once every ten
// clk320 cycles, in the middle of a clk32 period, when the 32 MHz word
// register is stable. On that edge the 10-bit shift register loads the
// word; on the other nine edges it shifts right by one. sout is the shift
// register's bit 0, so each word appears LSB first over ten clk320 cycles.
// A receiver finds a packet as the first non-zero word after idle: the
// first header word always has bit 0 set.
//
// Interface: word is from the clk32 domain; sout and word_cnt are clk320
// registers. word_cnt counts the packet words sent. The sop/eop bits of
// word are not used here: on the line a packet is framed by its first
// header word and its size field.
module serial_out
  import sampa_pkg::*;
(
  input  logic       clk320,
  input  logic       rst_n,
  input  logic       word_load,
  input  link_word_t word,
  output logic       sout,
  output logic [31:0] word_cnt
);

  word_t shreg;

  always_ff @(posedge clk320 or negedge rst_n)
    if (!rst_n) begin
      shreg    <= IDLE_WORD;
      word_cnt <= '0;
    end else if (word_load) begin
      shreg <= word.valid ? word.data : IDLE_WORD;
      if (word.valid) word_cnt <= word_cnt + 32'd1;
    end else begin
      shreg <= shreg >> 1;
    end

  assign sout = shreg[0];

endmodule
