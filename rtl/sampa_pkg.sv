// sampa_pkg: types and constants shared by the SAMPA digital-part model.
//
// The whole readout path works on 10-bit words. A channel's pipeline is
// presamples -> zsu -> dfu -> ring_buffer, clocked at 10 MHz; the ring
// buffer's read side, the link arbiter and the serialiser's word side run
// at 32 MHz, the serialiser's bit side at 320 MHz.
//
// The 10-bit word width, the five-word (50-bit) packet header and the ZSU
// settings (threshold, presamples, postsamples, glitch filter) follow the
// SAMPA description; the bit layout of the header words is this design's
// own choice and is documented with header_t below.
package sampa_pkg;

  localparam int unsigned WORD_W = 10;
  typedef logic [WORD_W-1:0] word_t;

  // Number of 10-bit words in a packet header.
  localparam int unsigned HDR_WORDS = 5;

  // Zero-suppression settings of one channel. Field widths are those of
  // the ZSU registers: thrd[9:0], premask[1:0], postmask[2:0], seq_mask[1:0].
  typedef struct packed {
    logic       en;        // 0: every sample of the window is kept
    word_t      thrd;      // a sample >= thrd is above threshold
    logic [1:0] premask;   // samples kept before a pulse
    logic [2:0] postmask;  // samples kept after a pulse
    logic [1:0] seq_mask;  // glitch filter: minimum run length of a pulse
  } zsu_cfg_t;

  // Time-window tag that travels with each sample through the pipeline.
  typedef struct packed {
    logic  tw;     // sample belongs to a time window
    logic  first;  // first sample of the window
    logic  last;   // last sample of the window
    word_t tc;     // sample index inside the window (time count)
  } tw_tag_t;

  // Write bundle from the data format unit to the ring buffer: up to two
  // words per 10 MHz cycle, in order w0 then w1.
  typedef struct packed {
    logic [1:0] n;      // number of valid words (0..2)
    word_t      w0;
    word_t      w1;
    logic       sow;    // a new window starts with this cycle's samples
    logic       eow;    // the current window ends in this cycle ...
    logic [1:0] n_old;  // ... after its first n_old words
  } dfu_wr_t;

  // Packet header, five 10-bit words sent in order h1..h5.
  //   h1 = {hadd[3:0], channel[4:0], 1'b1}   bit 0 marks a header word
  //   h2 = window start time, global counter bits [19:10]
  //   h3 = number of 10-bit payload words that follow the header
  //   h4 = window start time, global counter bits [9:0]
  //   h5 = {truncated, window number[8:0]}
  typedef struct packed {
    word_t h1;
    word_t h2;
    word_t h3;
    word_t h4;
    word_t h5;
  } header_t;

  // One word of the 32 MHz stream from a ring buffer to a serial link.
  typedef struct packed {
    logic  valid;
    logic  sop;    // first header word of a packet
    logic  eop;    // last word of a packet
    word_t data;
  } link_word_t;

  // Word sent on a serial link when no packet is being transmitted.
  localparam word_t IDLE_WORD = '0;

  function automatic logic [WORD_W-1:0] to_unsigned(input logic [WORD_W-1:0] twos);
    return {~twos[WORD_W-1], twos[WORD_W-2:0]};
  endfunction

endpackage
