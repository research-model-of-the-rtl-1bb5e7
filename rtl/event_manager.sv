// event_manager: opens and closes the acquisition time windows.
//
// A time window is ns_e consecutive 10 MHz samples; each window becomes one
// packet per channel. Two modes follow the SAMPA description:
//   continuous (cont = 1): windows follow each other without a gap, the
//     next one starting on the sample after the last one of the previous;
//   triggered  (cont = 0): a rising edge on trg opens a window on the next
//     sample; the window closes after ns_e samples and waits for the next
//     trigger.
// A trigger edge while a window is still open (other than on its last
// sample) is not honoured; trg_early pulses for one cycle to report it.
// That rejection rule, the one-cycle trigger latency and the minimum window
// length of 2 are this design's own choices.
//
// Interface: trg is synchronous to clk10. The tag output is registered and
// describes the sample that leaves the presamples block on the same cycle;
// tc counts 0 .. ns_e-1 inside the window. win_cnt counts opened windows.
module event_manager
  import sampa_pkg::*;
#(
  parameter int unsigned NS_E_MAX = 1021   // largest window length
) (
  input  logic    clk10,
  input  logic    rst_n,
  input  logic    cont,       // 1: continuous mode, 0: triggered mode
  input  logic    trg,        // external trigger, level, synchronous
  input  word_t   ns_e,       // samples per window (clamped to 2..NS_E_MAX)
  output tw_tag_t tag,
  output logic    trg_early,
  output logic [15:0] win_cnt
);

  word_t len;
  always_comb begin
    len = ns_e;
    if (len < word_t'(2))        len = word_t'(2);
    if (len > word_t'(NS_E_MAX)) len = word_t'(NS_E_MAX);
  end

  logic  trg_d;
  logic  trg_edge;
  logic  open_now;   // the sample of this cycle is the last one of a window
  logic  start;

  assign trg_edge = trg && !trg_d;
  assign open_now = tag.tw && !tag.last;
  assign start    = !open_now && (cont || trg_edge);

  always_ff @(posedge clk10 or negedge rst_n)
    if (!rst_n) begin
      trg_d     <= 1'b0;
      tag       <= '0;
      trg_early <= 1'b0;
      win_cnt   <= '0;
    end else begin
      trg_d     <= trg;
      trg_early <= trg_edge && open_now && !cont;
      if (start) begin
        tag.tw    <= 1'b1;
        tag.first <= 1'b1;
        tag.last  <= (len == word_t'(1));
        tag.tc    <= '0;
        win_cnt   <= win_cnt + 16'd1;
      end else if (open_now) begin
        tag.first <= 1'b0;
        tag.tc    <= tag.tc + word_t'(1);
        tag.last  <= (tag.tc + word_t'(2) == len);
      end else begin
        tag <= '0;
      end
    end

endmodule
