// dfu: data format unit of one channel.
//
// It turns the flagged sample stream of the ZSU into clusters: each run of
// flagged samples inside a time window is written as its samples, then a
// time-count word TC (the window time 0..1023 of the cluster's first
// sample) and a cluster-size word CS (number of 10-bit words of the
// cluster, TC and CS included). A cluster ends when the flag drops or when
// the window ends. This cluster format and the CS counter that starts at 2
// follow the SAMPA description and its DFU waveforms.
//
// Write rate (this design's own solution): closing a cluster produces two
// words (TC, CS) in the cycle after its last sample, and on the last sample
// of a window three (sample, TC, CS). The ring buffer therefore accepts up
// to two words per 10 MHz cycle, and a third word is carried into the next
// cycle, which is the first sample of the next window and needs at most
// one slot. eow marks the cycle in which a window's last word is written,
// n_old how many of that cycle's words still belong to the ending window;
// sow marks the first sample cycle of a window.
//
// Interface: din/flag/tag enter on clk10; the registered bundle wr gives
// the words one cycle later. Windows must be at least two samples long.
module dfu
  import sampa_pkg::*;
(
  input  logic    clk10,
  input  logic    rst_n,
  input  word_t   din,
  input  logic    flag,
  input  tw_tag_t tag,
  output dfu_wr_t wr,
  output logic    dr        // data ready: at least one word written
);

  logic  in_cl;      // a cluster is open
  word_t cnt;        // words of the open cluster, TC and CS included
  word_t tcf;        // TC of the open cluster
  logic  pend;       // a word carried from the previous cycle
  word_t pend_w;

  // Words of the current sample, in order.
  word_t      c [3];
  logic [1:0] nc;
  logic       in_cl_n;
  word_t      cnt_n, tcf_n;
  // Carried word plus current words.
  word_t      l [4];
  logic [2:0] nl;

  always_comb begin
    c       = '{default: '0};
    nc      = 2'd0;
    in_cl_n = in_cl;
    cnt_n   = cnt;
    tcf_n   = tcf;
    if (tag.tw && flag) begin
      if (!in_cl) begin
        tcf_n = tag.tc;
        cnt_n = word_t'(2);
      end
      cnt_n  = cnt_n + word_t'(1);
      c[0]   = din;
      nc     = 2'd1;
      in_cl_n = 1'b1;
      if (tag.last) begin
        c[1]    = tcf_n;
        c[2]    = cnt_n;
        nc      = 2'd3;
        in_cl_n = 1'b0;
      end
    end else if (in_cl) begin
      c[0]    = tcf;
      c[1]    = cnt;
      nc      = 2'd2;
      in_cl_n = 1'b0;
    end

    l  = '{default: '0};
    nl = {1'b0, nc};
    if (pend) begin
      l[0] = pend_w;
      for (int i = 0; i < 3; i++) l[i+1] = c[i];
      nl = {1'b0, nc} + 3'd1;
    end else begin
      for (int i = 0; i < 3; i++) l[i] = c[i];
    end
  end

  always_ff @(posedge clk10 or negedge rst_n)
    if (!rst_n) begin
      in_cl  <= 1'b0;
      cnt    <= word_t'(2);
      tcf    <= '0;
      pend   <= 1'b0;
      pend_w <= '0;
      wr     <= '0;
    end else begin
      in_cl    <= in_cl_n;
      cnt      <= in_cl_n ? cnt_n : word_t'(2);
      tcf      <= tcf_n;
      wr.w0    <= l[0];
      wr.w1    <= l[1];
      wr.n     <= (nl > 3'd2) ? 2'd2 : nl[1:0];
      pend     <= (nl > 3'd2);
      pend_w   <= l[2];
      wr.sow   <= tag.tw && tag.first;
      if (pend) begin
        wr.eow   <= 1'b1;
        wr.n_old <= 2'd1;
      end else if (tag.tw && tag.last && nl <= 3'd2) begin
        wr.eow   <= 1'b1;
        wr.n_old <= nl[1:0];
      end else begin
        wr.eow   <= 1'b0;
        wr.n_old <= 2'd0;
      end
    end

  assign dr = (wr.n != 2'd0);

  // At most one word is ever carried: after a carry the next cycle holds
  // the first sample of a window, which produces at most one word.
  assert property (@(posedge clk10) disable iff (!rst_n) nl <= 3'd3);

endmodule
