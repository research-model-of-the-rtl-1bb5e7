// ring_buffer: per-channel packet buffer between the 10 MHz processing
// and the 32 MHz serial-link side.
//
// Write side (clk10): the cluster words of the data format unit are stored
// in a circular data memory of DATA_DEPTH 10-bit words while num10bit
// counts them. When the window ends (eow), the packet is closed: a 50-bit
// header - channel address, window start time, payload size num10bit,
// truncation flag, window number - is stored in the header memory and the
// packet becomes visible to the read side. Read side (clk32): an output
// state machine waits for a complete packet and a grant from the link
// arbiter, then sends the five header words followed by num10bit payload
// words, one word per clk32 cycle, without gaps.
//
// From the SAMPA description: the 2048 x 10 data memory, the header memory
// of 256 x 10 bits, the 10 MHz write / 32 MHz read split, the five-word
// header holding the payload size, and that the size only changes after
// the header has been formed. This design's own choices: the data memory is
// split into two banks (even and odd addresses) so that two words can be
// written per 10 MHz cycle (see dfu); the header memory holds one 50-bit
// entry per packet (32 entries, the same 256 x 10 bits when each packet
// uses an 8-word slot); the header layout (see sampa_pkg::header_t);
// pointers cross the clock domains in Gray code (gray_sync). When the data
// memory is full, or a packet reaches 1023 payload words, further words of
// that packet are dropped and the header's truncated bit is set; when all
// 32 header entries are in use at the end of a window, the whole packet is
// dropped and dropped_pkts counts it. The window start time is the global
// counter value when the window's first word reaches this block.
//
// Interface: wr (clk10) from dfu; req/gnt/out (clk32) to the link arbiter.
// gnt may be given in a cycle where req is high; out carries the packet
// starting two cycles later, sop on the first header word, eop on the last
// word.
module ring_buffer
  import sampa_pkg::*;
#(
  parameter int unsigned DATA_DEPTH = 2048,  // words, power of two
  parameter int unsigned HDR_PKTS   = 32     // header entries, power of two
) (
  input  logic        clk10,
  input  logic        rst10_n,
  input  logic        clk32,
  input  logic        rst32_n,
  input  logic [3:0]  hadd,      // chip address
  input  logic [4:0]  ch,        // channel number
  input  logic [19:0] gtime,     // global time, clk10 domain
  input  dfu_wr_t     wr,
  output logic        req,       // clk32: a packet is waiting
  input  logic        gnt,       // clk32: start sending it
  output link_word_t  out,       // clk32
  output logic        d_full,    // clk10: data memory full
  output logic        h_full,    // clk10: all header entries in use
  output logic [15:0] dropped_pkts
);

  localparam int unsigned AW = $clog2(DATA_DEPTH);
  localparam int unsigned PW = $clog2(HDR_PKTS);
  typedef logic [AW:0] ptr_t;
  typedef logic [PW:0] pkt_t;

  // Memories: two data banks and the header memory.
  word_t   bank0 [DATA_DEPTH/2];
  word_t   bank1 [DATA_DEPTH/2];
  header_t hmem  [HDR_PKTS];

  // ------------------------------------------------------------------
  // Write side, clk10
  // ------------------------------------------------------------------
  ptr_t  wp, pkt_start;
  ptr_t  rp_s;                 // read pointer seen in this domain
  pkt_t  hpkt;                 // packets closed so far
  pkt_t  rpkt_s;               // packets sent, seen in this domain
  logic [10:0] num10bit;
  logic  trunc;
  logic [19:0] t_start;
  logic [8:0]  win;

  logic        drop;
  logic        we   [2];
  ptr_t        wa   [2];
  word_t       wd   [2];
  ptr_t        wp_n, pkt_start_n;
  logic [10:0] num_n;
  word_t       size_old;  // payload size of the closing packet (<= 1023)
  logic        trunc_n, trunc_old, close;
  ptr_t        used;

  assign h_full = ((hpkt - rpkt_s) >= pkt_t'(HDR_PKTS));
  assign d_full = ((wp - rp_s) >= ptr_t'(DATA_DEPTH));
  assign drop   = wr.eow && h_full;

  always_comb begin
    ptr_t  a;
    word_t w;
    a           = wp;
    used        = wp - rp_s;
    num_n       = num10bit;
    trunc_n     = trunc;
    pkt_start_n = pkt_start;
    size_old    = word_t'(num10bit);
    trunc_old   = trunc;
    close       = 1'b0;
    for (int i = 0; i < 2; i++) begin
      we[i] = 1'b0;
      wa[i] = '0;
      wd[i] = '0;
    end
    for (int i = 0; i < 2; i++) begin
      w = (i == 0) ? wr.w0 : wr.w1;
      if (wr.eow && !close && 2'(i) == wr.n_old) begin
        // The ending window's words are all in; the rest open the next.
        close       = 1'b1;
        size_old    = word_t'(num_n);
        trunc_old   = trunc_n;
        pkt_start_n = drop ? pkt_start : a;
        a           = pkt_start_n;
        used        = a - rp_s;
        num_n       = '0;
        trunc_n     = 1'b0;
      end
      if (2'(i) < wr.n) begin
        if (!trunc_n && used < ptr_t'(DATA_DEPTH) && num_n < 11'd1023) begin
          we[i] = !(drop && !close);
          wa[i] = a;
          wd[i] = w;
          a     = a + ptr_t'(1);
          used  = used + ptr_t'(1);
          num_n = num_n + 11'd1;
        end else begin
          trunc_n = 1'b1;
        end
      end
    end
    if (wr.eow && !close) begin
      close       = 1'b1;
      size_old    = word_t'(num_n);
      trunc_old   = trunc_n;
      pkt_start_n = drop ? pkt_start : a;
      a           = pkt_start_n;
      num_n       = '0;
      trunc_n     = 1'b0;
    end
    wp_n = a;
  end

  always_ff @(posedge clk10) begin
    for (int i = 0; i < 2; i++)
      if (we[i]) begin
        if (wa[i][0]) bank1[wa[i][AW-1:1]] <= wd[i];
        else          bank0[wa[i][AW-1:1]] <= wd[i];
      end
    if (close && !drop)
      hmem[hpkt[PW-1:0]] <= '{h1: {hadd, ch, 1'b1},
                              h2: t_start[19:10],
                              h3: size_old,
                              h4: t_start[9:0],
                              h5: {trunc_old, win}};
  end

  always_ff @(posedge clk10 or negedge rst10_n)
    if (!rst10_n) begin
      wp           <= '0;
      pkt_start    <= '0;
      hpkt         <= '0;
      num10bit     <= '0;
      trunc        <= 1'b0;
      t_start      <= '0;
      win          <= '0;
      dropped_pkts <= '0;
    end else begin
      wp        <= wp_n;
      pkt_start <= pkt_start_n;
      num10bit  <= num_n;
      trunc     <= trunc_n;
      if (wr.sow) t_start <= gtime;
      if (close) begin
        win <= win + 9'd1;
        if (drop) dropped_pkts <= dropped_pkts + 16'd1;
        else      hpkt         <= hpkt + pkt_t'(1);
      end
    end

  // ------------------------------------------------------------------
  // Read side, clk32
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_HEAD, S_DATA} ostate_t;

  ostate_t     state;
  ptr_t        rp;
  pkt_t        rpkt, hpkt_s;
  header_t     hq;
  logic [2:0]  hidx;
  logic [9:0]  rem;
  word_t       dq;
  // What the output register presents this cycle.
  logic        o_valid, o_sop, o_eop, o_hdr;
  word_t       o_hword;

  assign req = (state == S_IDLE) && (hpkt_s != rpkt);

  always_ff @(posedge clk32)
    dq <= rp[0] ? bank1[rp[AW-1:1]] : bank0[rp[AW-1:1]];

  always_ff @(posedge clk32 or negedge rst32_n)
    if (!rst32_n) begin
      state   <= S_IDLE;
      rp      <= '0;
      rpkt    <= '0;
      hq      <= '0;
      hidx    <= '0;
      rem     <= '0;
      o_valid <= 1'b0;
      o_sop   <= 1'b0;
      o_eop   <= 1'b0;
      o_hdr   <= 1'b0;
      o_hword <= '0;
    end else begin
      o_valid <= 1'b0;
      o_sop   <= 1'b0;
      o_eop   <= 1'b0;
      o_hdr   <= 1'b0;
      unique case (state)
        S_IDLE: if (req && gnt) begin
          hq    <= hmem[rpkt[PW-1:0]];
          hidx  <= '0;
          state <= S_HEAD;
        end
        S_HEAD: begin
          o_valid <= 1'b1;
          o_hdr   <= 1'b1;
          o_sop   <= (hidx == 3'd0);
          o_hword <= hq[(HDR_WORDS-1-int'(hidx))*WORD_W +: WORD_W];
          hidx    <= hidx + 3'd1;
          if (hidx == 3'(HDR_WORDS-1)) begin
            rem <= hq.h3;
            if (hq.h3 == '0) begin
              o_eop <= 1'b1;
              rpkt  <= rpkt + pkt_t'(1);
              state <= S_IDLE;
            end else begin
              state <= S_DATA;
            end
          end
        end
        S_DATA: begin
          // dq is loaded from rp on this same edge.
          o_valid <= 1'b1;
          rp      <= rp + ptr_t'(1);
          rem     <= rem - 10'd1;
          if (rem == 10'd1) begin
            o_eop <= 1'b1;
            rpkt  <= rpkt + pkt_t'(1);
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end

  assign out = '{valid: o_valid, sop: o_sop, eop: o_eop,
                 data:  o_hdr ? o_hword : dq};

  // ------------------------------------------------------------------
  // Clock-domain crossings of the pointers
  // ------------------------------------------------------------------
  gray_sync #(.W(AW+1)) u_rp_sync (
    .src_clk(clk32), .src_rst_n(rst32_n), .src_bin(rp),
    .dst_clk(clk10), .dst_rst_n(rst10_n), .dst_bin(rp_s));

  gray_sync #(.W(PW+1)) u_rpkt_sync (
    .src_clk(clk32), .src_rst_n(rst32_n), .src_bin(rpkt),
    .dst_clk(clk10), .dst_rst_n(rst10_n), .dst_bin(rpkt_s));

  gray_sync #(.W(PW+1)) u_hpkt_sync (
    .src_clk(clk10), .src_rst_n(rst10_n), .src_bin(hpkt),
    .dst_clk(clk32), .dst_rst_n(rst32_n), .dst_bin(hpkt_s));

endmodule
