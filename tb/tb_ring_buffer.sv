// tb_ring_buffer: self-checking test of the packet ring buffer.
//
// A producer on a 10 MHz clock writes windows of random words (0 to 2 per
// cycle, with the end of one window and the start of the next sharing a
// cycle as the data format unit does), and a reader on an unrelated
// 32 MHz clock grants packets and collects them. Every packet must carry
// the header {hadd,ch,1}, start time high, size, start time low,
// {truncated, window number} and then exactly the window's words, sent on
// consecutive 32 MHz cycles. Then the reader stalls so that the data
// memory fills (packets truncated, flag set) and all header entries fill
// (packets dropped and counted); after it resumes, every packet received
// must still be a consistent prefix of its window. Sizes are reduced
// (64-word data memory, 8 header entries) to reach the full cases quickly.
`timescale 1ns/1ps
module tb_ring_buffer;
  import sampa_pkg::*;

  localparam int DEPTH = 64;
  localparam int HP    = 8;

  logic clk10 = 0, clk32 = 0, rst10_n = 0, rst32_n = 0;
  always #50    clk10 = ~clk10;
  always #15.625 clk32 = ~clk32;

  logic [3:0]  hadd = 4'hA;
  logic [4:0]  ch   = 5'd19;
  logic [19:0] gtime = 0;
  dfu_wr_t     wr;
  logic        req, gnt;
  link_word_t  out;
  logic        d_full, h_full;
  logic [15:0] dropped_pkts;

  ring_buffer #(.DATA_DEPTH(DEPTH), .HDR_PKTS(HP)) dut (.*);

  int checks = 0, failures = 0;

  always @(posedge clk10) gtime <= gtime + 20'd4;

  // Expected windows.
  word_t       win_words [$][$];
  logic [19:0] win_time  [$];

  // ---------------- producer ----------------
  task automatic produce(input int nwin, input int maxlen);
    word_t pend [$];
    int    w = 0;
    logic  own_start;
    int    idx = 0;
    logic  started = 0;
    word_t cur [$];
    // Build all windows first.
    int base = win_words.size();
    for (int k = 0; k < nwin; k++) begin
      word_t l [$];
      int n = $urandom_range(0, maxlen);
      for (int i = 0; i < n; i++) l.push_back(word_t'($urandom));
      win_words.push_back(l);
      win_time.push_back(0);
    end
    w = base;
    while (w < base + nwin) begin
      dfu_wr_t b;
      int slots;
      @(negedge clk10);
      b = '0;
      slots = $urandom_range(0, 2);
      own_start = 0;
      if (!started) begin
        b.sow = 1; started = 1; win_time[w] = gtime; idx = 0; own_start = 1;
        if (slots == 0) slots = 1;
      end
      for (int s = 0; s < slots && w < base + nwin; s++) begin
        // A window never ends in the cycle of its own first sample.
        if (own_start && idx >= win_words[w].size()) break;
        if (idx < win_words[w].size()) begin
          if (b.n == 0) b.w0 = win_words[w][idx]; else b.w1 = win_words[w][idx];
          b.n++; idx++;
        end
        if (idx >= win_words[w].size() && !b.eow && !own_start) begin
          // Window ends in this cycle.
          b.eow = 1; b.n_old = b.n;
          w++; idx = 0;
          if (w < base + nwin && b.n < 2 && $urandom_range(0, 1)) begin
            b.sow = 1; win_time[w] = gtime;
            if (win_words[w].size() > 0) begin
              if (b.n == 0) b.w0 = win_words[w][0]; else b.w1 = win_words[w][0];
              b.n++; idx = 1;
            end
          end else begin
            started = 0;
          end
          break;
        end
      end
      wr = b;
    end
    @(negedge clk10); wr = '0;
  endtask

  // ---------------- reader ----------------
  logic  read_en = 1;
  int    pkts = 0, truncs = 0;
  word_t pk [$];
  logic  in_pkt = 0;

  always_comb gnt = req && read_en;

  always @(posedge clk32) if (rst32_n) begin
    if (out.valid) begin
      if (out.sop) begin
        if (in_pkt) begin failures++; $display("FAIL sop inside packet"); end
        in_pkt = 1; pk = {};
      end
      pk.push_back(out.data);
      if (out.eop) begin
        in_pkt = 0;
        check_packet(pk);
      end
    end else if (in_pkt) begin
      failures++; $display("FAIL gap inside a packet");
      in_pkt = 0;
    end
  end

  task automatic check_packet(input word_t p [$]);
    int wn, size;
    logic tr;
    checks++;
    pkts++;
    if (p.size() < 5) begin failures++; $display("FAIL short packet"); return; end
    wn   = int'(p[4][8:0]);
    tr   = p[4][9];
    size = int'(p[2]);
    if (tr) truncs++;
    if (p[0] != {hadd, ch, 1'b1} || p.size() != 5 + size || wn >= win_words.size()) begin
      failures++;
      $display("FAIL header %p", p);
      return;
    end
    checks++;
    if ({p[1], p[3]} != win_time[wn]) begin
      failures++; $display("FAIL window %0d time %h expected %h", wn, {p[1], p[3]}, win_time[wn]);
    end
    checks++;
    if (!tr && size != win_words[wn].size()) begin
      failures++; $display("FAIL window %0d size %0d expected %0d", wn, size, win_words[wn].size());
    end
    for (int i = 0; i < size; i++) begin
      checks++;
      if (i >= win_words[wn].size() || p[5+i] != win_words[wn][i]) begin
        failures++;
        if (failures < 8) $display("FAIL window %0d word %0d", wn, i);
      end
    end
  endtask

  initial begin : watchdog
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen_full = 0;
    wr = '0;
    #200 rst10_n = 1; rst32_n = 1;
    repeat (3) @(posedge clk10);

    // Normal flow: every window arrives complete.
    produce(30, 20);
    repeat (40) @(posedge clk10);
    checks++;
    if (pkts != 30 || truncs != 0 || dropped_pkts != 0) begin
      failures++; $display("FAIL normal flow: %0d packets, %0d truncated, %0d dropped", pkts, truncs, dropped_pkts);
    end

    // Stalled reader: memory and header entries fill.
    read_en = 0;
    fork
      produce(12, 30);
      forever @(posedge clk10) if (d_full) seen_full++;
    join_any
    disable fork;
    repeat (10) @(posedge clk10);
    read_en = 1;
    repeat (200) @(posedge clk10);
    checks++;
    if (seen_full == 0 || dropped_pkts == 0 || truncs == 0) begin
      failures++;
      $display("FAIL overflow: full=%0d dropped=%0d truncated=%0d", seen_full, dropped_pkts, truncs);
    end
    checks++;
    if (pkts + int'(dropped_pkts) != 42) begin
      failures++; $display("FAIL %0d packets + %0d dropped != 42", pkts, dropped_pkts);
    end

    // Flow again after the overflow.
    begin
      int pkts0;
      pkts0 = pkts;
      produce(10, 20);
      repeat (60) @(posedge clk10);
      checks++;
      if (pkts - pkts0 != 10) begin failures++; $display("FAIL recovery: %0d packets", pkts - pkts0); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
