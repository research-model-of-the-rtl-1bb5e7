// tb_sampa_emu: end-to-end test of the SAMPA digital part at its default
// size (32 channels, 4 serial links, 2048-word data memories, 32 header
// entries), driven only through the chip's ports.
//
// A reference model here follows every sample: it rebuilds what each
// channel's presamples stage delivers (ADC words made unsigned, or the
// test-pattern register played during windows), finds pulses (runs at or
// above threshold no shorter than the glitch length), flags the kept
// samples, cuts the windows into clusters (samples, TC, CS) and predicts
// one packet per channel and window. Four receivers deserialise the links
// (LSB first; a packet starts with the first set bit after idle) and every
// packet must match: header {hadd, channel, 1}, window time stamp (the
// difference between windows must be 4 x their distance in samples),
// payload size, window number and payload. Truncated packets must be a
// prefix of the prediction; dropped packets are counted by the chip.
//
// Phases:
//   A  test pattern with 0..4 signals of 8 samples per 300-sample window,
//      ZSU on (threshold 0Ah, 2 presamples, 3 postsamples, glitch 2),
//      continuous mode: packets of 5, 20, 35, 50, 65 words;
//   B  ADC input, triggered mode, 5 presamples, pulses, glitches, triggers
//      inside open windows;
//   C  continuous 8-sample windows: header entries fill, packets dropped;
//   D  ZSU off, 300-sample windows: 307-word packets, data memories fill,
//      packets truncated;
//   then the links drain. Each mechanism must occur at least once.
`timescale 1ns/1ps
module tb_sampa_emu;
  import sampa_pkg::*;

  localparam int N_CH = 32, N_LINK = 4;

  logic clk320 = 0, rst_n = 0;
  logic rst_pin = 1;   // the chip's reset pin; rst_n gates the checkers
  always #1.5625 clk320 = ~clk320;

  logic        clk_adc;
  word_t       adc [N_CH];
  logic        cont = 0, trg = 0, use_test = 1, stim_host_en = 1, stim_load = 0;
  word_t       ns_e = 10'd300;
  logic [4:0]  npre = 0;
  zsu_cfg_t    zcfg;
  logic [7:0]  stim_data = 0;
  logic        sout [N_LINK];
  logic        tw, trg_early, any_full;
  logic [15:0] win_cnt;
  logic [31:0] link_words [N_LINK];
  logic [15:0] dropped_pkts [N_CH];

  sampa_emu dut (
    .clk320, .clk40_ext(1'b0), .clk10_ext(1'b0), .rst_n(rst_pin),
    .sel_ext40(1'b0), .sel_ext10(1'b0), .hadd(4'h5),
    .adc, .clk_adc, .cont, .trg, .ns_e, .npre, .zcfg,
    .use_test, .stim_host_en, .stim_load, .stim_data,
    .sout, .tw, .trg_early, .any_full, .win_cnt, .link_words, .dropped_pkts);

  int checks = 0, failures = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s (t=%0t)", msg, $time);
  endtask

  // ---------------------------------------------------------------
  // Reference model, advanced on every clk_adc edge
  // ---------------------------------------------------------------
  int    k = 0;                      // edge index
  localparam int MAXK = 40000;       // edges of clk_adc simulated at most
  word_t L     [N_CH][MAXK];         // presamples input history
  word_t S     [N_CH][MAXK];         // ZSU input stream
  bit    P     [N_CH][MAXK];         // pulse sample
  int    run   [N_CH];
  byte   stimq [$];
  word_t stim_out = 10'h009, stim_prev = 10'h009;
  logic  T_prev = 0;
  // Windows.
  int        wcount = 0;
  int        w_left = 0;
  int        w_start [$];
  int        w_len   [$];
  zsu_cfg_t  w_cfg   [$];
  int        w_done  = 0;            // windows predicted so far
  word_t     expq    [int][$];       // key: ch * 4096 + window
  // Mechanism counters.
  int n_glitch = 0, n_carry = 0, n_cont_win = 0, n_trig_win = 0;
  int n_adc_win = 0, n_test_win = 0, n_zsu_off = 0;
  logic phase_cont = 0;

  initial for (int i = 0; i < 300; i++) stimq.push_back(8'h09);

  always @(posedge clk_adc) if (rst_n && k < MAXK) begin
    // Values seen by the chip on this edge (sampled before it updates).
    logic tw_now;
    word_t a;
    tw_now = tw;                      // window tag of the previous edge
    // Test-pattern register.
    stim_prev = stim_out;
    if (stim_host_en && stim_load) begin
      void'(stimq.pop_front()); stimq.push_back(stim_data); stim_out = 10'h009;
    end else if (!stim_host_en && tw_now) begin
      byte v; v = stimq.pop_front(); stimq.push_back(v); stim_out = word_t'(v);
    end else stim_out = 10'h009;
    // The window tag of edge k-1 pairs with S[k-1].
    if (k > 0) window_step(tw_now, k - 1);
    for (int c = 0; c < N_CH; c++) begin
      a = use_test ? stim_prev : to_unsigned(adc[c]);
      L[c][k] = a;
      S[c][k] = (k >= int'(npre)) ? L[c][k - int'(npre)] : 10'd0;
      P[c][k] = 0;
      if (S[c][k] >= zcfg.thrd) begin
        int g;
        g = (zcfg.seq_mask == 0) ? 1 : int'(zcfg.seq_mask);
        run[c]++;
        if (run[c] == g) for (int j = k - g + 1; j <= k; j++) P[c][j] = 1;
        else if (run[c] > g) P[c][k] = 1;
      end else begin
        if (run[c] > 0 && run[c] < ((zcfg.seq_mask == 0) ? 1 : int'(zcfg.seq_mask)) && tw_now) n_glitch++;
        run[c] = 0;
      end
    end
    k++;
    // Predict windows whose neighbourhood is complete.
    while (w_done < w_start.size() && w_start[w_done] + w_len[w_done] + 12 <= k) begin
      predict(w_done);
      w_done++;
    end
  end

  task automatic window_step(input logic t, input int kk);
    if (t) begin
      if (w_left == 0) begin
        w_start.push_back(kk); w_len.push_back(int'(ns_e)); w_cfg.push_back(zcfg);
        w_left = int'(ns_e);
        if (phase_cont) n_cont_win++; else n_trig_win++;
        if (use_test) n_test_win++; else n_adc_win++;
        if (!zcfg.en) n_zsu_off++;
      end
      w_left--;
    end else if (w_left != 0) begin
      fail($sformatf("window closed early at %0d", kk));
      w_left = 0;
    end
  endtask

  task automatic predict(input int w);
    zsu_cfg_t cf;
    cf = w_cfg[w];
    for (int c = 0; c < N_CH; c++) begin
      word_t q [$];
      logic open_c = 0;
      word_t tc0 = 0, cnt = 0;
      for (int i = 0; i < w_len[w]; i++) begin
        int j; logic f;
        j = w_start[w] + i;
        f = !cf.en;
        for (int m = j - int'(cf.postmask); m <= j + int'(cf.premask); m++)
          if (m >= 0 && m < k && P[c][m]) f = 1;
        if (f) begin
          if (!open_c) begin open_c = 1; tc0 = word_t'(i); cnt = 2; end
          q.push_back(S[c][j]); cnt++;
          if (i == w_len[w] - 1 && c == 0) n_carry++;
        end else if (open_c) begin
          q.push_back(tc0); q.push_back(cnt); open_c = 0;
        end
      end
      if (open_c) begin q.push_back(tc0); q.push_back(cnt); end
      expq[c * 4096 + w] = q;
    end
  endtask

  // ---------------------------------------------------------------
  // Link receivers
  // ---------------------------------------------------------------
  int rx_pkts = 0, rx_trunc = 0, rx_links [N_LINK];
  // Packets are checked after the run, once every window is predicted.
  word_t rx_list [$][$];
  int    rx_link [$];
  int size_seen [int];              // payload sizes of complete packets
  int last_win [N_CH], last_time [N_CH];
  initial for (int c = 0; c < N_CH; c++) last_win[c] = -1;

  for (genvar l = 0; l < N_LINK; l++) begin : g_rx
    int    st = 0;       // 0 hunting, 1 receiving
    int    nb = 0;
    word_t cur = 0;
    word_t pk [$];
    always @(negedge clk320) if (rst_n) begin
      if (st == 0) begin
        if (sout[l]) begin st = 1; cur = 0; cur[0] = 1; nb = 1; pk = {}; end
      end else begin
        cur[nb] = sout[l];
        nb++;
        if (nb == 10) begin
          pk.push_back(cur); nb = 0; cur = 0;
          if (pk.size() >= 5 && pk.size() == 5 + int'(pk[2])) begin
            rx_list.push_back(pk); rx_link.push_back(l);
            st = 0;
          end
        end
      end
    end
  end

  task automatic check_packet(input int l, input word_t p [$]);
    int c, wn, key, size, t;
    logic tr;
    rx_pkts++; rx_links[l]++;
    c    = int'(p[0][5:1]);
    size = int'(p[2]);
    tr   = p[4][9];
    t    = int'({p[1], p[3]});
    checks++;
    if (p[0][9:6] != 4'h5 || !p[0][0] || c / (N_CH / N_LINK) != l) begin
      fail($sformatf("link %0d header word %h", l, p[0])); return;
    end
    // Window number: 9 bits, unwrapped against the windows seen so far.
    wn = int'(p[4][8:0]);
    while (wn + 512 < w_done) wn += 512;
    key = c * 4096 + wn;
    checks++;
    if (!expq.exists(key)) begin fail($sformatf("ch %0d unexpected window %0d", c, wn)); return; end
    if (tr) rx_trunc++;
    checks++;
    if ((!tr && size != expq[key].size()) || size > expq[key].size()) begin
      fail($sformatf("ch %0d window %0d size %0d expected %0d", c, wn, size, expq[key].size()));
      return;
    end
    for (int i = 0; i < size; i++) begin
      checks++;
      if (p[5 + i] != expq[key][i]) begin
        fail($sformatf("ch %0d window %0d word %0d: %h expected %h (size %0d/%0d tr %0b)", c, wn, i, p[5+i], expq[key][i], size, expq[key].size(), tr));
        break;
      end
    end
    if (!tr) size_seen[size + 5 + (w_cfg[wn].en ? 0 : 10000)]++;
    // Time stamps: 4 global-counter ticks per sample.
    if (last_win[c] >= 0) begin
      checks++;
      if (((t - last_time[c]) & 20'hFFFFF) != ((4 * (w_start[wn] - w_start[last_win[c]])) & 20'hFFFFF))
        fail($sformatf("ch %0d window %0d time stamp step %0d", c, wn, t - last_time[c]));
    end
    last_win[c] = wn; last_time[c] = t;
  endtask

  // ---------------------------------------------------------------
  // Stimulus
  // ---------------------------------------------------------------
  int adc_mode = 0;   // 0 baseline, 1 pulses and glitches
  int pulse_left [N_CH];
  int pulse_amp  [N_CH];
  int early_cnt = 0;
  always @(posedge clk_adc) if (rst_n && trg_early) early_cnt++;

  always @(negedge clk_adc) begin
    for (int c = 0; c < N_CH; c++) begin
      int u;
      u = 9 + $urandom_range(0, 2);
      if (adc_mode == 1) begin
        if (pulse_left[c] > 0) begin
          u = pulse_amp[c]; pulse_left[c]--;
        end else if ($urandom_range(0, 60) == 0) begin
          pulse_left[c] = $urandom_range(0, 9);   // 0: a one-sample glitch
          pulse_amp[c]  = $urandom_range(35, 900);
          u = pulse_amp[c];
        end
      end
      adc[c] = word_t'(u) ^ 10'h200;
    end
  end

  task automatic wait_adc(input int n);
    repeat (n) @(negedge clk_adc);
  endtask

  task automatic stop_windows();
    @(negedge clk_adc) cont = 0;
    while (tw) @(negedge clk_adc);
    wait_adc(40);
  endtask

  task automatic load_pattern(input int nsig);
    byte pat [300];
    byte sig [8] = '{8'h0B, 8'h0D, 8'h0F, 8'h0E, 8'h0D, 8'h0C, 8'h0B, 8'h0A};
    foreach (pat[i]) pat[i] = 8'h09;
    for (int s = 0; s < nsig; s++)
      for (int j = 0; j < 8; j++) pat[20 + 60 * s + j] = sig[j];
    @(negedge clk_adc) stim_host_en = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk_adc) stim_load = 1; stim_data = pat[i];
    end
    @(negedge clk_adc) stim_load = 0; stim_host_en = 0;
  endtask

  initial begin : watchdog
    #4ms;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total_drop, waited;
    zcfg = '{en: 1'b1, thrd: 10'h00A, premask: 2'd2, postmask: 3'd3, seq_mask: 2'd2};
    foreach (adc[c]) begin adc[c] = 10'h209; pulse_left[c] = 0; pulse_amp[c] = 0; end
    // Reset is pulsed twice. With random power-up values a per-domain reset
    // synchroniser can start out low, so its output never falls and the
    // flops behind it keep their power-up state until the synchroniser
    // has been released once; the second pulse then resets every domain.
    #1 rst_pin = 0;
    #50 rst_pin = 1;
    #2000 rst_pin = 0;
    #50 rst_pin = 1;
    rst_n = 1;
    wait_adc(20);

    // Phase A: the test-pattern workload, 0..4 signals per window.
    for (int n = 0; n <= 4; n++) begin
      load_pattern(n);
      phase_cont = 1;
      @(negedge clk_adc) cont = 1;
      wait_adc(600);
      stop_windows();
    end

    // Phase B: ADC input, triggered windows, presamples.
    @(negedge clk_adc);
    use_test = 0; npre = 5'd5; ns_e = 10'd100; phase_cont = 0; adc_mode = 1;
    zcfg = '{en: 1'b1, thrd: 10'd30, premask: 2'd3, postmask: 3'd7, seq_mask: 2'd2};
    wait_adc(40);
    for (int i = 0; i < 10; i++) begin
      @(negedge clk_adc) trg = 1;
      wait_adc(2);
      @(negedge clk_adc) trg = 0;
      if (i % 3 == 0) begin    // a trigger inside the open window
        wait_adc(30);
        @(negedge clk_adc) trg = 1;
        wait_adc(2);
        @(negedge clk_adc) trg = 0;
      end
      wait_adc(120 + $urandom_range(0, 60));
    end
    adc_mode = 0;
    stop_windows();

    // Phase C: short windows faster than the links: header entries fill.
    ns_e = 10'd8; phase_cont = 1; npre = 0;
    zcfg = '{en: 1'b1, thrd: 10'h00A, premask: 2'd2, postmask: 3'd3, seq_mask: 2'd2};
    wait_adc(20);
    @(negedge clk_adc) cont = 1;
    wait_adc(8 * 120);
    stop_windows();

    // Phase D: ZSU off, 4-signal pattern, data memories fill.
    @(negedge clk_adc);
    ns_e = 10'd300; use_test = 1;
    zcfg.en = 1'b0;
    wait_adc(20);
    @(negedge clk_adc) cont = 1;
    wait_adc(300 * 14);
    stop_windows();

    // Drain: wait until every window is received or dropped.
    waited = 0;
    do begin
      wait_adc(100); waited += 100;
      total_drop = 0;
      foreach (dropped_pkts[c]) total_drop += int'(dropped_pkts[c]);
    end while (rx_list.size() + total_drop < N_CH * w_start.size() && waited < 12000);
    wait_adc(40);
    while (w_done < w_start.size()) begin predict(w_done); w_done++; end
    foreach (rx_list[i]) check_packet(rx_link[i], rx_list[i]);

    checks++;
    if (rx_pkts + total_drop != N_CH * w_start.size())
      fail($sformatf("%0d packets + %0d dropped, %0d windows x %0d channels",
                     rx_pkts, total_drop, w_start.size(), N_CH));
    // The document's packet sizes.
    foreach (tbl[i]) begin
      checks++;
      if (!size_seen.exists(tbl[i])) fail($sformatf("no complete packet of %0d words", tbl[i]));
    end
    checks++;
    if (!size_seen.exists(10000 + 307)) fail("no 307-word packet with ZSU off");
    // Mechanisms.
    check_mech("continuous windows", n_cont_win);
    check_mech("triggered windows", n_trig_win);
    check_mech("early triggers refused", early_cnt);
    check_mech("glitches rejected", n_glitch);
    check_mech("clusters closed by window end", n_carry);
    check_mech("test-pattern windows", n_test_win);
    check_mech("ADC windows", n_adc_win);
    check_mech("ZSU-off windows", n_zsu_off);
    check_mech("truncated packets", rx_trunc);
    check_mech("dropped packets", total_drop);
    for (int l = 0; l < N_LINK; l++) check_mech($sformatf("packets on link %0d", l), rx_links[l]);
    $display("windows %0d, packets received %0d, dropped %0d, truncated %0d",
             w_start.size(), rx_pkts, total_drop, rx_trunc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tbl [5] = '{5, 20, 35, 50, 65};

  task automatic check_mech(input string name, input int n);
    checks++;
    $display("mechanism %-30s %0d", name, n);
    if (n == 0) fail($sformatf("%s never happened", name));
  endtask
endmodule
