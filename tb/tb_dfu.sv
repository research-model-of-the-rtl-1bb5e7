// tb_dfu: self-checking test of the data format unit.
//
// Feeds windows of flagged samples (fixed examples and random ones, back
// to back as in continuous mode and with gaps as in triggered mode) and
// rebuilds, from the DUT's write bundles, the word list of every window
// (split at eow after n_old words). Each list must equal the clusters
// computed here: the flagged samples of each run, then TC (time count of
// its first sample) and CS (its word count including TC and CS). Also
// checks the one-cycle latency and the example cluster of 13 samples,
// whose CS is 15 (00Fh).
`timescale 1ns/1ps
module tb_dfu;
  import sampa_pkg::*;

  logic clk10 = 0, rst_n = 0;
  always #50 clk10 = ~clk10;

  word_t   din;
  logic    flag;
  tw_tag_t tag;
  dfu_wr_t wr;
  logic    dr;

  dfu dut (.clk10, .rst_n, .din, .flag, .tag, .wr, .dr);

  int checks = 0, failures = 0;

  // Expected and observed words, per window.
  word_t exp_q [$][$];
  word_t got_q [$][$];
  word_t cur_got [$];
  int    carry_seen = 0;

  // Collect the DUT's words.
  always @(posedge clk10) if (rst_n) begin
    word_t w [2];
    w[0] = wr.w0; w[1] = wr.w1;
    for (int i = 0; i < int'(wr.n); i++) begin
      if (wr.eow && i == int'(wr.n_old)) begin
        got_q.push_back(cur_got); cur_got = {};
      end
      cur_got.push_back(w[i]);
    end
    if (wr.eow && int'(wr.n_old) >= int'(wr.n)) begin
      got_q.push_back(cur_got); cur_got = {};
    end
    if (wr.eow && wr.n_old == 2'd1 && wr.n == 2'd2) carry_seen++;
  end

  task automatic window(input int len, input int gap, input int mode);
    word_t exp [$];
    logic  open_c = 0;
    word_t tc0 = 0, cnt = 0;
    for (int i = 0; i < len; i++) begin
      word_t d; logic f;
      d = word_t'($urandom_range(0, 1023));
      case (mode)
        0: f = ($urandom_range(0, 2) != 0);
        1: f = 1'b1;
        2: f = (i >= 5 && i < 18);
        default: f = (i % 2 == 0);
      endcase
      @(negedge clk10);
      din = d; flag = f;
      tag = '{tw: 1'b1, first: (i == 0), last: (i == len - 1), tc: word_t'(i)};
      if (f) begin
        if (!open_c) begin open_c = 1; tc0 = word_t'(i); cnt = 2; end
        exp.push_back(d); cnt++;
      end else if (open_c) begin
        exp.push_back(tc0); exp.push_back(cnt); open_c = 0;
      end
    end
    if (open_c) begin exp.push_back(tc0); exp.push_back(cnt); end
    exp_q.push_back(exp);
    for (int g = 0; g < gap; g++) begin
      @(negedge clk10);
      tag = '0; flag = $urandom; din = $urandom;
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0; flag = 0; tag = '0;
    repeat (3) @(posedge clk10);
    rst_n = 1;
    repeat (2) @(posedge clk10);

    // Latency: a flagged sample is written on the next cycle.
    @(negedge clk10);
    din = 10'h00B; flag = 1; tag = '{tw: 1'b1, first: 1'b1, last: 1'b0, tc: 10'd0};
    @(posedge clk10); #1;
    checks++;
    if (wr.n != 2'd1 || wr.w0 != 10'h00B || !wr.sow) begin
      failures++; $display("FAIL latency: n=%0d w0=%h", wr.n, wr.w0);
    end
    exp_q.push_back('{10'h00B, 10'd0, 10'd3});
    @(negedge clk10);
    flag = 0; tag = '{tw: 1'b1, first: 1'b0, last: 1'b1, tc: 10'd1};
    @(negedge clk10);
    tag = '0;
    repeat (4) @(negedge clk10);

    // The example cluster: 2 + 8 + 3 flagged samples in a 30-sample window.
    window(30, 3, 2);
    // Continuous mode: windows back to back, clusters open at window end.
    for (int k = 0; k < 40; k++) window($urandom_range(2, 25), 0, k % 4);
    // Triggered mode: gaps between windows.
    for (int k = 0; k < 40; k++) window($urandom_range(2, 25), $urandom_range(1, 4), k % 4);
    repeat (5) @(negedge clk10);

    checks++;
    if (got_q.size() != exp_q.size()) begin
      failures++;
      $display("FAIL %0d windows written, expected %0d", got_q.size(), exp_q.size());
    end
    for (int k = 0; k < exp_q.size() && k < got_q.size(); k++) begin
      checks++;
      if (got_q[k] != exp_q[k]) begin
        failures++;
        if (failures < 6) $display("FAIL window %0d: got %p expected %p", k, got_q[k], exp_q[k]);
      end
    end
    // The example window: CS of the 13-sample cluster is 15.
    checks++;
    if (exp_q.size() > 1 && (exp_q[1].size() != 15 || exp_q[1][14] != 10'h00F)) begin
      failures++; $display("FAIL example cluster size");
    end
    checks++;
    if (carry_seen == 0) begin failures++; $display("FAIL no carried CS word seen"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
