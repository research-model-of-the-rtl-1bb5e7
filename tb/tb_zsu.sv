// tb_zsu: self-checking test of the zero-suppression unit.
//
// Drives sample streams into the ZSU and compares every output sample and
// flag with a reference computed here from the whole input stream: a
// pulse is a run of at least max(seq_mask,1) samples >= thrd, and a sample
// is kept when a pulse sample lies at most premask samples after it or at
// most postmask samples before it. Checks the 7-cycle latency, the worked
// example of an 8-sample pulse above a threshold of 0Ah (2 presamples,
// 3 postsamples: 13 flagged samples), glitch rejection, the disabled mode
// and random streams under random settings.
`timescale 1ns/1ps
module tb_zsu;
  import sampa_pkg::*;

  localparam int LAT = 7;
  localparam int NS  = 400;

  logic clk10 = 0, rst_n = 0;
  always #50 clk10 = ~clk10;

  zsu_cfg_t cfg;
  word_t    din, dout;
  logic     flag;
  tw_tag_t  tag_in, tag_out;

  zsu dut (.clk10, .rst_n, .cfg, .din, .tag_in, .dout, .flag, .tag_out);

  int checks = 0, failures = 0;
  word_t x [NS];
  logic  pulse [NS];
  logic  expf [NS];

  task automatic reference();
    int g, run_start;
    g = (cfg.seq_mask == 0) ? 1 : int'(cfg.seq_mask);
    for (int i = 0; i < NS; i++) pulse[i] = 0;
    run_start = -1;
    for (int i = 0; i <= NS; i++) begin
      if (i < NS && x[i] >= cfg.thrd) begin
        if (run_start < 0) run_start = i;
      end else if (run_start >= 0) begin
        if (i - run_start >= g)
          for (int k = run_start; k < i; k++) pulse[k] = 1;
        run_start = -1;
      end
    end
    for (int i = 0; i < NS; i++) begin
      expf[i] = !cfg.en;
      for (int k = i - int'(cfg.postmask); k <= i + int'(cfg.premask); k++)
        if (k >= 0 && k < NS && pulse[k]) expf[i] = 1;
    end
  endtask

  // Runs one stream; stream samples before index 0 are the baseline 9.
  task automatic run_stream(input string name, output int nflag);
    reference();
    nflag = 0;
    for (int i = 0; i < NS + LAT; i++) begin
      @(negedge clk10);
      din    = (i < NS) ? x[i] : word_t'(9);
      tag_in = '{tw: 1'b1, first: 1'b0, last: 1'b0, tc: word_t'(i)};
      @(posedge clk10); #1;
      if (i + 1 - LAT >= 0 && i + 1 - LAT < NS - 8) begin
        int j;
        j = i + 1 - LAT;
        checks++;
        if (dout !== x[j] || flag !== expf[j] || tag_out.tc !== word_t'(j)) begin
          failures++;
          if (failures < 10)
            $display("FAIL %s sample %0d: dout=%h flag=%b tc=%0d, expected %h %b",
                     name, j, dout, flag, tag_out.tc, x[j], expf[j]);
        end
        if (flag) nflag++;
      end
    end
    // Flush with baseline so runs do not leak into the next stream.
    for (int i = 0; i < 20; i++) begin
      @(negedge clk10); din = 9;
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nf;
    cfg = '{en: 1'b1, thrd: 10'h00A, premask: 2'd2, postmask: 3'd3, seq_mask: 2'd2};
    din = 9; tag_in = '0;
    repeat (3) @(posedge clk10);
    rst_n = 1;
    repeat (20) @(posedge clk10);

    // Worked example: one 8-sample pulse on a baseline of 9.
    for (int i = 0; i < NS; i++) x[i] = 9;
    begin
      word_t p [8] = '{10'h00B, 10'h00D, 10'h00F, 10'h00E, 10'h00D, 10'h00C, 10'h00B, 10'h00A};
      for (int k = 0; k < 8; k++) x[100 + k] = p[k];
    end
    run_stream("example", nf);
    checks++;
    if (nf != 13) begin failures++; $display("FAIL example: %0d flagged, expected 13", nf); end

    // Glitch: a 1-sample spike is rejected with seq_mask 2, kept with 1.
    for (int i = 0; i < NS; i++) x[i] = 9;
    x[50] = 10'h020;
    run_stream("glitch2", nf);
    checks++;
    if (nf != 0) begin failures++; $display("FAIL glitch rejected: %0d flagged", nf); end
    cfg.seq_mask = 2'd1;
    run_stream("glitch1", nf);
    checks++;
    if (nf != 6) begin failures++; $display("FAIL glitch kept: %0d flagged, expected 6", nf); end

    // Disabled: everything flagged.
    cfg.en = 1'b0;
    run_stream("disabled", nf);

    // Random streams under random settings.
    for (int r = 0; r < 12; r++) begin
      cfg = '{en: 1'b1, thrd: word_t'(20 + $urandom_range(0, 10)),
              premask: 2'($urandom), postmask: 3'($urandom), seq_mask: 2'($urandom)};
      for (int i = 0; i < NS; i++)
        x[i] = ($urandom_range(0, 3) == 0) ? word_t'($urandom_range(15, 40))
                                          : word_t'($urandom_range(0, 12));
      for (int i = NS - 20; i < NS; i++) x[i] = 9;
      run_stream("random", nf);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
