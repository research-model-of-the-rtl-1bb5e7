// zsu: zero-suppression unit of one channel.
//
// It marks, with a flag bit per sample, the samples worth keeping: every
// sample of a pulse (a run of samples at or above the threshold thrd), the
// premask samples before it and the postmask samples after it. A run
// shorter than seq_mask samples is a glitch and is not a pulse. Samples
// whose flag stays low are dropped further down by the data format unit.
// Threshold, presamples, postsamples and glitch filter, and their register
// widths, follow the SAMPA description; that a sample equal to the
// threshold counts as above it follows from its worked example (eight
// samples 00Bh .. 00Ah above a threshold of 00Ah). The delay-line
// construction and the latency are this design's own.
//
// How it works: the input is delayed by D = 3 + 3 samples (largest premask
// plus largest seq_mask). Alongside, a run counter finds runs of samples
// >= thrd, and once a run reaches the glitch length all its samples are
// marked as pulse samples in the shift register q (index = age of the
// sample). Because a pulse sample is known within seq_mask - 1 cycles, by
// the time a sample is D cycles old the pulse samples up to premask younger
// than it are known, and its flag is the OR of q over the ages
// D - premask .. D + postmask. With en = 0 every flag is 1.
//
// Interface: din, tag_in enter on clk10; dout, flag, tag_out are the same
// sample and its tag D + 1 = 7 cycles later (combinational from registers).
module zsu
  import sampa_pkg::*;
(
  input  logic     clk10,
  input  logic     rst_n,
  input  zsu_cfg_t cfg,
  input  word_t    din,
  input  tw_tag_t  tag_in,
  output word_t    dout,
  output logic     flag,
  output tw_tag_t  tag_out
);

  localparam int unsigned PRE_MAX  = 3;
  localparam int unsigned POST_MAX = 7;
  localparam int unsigned GL_MAX   = 3;
  localparam int unsigned D        = PRE_MAX + GL_MAX;
  localparam int unsigned QL       = D + POST_MAX + 1;

  word_t   sline [D+1];
  tw_tag_t tline [D+1];
  logic [QL-1:0] q;
  logic [1:0]    run;

  logic [1:0] glen;
  logic       above;
  logic [1:0] run_nx;

  assign glen   = (cfg.seq_mask == 2'd0) ? 2'd1 : cfg.seq_mask;
  assign above  = (din >= cfg.thrd);
  assign run_nx = !above ? 2'd0 : (run == 2'd3) ? 2'd3 : run + 2'd1;

  always_ff @(posedge clk10 or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i <= int'(D); i++) begin
        sline[i] <= '0;
        tline[i] <= '0;
      end
      q   <= '0;
      run <= '0;
    end else begin
      sline[0] <= din;
      tline[0] <= tag_in;
      for (int i = 1; i <= int'(D); i++) begin
        sline[i] <= sline[i-1];
        tline[i] <= tline[i-1];
      end
      run <= run_nx;
      // Age 0 is this cycle's sample; once the run reaches the glitch
      // length, the earlier samples of the run become pulse samples too.
      for (int i = 1; i < int'(QL); i++)
        q[i] <= q[i-1] || (run_nx == glen && i < int'(glen));
      q[0] <= above && (run_nx >= glen);
    end

  always_comb begin
    flag = 1'b0;
    for (int i = 0; i < int'(QL); i++)
      if (i >= int'(D) - int'(cfg.premask) && i <= int'(D) + int'(cfg.postmask))
        flag = flag | q[i];
    if (!cfg.en) flag = 1'b1;
  end

  assign dout    = sline[D];
  assign tag_out = tline[D];

endmodule
