// sampa_channel: the digital part of one SAMPA channel.
//
// A chain presamples -> zsu -> dfu -> ring_buffer, as in the SAMPA channel
// diagram, with the DSP stages (baseline correction 1, digital shaper,
// baseline corrections 2 and 3) left out: samples go from the presamples
// block straight to the zero-suppression unit, as on the research
// platform. The time-window tag from the event manager describes the
// sample leaving presamples and travels through the ZSU with it.
//
// Timing: a sample is written into the ring buffer npre + 1 + 7 + 1
// clk10 cycles after it enters; packets leave on clk32 through req/gnt/out.
// The dfu's data-ready output is left open: the ring buffer takes its
// framing from the write bundle.
module sampa_channel
  import sampa_pkg::*;
#(
  parameter int unsigned PRE_MAX    = 32,
  parameter int unsigned DATA_DEPTH = 2048,
  parameter int unsigned HDR_PKTS   = 32
) (
  input  logic        clk10,
  input  logic        rst10_n,
  input  logic        clk32,
  input  logic        rst32_n,
  input  logic [3:0]  hadd,
  input  logic [4:0]  ch,
  input  logic [19:0] gtime,
  input  word_t       adc_in,
  input  word_t       test_in,
  input  logic        use_test,
  input  logic [$clog2(PRE_MAX)-1:0] npre,
  input  zsu_cfg_t    zcfg,
  input  tw_tag_t     tag,
  output logic        req,
  input  logic        gnt,
  output link_word_t  out,
  output logic        d_full,
  output logic        h_full,
  output logic [15:0] dropped_pkts
);

  word_t   ps_out, z_out;
  logic    z_flag;
  tw_tag_t z_tag;
  dfu_wr_t wr;

  presamples #(.PRE_MAX(PRE_MAX)) u_pre (
    .clk10, .rst_n(rst10_n), .adc_in, .test_in, .use_test, .npre,
    .dout(ps_out));

  zsu u_zsu (
    .clk10, .rst_n(rst10_n), .cfg(zcfg), .din(ps_out), .tag_in(tag),
    .dout(z_out), .flag(z_flag), .tag_out(z_tag));

  dfu u_dfu (
    .clk10, .rst_n(rst10_n), .din(z_out), .flag(z_flag), .tag(z_tag),
    .wr, .dr());

  ring_buffer #(.DATA_DEPTH(DATA_DEPTH), .HDR_PKTS(HDR_PKTS)) u_rb (
    .clk10, .rst10_n, .clk32, .rst32_n, .hadd, .ch, .gtime, .wr,
    .req, .gnt, .out, .d_full, .h_full, .dropped_pkts);

endmodule
