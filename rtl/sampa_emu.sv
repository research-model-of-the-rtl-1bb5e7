// sampa_emu: digital part of the SAMPA readout ASIC with its test-pattern
// source, as built on the FPGA research platform.
//
// N_CH channels (32 in the SAMPA) each take 10-bit samples at 10 MHz,
// open time windows under the event manager (continuous or triggered
// mode), keep only the samples around pulses (zero suppression), format
// them into clusters, and buffer one packet per window. N_LINK serial
// links (4 in the SAMPA) at 320 Mbit/s send the packets, each link shared
// by N_CH / N_LINK channels. The clock manager derives the 32 MHz and,
// when selected, the 40 and 10 MHz clocks from the 320 MHz input; a 20-bit
// 40 MHz global counter time-stamps the windows. The test-pattern shift
// register can replace the ADC input of every channel (use_test).
//
// Left out (no logic given for them): the analog front end and ADC, the
// DSP filters, the pedestal memory, the I2C configuration interface and
// its registers (their settings are ports here, shared by all channels),
// the neighbour and heartbeat inputs of link 0.
//
// Clocks: clk320 is required; clk40_ext / clk10_ext only when selected.
// The configuration ports and trg are taken as synchronous to clk10;
// adc[] is sampled on clk10, which is brought out as clk_adc for the ADC.
module sampa_emu
  import sampa_pkg::*;
#(
  parameter int unsigned N_CH       = 32,
  parameter int unsigned N_LINK     = 4,
  parameter int unsigned PRE_MAX    = 32,
  parameter int unsigned DATA_DEPTH = 2048,
  parameter int unsigned HDR_PKTS   = 32,
  parameter int unsigned NS_E_MAX   = 1021,
  parameter int unsigned STIM_LEN   = 300
) (
  input  logic        clk320,
  input  logic        clk40_ext,
  input  logic        clk10_ext,
  input  logic        rst_n,
  input  logic        sel_ext40,
  input  logic        sel_ext10,
  input  logic [3:0]  hadd,
  // sampling
  input  word_t       adc [N_CH],   // two's complement samples
  output logic        clk_adc,
  // window control (tbunit settings)
  input  logic        cont,
  input  logic        trg,
  input  word_t       ns_e,
  input  logic [$clog2(PRE_MAX)-1:0] npre,
  input  zsu_cfg_t    zcfg,
  // test-pattern source
  input  logic        use_test,
  input  logic        stim_host_en,
  input  logic        stim_load,
  input  logic [7:0]  stim_data,
  // outputs
  output logic        sout [N_LINK],
  output logic        tw,
  output logic        trg_early,
  output logic        any_full,      // some ring buffer is full
  output logic [15:0] win_cnt,       // windows opened
  output logic [31:0] link_words [N_LINK],  // packet words sent per link
  output logic [15:0] dropped_pkts [N_CH]
);

  localparam int unsigned CPL = N_CH / N_LINK;   // channels per link

  logic clk32, clk40, clk10, word_load;
  logic rst320_n, rst32_n, rst40_n, rst10_n;

  clock_manager u_clk (
    .clk320, .clk40_ext, .clk10_ext, .rst_n, .sel_ext40, .sel_ext10,
    .clk32, .clk40, .clk10, .word_load,
    .rst320_n, .rst32_n, .rst40_n, .rst10_n);

  assign clk_adc = clk10;

  // Global time, carried into the 10 MHz domain.
  logic [19:0] gcount, gtime;

  global_counter #(.W(20)) u_gcnt (
    .clk40, .rst_n(rst40_n), .en(1'b1), .count(gcount));

  gray_sync #(.W(20)) u_gsync (
    .src_clk(clk40), .src_rst_n(rst40_n), .src_bin(gcount),
    .dst_clk(clk10), .dst_rst_n(rst10_n), .dst_bin(gtime));

  // Time windows.
  tw_tag_t     tag;

  event_manager #(.NS_E_MAX(NS_E_MAX)) u_evt (
    .clk10, .rst_n(rst10_n), .cont, .trg, .ns_e, .tag, .trg_early,
    .win_cnt);

  assign tw = tag.tw;

  // Test pattern.
  word_t stim;

  stim_shift_reg #(.LEN(STIM_LEN)) u_stim (
    .clk10, .rst_n(rst10_n), .host_en(stim_host_en), .load(stim_load),
    .load_data(stim_data), .tw(tag.tw), .dout(stim));

  // Channels.
  logic       req   [N_CH];
  logic       gnt   [N_CH];
  link_word_t cword [N_CH];
  logic       d_full [N_CH];
  logic       h_full [N_CH];

  for (genvar c = 0; c < int'(N_CH); c++) begin : g_ch
    sampa_channel #(
      .PRE_MAX(PRE_MAX), .DATA_DEPTH(DATA_DEPTH), .HDR_PKTS(HDR_PKTS)
    ) u_ch (
      .clk10, .rst10_n, .clk32, .rst32_n, .hadd, .ch(5'(c)), .gtime,
      .adc_in(adc[c]), .test_in(stim), .use_test, .npre, .zcfg, .tag,
      .req(req[c]), .gnt(gnt[c]), .out(cword[c]),
      .d_full(d_full[c]), .h_full(h_full[c]),
      .dropped_pkts(dropped_pkts[c]));
  end

  always_comb begin
    any_full = 1'b0;
    for (int c = 0; c < int'(N_CH); c++)
      any_full = any_full | d_full[c] | h_full[c];
  end

  // Links.
  for (genvar l = 0; l < int'(N_LINK); l++) begin : g_link
    logic       lreq [CPL];
    logic       lgnt [CPL];
    link_word_t lin  [CPL];
    link_word_t lout;

    for (genvar k = 0; k < int'(CPL); k++) begin : g_map
      assign lreq[k] = req[l*CPL + k];
      assign lin[k]  = cword[l*CPL + k];
      assign gnt[l*CPL + k] = lgnt[k];
    end

    link_arbiter #(.N(CPL)) u_arb (
      .clk32, .rst_n(rst32_n), .req(lreq), .gnt(lgnt), .in(lin),
      .out(lout));

    serial_out u_so (
      .clk320, .rst_n(rst320_n), .word_load, .word(lout),
      .sout(sout[l]), .word_cnt(link_words[l]));
  end

endmodule
