// amc_top - receive-side modulation classifier with its test infrastructure.
//
// Receive path: the RF data converter delivers complex baseband at one
// sample per clock (128 Msps on the 128 MHz fabric clock). decim_chain
// lowers this to 4 Msps, iq_interleave turns each complex sample into two
// interleaved 16-bit samples, and amc_cnn classifies every frame of 128
// complex samples into 8 modulation classes, streaming the 8 scores to a
// DMA (m_cls_*). The same decimated stream feeds frame_capture, which on an
// AXI4-Lite command sends 128 complex samples to a second DMA (m_cap_*), so
// the processor can show the received signal next to the prediction and
// record data sets.
// Transmit path: tx_playback_buffer receives a frame from a third DMA
// (s_tx_*) and replays it cyclically towards the DAC (dac_*) while enabled.
// The converters, up-conversion, DMAs and processor are outside this module;
// their signals are the ports. Everything runs on one clock.
module amc_top
  import amc_pkg::*;
#(
  parameter int WBITS = 16
) (
  input  logic clk,
  input  logic rst_n,
  // ADC baseband
  input  logic adc_valid,
  input  act_t adc_i,
  input  act_t adc_q,
  // weight loading
  input  logic w_we,
  input  wlayer_e w_layer,
  input  logic [17:0] w_addr,
  input  logic signed [WBITS-1:0] w_data,
  // class scores
  output logic scores_valid,
  output act_t scores [FC2_N],
  output logic m_cls_tvalid,
  input  logic m_cls_tready,
  output act_t m_cls_tdata,
  output logic m_cls_tlast,
  output logic [3:0] cnn_evt,
  output logic overrun,
  // frame capture control (AXI4-Lite) and data (AXI4-Stream)
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [3:0]  s_awaddr,
  input  logic        s_wvalid,
  output logic        s_wready,
  input  logic [31:0] s_wdata,
  output logic        s_bvalid,
  input  logic        s_bready,
  output logic [1:0]  s_bresp,
  input  logic        s_arvalid,
  output logic        s_arready,
  input  logic [3:0]  s_araddr,
  output logic        s_rvalid,
  input  logic        s_rready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        m_cap_tvalid,
  input  logic        m_cap_tready,
  output logic [31:0] m_cap_tdata,
  output logic        m_cap_tlast,
  // transmit playback
  input  logic        s_tx_tvalid,
  output logic        s_tx_tready,
  input  logic [31:0] s_tx_tdata,
  input  logic        s_tx_tlast,
  input  logic        tx_start,
  input  logic        tx_stop,
  input  logic        dac_sample_en,
  output logic        tx_playing,
  output logic        tx_loaded,
  output logic        dac_valid,
  output act_t        dac_i,
  output act_t        dac_q,
  output logic        tx_wrapped
);
  logic dec_valid, il_valid, il_ovr, cnn_ovr;
  act_t dec_i, dec_q, il_data;

  decim_chain u_ddc (
    .clk, .rst_n, .in_valid(adc_valid), .in_i(adc_i), .in_q(adc_q),
    .out_valid(dec_valid), .out_i(dec_i), .out_q(dec_q));

  iq_interleave u_il (
    .clk, .rst_n, .in_valid(dec_valid), .in_i(dec_i), .in_q(dec_q),
    .out_valid(il_valid), .out_data(il_data), .overrun(il_ovr));

  amc_cnn #(.WBITS(WBITS)) u_cnn (
    .clk, .rst_n, .in_valid(il_valid), .in_data(il_data),
    .w_we, .w_layer, .w_addr, .w_data,
    .scores_valid, .scores,
    .m_tvalid(m_cls_tvalid), .m_tready(m_cls_tready), .m_tdata(m_cls_tdata),
    .m_tlast(m_cls_tlast), .evt(cnn_evt), .overrun(cnn_ovr));

  frame_capture u_cap (
    .clk, .rst_n, .in_valid(dec_valid), .in_i(dec_i), .in_q(dec_q),
    .s_awvalid, .s_awready, .s_awaddr, .s_wvalid, .s_wready, .s_wdata,
    .s_bvalid, .s_bready, .s_bresp, .s_arvalid, .s_arready, .s_araddr,
    .s_rvalid, .s_rready, .s_rdata, .s_rresp,
    .m_tvalid(m_cap_tvalid), .m_tready(m_cap_tready), .m_tdata(m_cap_tdata),
    .m_tlast(m_cap_tlast));

  tx_playback_buffer u_tx (
    .clk, .rst_n, .s_tvalid(s_tx_tvalid), .s_tready(s_tx_tready),
    .s_tdata(s_tx_tdata), .s_tlast(s_tx_tlast), .start(tx_start), .stop(tx_stop),
    .sample_en(dac_sample_en), .playing(tx_playing), .loaded(tx_loaded),
    .out_valid(dac_valid), .out_i(dac_i), .out_q(dac_q), .wrapped(tx_wrapped));

  assign overrun = il_ovr | cnn_ovr;
endmodule
