// amc_cnn - the streaming modulation-classification CNN (one quantised
// model, 16-bit weights by default: "16w16a").
//
// Data flow, all on one clock (128 MHz in the reference system, 32 times
// the 4 Msps decimated complex rate):
//   interleaved samples -> ping-pong burst buffer (256-sample bursts)
//   -> conv1 (buffer + SWC + 64 MACs, ReLU)       252 vectors of 64
//   -> conv2 (channel buffers + SWC + 256 MACs)   124 vectors of 16
//   -> fc1   (vector buffer + 128 MACs)           128 values
//   -> fc2   (8 MACs) -> 8 class scores as an AXI4-Stream to the DMA.
// Every frame of 128 complex samples gives one classification; frames are
// consecutive and do not overlap, and no sample is dropped as long as the
// input rate is at most one interleaved sample per 16 clocks (one frame per
// 4096 clocks). The layers hand data forward with valid strobes only: the
// schedule is fixed, so latency is deterministic. Any layer's overrun flag
// is OR-ed into overrun.
// Weight loading: w_layer selects the layer (amc_pkg::wlayer_e) and w_addr
// the weight within it, in the order documented in each layer.
// WBITS selects the stored weight precision (16, 8 or 4 bits).
module amc_cnn
  import amc_pkg::*;
#(
  parameter int WBITS = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  act_t in_data,
  input  logic w_we,
  input  wlayer_e w_layer,
  input  logic [17:0] w_addr,
  input  logic signed [WBITS-1:0] w_data,
  output logic scores_valid,
  output act_t scores [FC2_N],
  output logic m_tvalid,
  input  logic m_tready,
  output act_t m_tdata,
  output logic m_tlast,
  output logic [3:0] evt,     // {fc1 stall, conv2 out, conv1 out, burst}
  output logic overrun
);
  logic b_valid, b_first, b_last, b_ovr;
  act_t b_data;
  logic c1_valid, c1_busy, c1_ovr;
  act_t c1_vec [C1_N];
  logic c2_valid, c2_busy, c2_ovr;
  act_t c2_vec [C2_N];
  logic f1_valid, f1_stall, f1_ovr;
  act_t f1_vec [FC1_N];
  logic f2_ovr;

  pingpong_burst_buffer u_burst (
    .clk, .rst_n, .in_valid, .in_data,
    .out_valid(b_valid), .out_first(b_first), .out_last(b_last),
    .out_data(b_data), .overrun(b_ovr));

  conv1_layer #(.WBITS(WBITS)) u_conv1 (
    .clk, .rst_n, .in_valid(b_valid), .in_data(b_data),
    .w_we(w_we && w_layer == WL_CONV1), .w_addr(w_addr[7:0]), .w_data,
    .out_valid(c1_valid), .out_vec(c1_vec), .busy(c1_busy), .overrun(c1_ovr));

  conv2_layer #(.WBITS(WBITS)) u_conv2 (
    .clk, .rst_n, .in_valid(c1_valid), .in_vec(c1_vec),
    .w_we(w_we && w_layer == WL_CONV2), .w_addr(w_addr[12:0]), .w_data,
    .out_valid(c2_valid), .out_vec(c2_vec), .busy(c2_busy), .overrun(c2_ovr));

  fc1_layer #(.WBITS(WBITS)) u_fc1 (
    .clk, .rst_n, .in_valid(c2_valid), .in_vec(c2_vec),
    .w_we(w_we && w_layer == WL_FC1), .w_addr(w_addr), .w_data,
    .out_valid(f1_valid), .out_vec(f1_vec), .stall(f1_stall), .overrun(f1_ovr));

  fc2_layer #(.WBITS(WBITS)) u_fc2 (
    .clk, .rst_n, .in_valid(f1_valid), .in_vec(f1_vec),
    .w_we(w_we && w_layer == WL_FC2), .w_addr(w_addr[9:0]), .w_data,
    .scores_valid, .scores, .m_tvalid, .m_tready, .m_tdata, .m_tlast,
    .overrun(f2_ovr));

  assign evt     = {f1_stall, c2_valid, c1_valid, b_first};
  assign overrun = b_ovr | c1_ovr | c2_ovr | f1_ovr | f2_ovr;

  // A burst is exactly one frame long and arrives while conv1 is idle.
  assert property (@(posedge clk) disable iff (!rst_n) b_valid |-> !c1_busy);
  assert property (@(posedge clk) disable iff (!rst_n) c1_valid |-> !c2_busy);
endmodule
