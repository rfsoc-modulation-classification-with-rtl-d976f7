// conv2_layer - second convolutional layer: 16 filters of 64x2x3 over the
// 64x2x126 output of conv1, ReLU, in GEMM form.
//
// Input buffer: an array of 64 buffers, one per input channel, each 252
// deep; a 64-wide conv1 vector for position p = 2*w + h is written into all
// 64 at address p in one clock. Once all 252 positions of a frame are in,
// the sliding window controller (SWC) generates the GEMM-transformed input
// (124 x 384) as 16-sample vectors: for output column w' = 0..123, for tap
// t = 2*k + j (k = 0..2, j = 0..1), for channel group g = 0..3 it reads
// channels 16g..16g+15 at position 2*(w'+k)+j. That is 24 vectors per
// column and 2976 per frame. Window element e = (4t + g)*16 + i.
// Matrix-vector multiplier: 16 groups (one per filter) of 16 MACs; each
// clock every group multiplies the 16-sample vector by its 16 weights,
// sums them and accumulates over 24 clocks, so each filter yields one
// output per 24 clocks (Table 2: 256 MACs, 24 samples per output). The
// 16 results of a column leave together as a 16-wide vector after shift,
// saturation and ReLU: 124 vectors per frame.
// Timing: the SWC runs for 2976 clocks; the first vector appears 26 clocks
// after the frame's last input vector. Input arriving while the SWC runs
// sets the sticky overrun flag. Structure and sizes follow the model; the
// element order inside a window, the start condition (whole frame
// buffered) and the shift are this design's choices.
// Weights: W[f][e] is written through w_we/w_addr = f*384 + e/w_data.
module conv2_layer
  import amc_pkg::*;
#(
  parameter int WBITS = 16,
  parameter int SHIFT = WBITS - 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  act_t in_vec [C1_N],
  input  logic w_we,
  input  logic [12:0] w_addr,
  input  logic signed [WBITS-1:0] w_data,
  output logic out_valid,
  output act_t out_vec [C2_N],
  output logic busy,
  output logic overrun
);
  typedef logic signed [WBITS-1:0] w_t;

  // Array of 64 channel buffers, held side by side in one wide RAM word
  // (channel c in bits 16c+15:16c); GEMM-transformed filters, one word of
  // 16 filters x 16 weights per SWC cycle (filter f, lane i at (16f+i)*WBITS).
  logic [C1_N*ACT_W-1:0]         chbuf [C1_POS];
  logic [C2_N*C2_VEC*WBITS-1:0]  wgt   [C2_CYC];
  acc_t acc [C2_N];

  logic [7:0] wr_pos;
  logic [6:0] sw_w;     // output column 0..123
  logic [2:0] sw_t;     // tap 0..5 = 2k + j
  logic [1:0] sw_g;     // channel group 0..3
  logic [4:0] sw_c;     // vector index within a column 0..23
  logic       rd_v, rd_last;
  logic [4:0] rd_c;
  logic [1:0] rd_g;
  logic [C1_N*ACT_W-1:0]        rd_word, in_word;
  logic [C2_N*C2_VEC*WBITS-1:0] rd_wgt;
  act_t       rd_vec [C2_VEC];


  // weight write: address f*384 + e, e = 16*cycle + lane
  logic [4:0] wa_c;
  logic [7:0] wa_lane;
  assign wa_c    = 5'((w_addr % 13'(C2_IN)) / 13'(C2_VEC));
  assign wa_lane = 8'((w_addr / 13'(C2_IN)) * 13'(C2_VEC) + (w_addr % 13'(C2_VEC)));

  // position read by the SWC: 2*(w'+k) + j with t = 2k + j, i.e. 2w' + t
  logic [7:0] rd_pos;
  assign rd_pos = 8'({sw_w, 1'b0}) + 8'(sw_t);

  always_ff @(posedge clk) begin
    if (w_we) wgt[wa_c][wa_lane*WBITS +: WBITS] <= w_data;
    if (in_valid) chbuf[wr_pos] <= in_word;
    rd_word <= chbuf[rd_pos];
    rd_wgt  <= wgt[sw_c];
  end

  always_comb
    for (int c = 0; c < C1_N; c++) in_word[c*ACT_W +: ACT_W] = in_vec[c];

  // the SWC's channel group selects 16 of the 64 buffers
  always_comb
    for (int i = 0; i < C2_VEC; i++)
      rd_vec[i] = act_t'(rd_word[(32'(rd_g)*C2_VEC + i)*ACT_W +: ACT_W]);

  // one group: 16 products summed
  acc_t dot [C2_N];
  always_comb
    for (int f = 0; f < C2_N; f++) begin
      dot[f] = '0;
      for (int i = 0; i < C2_VEC; i++)
        dot[f] += acc_t'(rd_vec[i]) * acc_t'(w_t'(rd_wgt[(f*C2_VEC + i)*WBITS +: WBITS]));
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pos    <= '0;
      busy      <= 1'b0;
      sw_w      <= '0;
      sw_t      <= '0;
      sw_g      <= '0;
      sw_c      <= '0;
      rd_v      <= 1'b0;
      rd_last   <= 1'b0;
      rd_c      <= '0;
      rd_g      <= '0;
      out_valid <= 1'b0;
      overrun   <= 1'b0;
      for (int f = 0; f < C2_N; f++) begin
        acc[f]     <= '0;
        out_vec[f] <= '0;
      end
    end else begin
      if (in_valid) begin
        if (busy) overrun <= 1'b1;
        wr_pos <= (wr_pos == 8'(C1_POS-1)) ? '0 : wr_pos + 1'b1;
        if (wr_pos == 8'(C1_POS-1)) busy <= 1'b1;
      end
      // SWC: g fastest, then t, then w'
      rd_v    <= busy;
      rd_c    <= sw_c;
      rd_g    <= sw_g;
      rd_last <= (sw_c == 5'(C2_CYC-1));
      if (busy) begin
        sw_c <= (sw_c == 5'(C2_CYC-1)) ? '0 : sw_c + 1'b1;
        sw_g <= sw_g + 1'b1;
        if (sw_g == 2'(C2_CG-1)) begin
          if (sw_t == 3'(C2_TAPS-1)) begin
            sw_t <= '0;
            if (sw_w == 7'(C2_POS-1)) begin
              sw_w <= '0;
              busy <= 1'b0;
            end else begin
              sw_w <= sw_w + 1'b1;
            end
          end else begin
            sw_t <= sw_t + 1'b1;
          end
        end
      end
      // 16 groups x 16 MACs
      out_valid <= 1'b0;
      if (rd_v) begin
        for (int f = 0; f < C2_N; f++) begin
          if (rd_last)
            out_vec[f] <= requant(acc[f] + dot[f], SHIFT, 1'b1);
          acc[f] <= ((rd_c == '0) ? acc_t'(0) : acc[f]) + dot[f];
        end
        out_valid <= rd_last;
      end
    end
  end
endmodule
