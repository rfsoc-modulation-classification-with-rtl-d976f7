// fc2_layer - final dense layer, 128 inputs -> 8 class scores, and the
// serializer that hands the scores to the DMA.
//
// The 128 ReLU outputs of fc1 are latched in one clock, then fed one per
// clock to 8 parallel MAC units (Table 2: 8 MACs, 128 samples per output);
// unit m multiplies sample j by W[m][j]. No transform or buffer RAM is
// needed. After 128 clocks the 8 accumulators are shifted and saturated to
// 16 bits (no ReLU: these are the logits the host turns into softmax
// confidences) and appear on scores with a one-clock scores_valid, two
// clocks after the last sample. They are then sent as an 8-beat AXI4-Stream
// (class 0 first, tlast on class 7) that honours tready. A new fc1 result
// arriving while the previous one is still being accumulated, or scores
// completing while the previous 8 beats are still unsent, sets the sticky
// overrun flag and the newer data is dropped. Stream format, class order
// and the shift are this design's choices.
// Weights: W[m][j] is written through w_we/w_addr = m*128 + j/w_data.
module fc2_layer
  import amc_pkg::*;
#(
  parameter int WBITS = 16,
  parameter int SHIFT = WBITS - 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  act_t in_vec [FC1_N],
  input  logic w_we,
  input  logic [9:0] w_addr,
  input  logic signed [WBITS-1:0] w_data,
  output logic scores_valid,
  output act_t scores [FC2_N],
  output logic m_tvalid,
  input  logic m_tready,
  output act_t m_tdata,
  output logic m_tlast,
  output logic overrun
);
  typedef logic signed [WBITS-1:0] w_t;

  act_t x [FC1_N];
  logic [FC2_N*WBITS-1:0] wgt [FC1_N];     // 8 weights per input sample
  acc_t acc [FC2_N];

  logic       busy;
  logic [6:0] idx;
  logic       mv, mfirst, mlast;
  act_t       mx;
  logic [FC2_N*WBITS-1:0] mw;
  logic       tx_busy;
  logic [2:0] tx_idx;
  act_t       tx_buf [FC2_N];


  always_ff @(posedge clk) begin
    if (w_we) wgt[7'(w_addr % 10'(FC1_N))][32'(w_addr / 10'(FC1_N))*WBITS +: WBITS] <= w_data;
    mx <= x[idx];
    mw <= wgt[idx];
  end

  assign m_tvalid = tx_busy;
  assign m_tdata  = tx_buf[tx_idx];
  assign m_tlast  = tx_busy && (tx_idx == 3'(FC2_N-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      idx          <= '0;
      mv           <= 1'b0;
      mfirst       <= 1'b0;
      mlast        <= 1'b0;
      scores_valid <= 1'b0;
      tx_busy      <= 1'b0;
      tx_idx       <= '0;
      overrun      <= 1'b0;
      for (int j = 0; j < FC1_N; j++) x[j] <= '0;
      for (int m = 0; m < FC2_N; m++) begin
        acc[m]    <= '0;
        scores[m] <= '0;
        tx_buf[m] <= '0;
      end
    end else begin
      // latch and serialize the fc1 vector
      if (in_valid) begin
        if (busy) overrun <= 1'b1;
        else begin
          x    <= in_vec;
          busy <= 1'b1;
          idx  <= '0;
        end
      end
      mv     <= busy;
      mfirst <= busy && (idx == '0);
      mlast  <= busy && (idx == 7'(FC1_N-1));
      if (busy) begin
        idx <= idx + 1'b1;
        if (idx == 7'(FC1_N-1)) busy <= 1'b0;
      end
      // 8 MAC units
      scores_valid <= 1'b0;
      if (mv) begin
        for (int m = 0; m < FC2_N; m++) begin
          if (mlast)
            scores[m] <= requant(acc[m] + acc_t'(mx) * acc_t'(w_t'(mw[m*WBITS +: WBITS])), SHIFT, 1'b0);
          acc[m] <= (mfirst ? acc_t'(0) : acc[m]) + acc_t'(mx) * acc_t'(w_t'(mw[m*WBITS +: WBITS]));
        end
        scores_valid <= mlast;
      end
      // AXI4-Stream serializer towards the DMA
      if (tx_busy && m_tready) begin
        tx_idx <= tx_idx + 1'b1;
        if (tx_idx == 3'(FC2_N-1)) tx_busy <= 1'b0;
      end
      if (scores_valid) begin
        if (tx_busy && !(m_tready && tx_idx == 3'(FC2_N-1))) overrun <= 1'b1;
        else begin
          tx_buf  <= scores;
          tx_busy <= 1'b1;
          tx_idx  <= '0;
        end
      end
    end
  end

  // AXI4-Stream rule: data held stable while valid and not ready.
  assert property (@(posedge clk) disable iff (!rst_n)
    m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata) && $stable(m_tlast));
endmodule
