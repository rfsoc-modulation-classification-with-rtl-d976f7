// fc1_layer - first dense layer, 1984 inputs -> 128 outputs, ReLU.
//
// Vector buffer: the 124 sixteen-wide vectors of conv2 are written into a
// 124-word buffer as they arrive. A read controller takes the 1984 samples
// out one at a time (sample r = 16*v + f, i.e. column-major order of the
// 16x124 conv2 output) and broadcasts each to 128 parallel MAC units; unit
// n multiplies it by W[n][r] from the weight RAM, one 128-weight word per
// sample. The reader starts as soon as the first vector of a frame is
// buffered and stalls whenever it catches up with the writer, so it runs in
// the shadow of conv2 and finishes 16 clocks or so after conv2's last
// vector (Table 2: 128 MACs, 1984 samples per output). After the last
// sample the 128 results are shifted, saturated, passed through ReLU and
// presented together on out_vec with a one-clock out_valid.
// Stalls are counted on the stall output (one pulse per stalled clock).
// A vector arriving when 124 are already waiting sets the sticky overrun
// flag and is dropped. The read order (which fixes how trained weights must
// be laid out) and the shift are this design's choices.
// Weights: W[n][r] is written through w_we/w_addr = n*1984 + r/w_data.
module fc1_layer
  import amc_pkg::*;
#(
  parameter int WBITS = 16,
  parameter int SHIFT = WBITS - 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  act_t in_vec [C2_N],
  input  logic w_we,
  input  logic [17:0] w_addr,
  input  logic signed [WBITS-1:0] w_data,
  output logic out_valid,
  output act_t out_vec [FC1_N],
  output logic stall,
  output logic overrun
);
  typedef logic signed [WBITS-1:0] w_t;

  // vector buffer, one 16-sample conv2 vector per word; weight RAM, one
  // word of 128 weights (neuron n at bits n*WBITS) per input sample
  logic [C2_N*ACT_W-1:0]  vbuf [C2_POS];
  logic [FC1_N*WBITS-1:0] wgt  [FC1_IN];
  acc_t acc [FC1_N];

  logic [6:0]  wr_cnt;     // vectors of the current frame written
  logic [10:0] rd_idx;     // sample being read 0..1983
  logic        can_read;
  logic        rd_v, rd_first, rd_last;
  logic [6:0]  wr_addr;
  act_t        rd_x;
  logic [C2_N*ACT_W-1:0]  rd_vword, in_word;
  logic [3:0]             rd_lane;
  logic [FC1_N*WBITS-1:0] rd_w;
  logic [10:0] wa_r;
  logic [6:0]  wa_n;
  logic        done;


  assign wa_r = 11'(w_addr % 18'(FC1_IN));
  assign wa_n = 7'(w_addr / 18'(FC1_IN));
  always_comb
    for (int f = 0; f < C2_N; f++) in_word[f*ACT_W +: ACT_W] = in_vec[f];
  assign rd_x = act_t'(rd_vword[32'(rd_lane)*ACT_W +: ACT_W]);

  assign can_read = (7'(rd_idx >> 4) < wr_cnt);
  assign done     = can_read && (rd_idx == 11'(FC1_IN-1));
  assign stall    = !can_read && (wr_cnt != '0);
  assign wr_addr  = done ? '0 : wr_cnt;

  always_ff @(posedge clk) begin
    if (w_we) wgt[wa_r][32'(wa_n)*WBITS +: WBITS] <= w_data;
    if (in_valid && (done || wr_cnt != 7'(C2_POS))) vbuf[wr_addr] <= in_word;
    rd_vword <= vbuf[7'(rd_idx >> 4)];
    rd_lane  <= rd_idx[3:0];
    rd_w     <= wgt[rd_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_cnt    <= '0;
      rd_idx    <= '0;
      rd_v      <= 1'b0;
      rd_first  <= 1'b0;
      rd_last   <= 1'b0;
      out_valid <= 1'b0;
      overrun   <= 1'b0;
      for (int n = 0; n < FC1_N; n++) begin
        acc[n]     <= '0;
        out_vec[n] <= '0;
      end
    end else begin
      // writer; the count is cleared when the reader has consumed the frame
      if (done)
        wr_cnt <= in_valid ? 7'd1 : 7'd0;
      else if (in_valid) begin
        if (wr_cnt == 7'(C2_POS)) overrun <= 1'b1;
        else                      wr_cnt  <= wr_cnt + 1'b1;
      end
      // reader
      rd_v    <= can_read;
      rd_first <= can_read && (rd_idx == '0);
      rd_last  <= done;
      if (can_read) rd_idx <= done ? '0 : rd_idx + 1'b1;
      // 128 MAC units
      out_valid <= 1'b0;
      if (rd_v) begin
        for (int n = 0; n < FC1_N; n++) begin
          if (rd_last)
            out_vec[n] <= requant(acc[n] + acc_t'(rd_x) * acc_t'(w_t'(rd_w[n*WBITS +: WBITS])), SHIFT, 1'b1);
          acc[n] <= (rd_first ? acc_t'(0) : acc[n]) + acc_t'(rd_x) * acc_t'(w_t'(rd_w[n*WBITS +: WBITS]));
        end
        out_valid <= rd_last;
      end
    end
  end
endmodule
