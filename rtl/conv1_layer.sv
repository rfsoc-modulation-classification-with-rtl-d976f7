// conv1_layer - first convolutional layer: 64 filters of 1x3 over the 2x128
// I/Q frame, ReLU, in GEMM form.
//
// Input buffer: the 256 interleaved samples of one frame (x[2*w+h], h = 0 for
// I, 1 for Q) are written into a single-port-write RAM. When the frame's
// last sample is in, the sliding window controller (SWC) walks the 252
// window positions p = 2*w + h (w = 0..125, h = 0..1) and for each position
// reads the 3 samples under the window, x[2*(w+k)+h] for k = 0..2: one
// column of the GEMM-transformed input matrix per 3 clocks. Each read sample
// is broadcast to 64 MAC units, unit n multiplying it by weight W[n][k], so
// that every unit produces one output every 3 clocks (Table 2 of the model:
// 64 parallel MACs, 3 samples per output). Results are shifted by SHIFT,
// saturated to 16 bits and passed through ReLU, and leave as a 64-wide
// vector, one vector per position, 252 vectors per frame.
// Timing: the first vector appears 5 clocks after the frame's last input
// sample, the last one 3*252 = 756 clocks after the first read (rate
// factor R = 3). An input sample arriving while the SWC is still reading
// the buffer sets the sticky overrun flag. The structure follows the model;
// the output position order (I and Q rows of a column next to each other)
// and the shift are this design's choices.
// Weights: W[n][k] is written through w_we/w_addr = n*3 + k/w_data.
module conv1_layer
  import amc_pkg::*;
#(
  parameter int WBITS = 16,
  parameter int SHIFT = WBITS - 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  act_t in_data,
  input  logic w_we,
  input  logic [7:0] w_addr,
  input  logic signed [WBITS-1:0] w_data,
  output logic out_valid,
  output act_t out_vec [C1_N],
  output logic busy,
  output logic overrun
);
  typedef logic signed [WBITS-1:0] w_t;

  act_t buffer [FRAME_LEN];
  w_t   wgt [C1_N][C1_K];
  acc_t acc [C1_N];

  logic [7:0] wr_addr;
  logic [6:0] sw_w;       // window column 0..125
  logic       sw_h;       // row (I/Q)
  logic [1:0] sw_k;       // tap 0..2
  logic       rd_v;       // sample in rd_data is valid
  logic [1:0] rd_k;
  act_t       rd_data;


  logic [5:0] wa_n;
  logic [1:0] wa_k;
  assign wa_n = 6'(w_addr / 8'(C1_K));
  assign wa_k = 2'(w_addr % 8'(C1_K));

  always_ff @(posedge clk) begin
    if (w_we) wgt[wa_n][wa_k] <= w_data;
  end

  // Buffer RAM and GEMM-ordered read.
  logic [7:0] rd_addr;
  assign rd_addr = 8'({sw_w, 1'b0}) + 8'({sw_k, 1'b0}) + 8'(sw_h);

  always_ff @(posedge clk) begin
    if (in_valid) buffer[wr_addr] <= in_data;
    rd_data <= buffer[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr   <= '0;
      busy      <= 1'b0;
      sw_w      <= '0;
      sw_h      <= 1'b0;
      sw_k      <= '0;
      rd_v      <= 1'b0;
      rd_k      <= '0;
      out_valid <= 1'b0;
      overrun   <= 1'b0;
      for (int n = 0; n < C1_N; n++) begin
        acc[n]     <= '0;
        out_vec[n] <= '0;
      end
    end else begin
      // input buffer
      if (in_valid) begin
        if (busy) overrun <= 1'b1;
        wr_addr <= (wr_addr == 8'(FRAME_LEN-1)) ? '0 : wr_addr + 1'b1;
        if (wr_addr == 8'(FRAME_LEN-1)) busy <= 1'b1;
      end
      // sliding window controller: k fastest, then h, then w
      rd_v <= busy;
      rd_k <= sw_k;
      if (busy) begin
        if (sw_k == 2'(C1_K-1)) begin
          sw_k <= '0;
          sw_h <= ~sw_h;
          if (sw_h) begin
            if (sw_w == 7'(C1_W-1)) begin
              sw_w <= '0;
              busy <= 1'b0;
            end else begin
              sw_w <= sw_w + 1'b1;
            end
          end
        end else begin
          sw_k <= sw_k + 1'b1;
        end
      end
      // 64 MAC units
      out_valid <= 1'b0;
      if (rd_v) begin
        for (int n = 0; n < C1_N; n++) begin
          if (rd_k == 2'(C1_K-1))
            out_vec[n] <= requant(acc[n] + acc_t'(rd_data) * acc_t'(wgt[n][rd_k]), SHIFT, 1'b1);
          acc[n] <= (rd_k == '0) ? acc_t'(rd_data) * acc_t'(wgt[n][rd_k])
                                 : acc[n] + acc_t'(rd_data) * acc_t'(wgt[n][rd_k]);
        end
        out_valid <= (rd_k == 2'(C1_K-1));
      end
    end
  end
endmodule
