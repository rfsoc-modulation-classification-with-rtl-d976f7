// decim_fir - low-pass FIR decimator, one real sample stream.
//
// Keeps the last NTAPS input samples in a shift register. Every DECIM-th
// valid input the full dot product with the Q1.15 taps COEF is formed,
// rounded, shifted right by 15 and saturated to 16 bits; only the retained
// outputs are computed (direct-form decimator). Output: out_valid pulses for
// one cycle, one clock after the input sample that completes a block of
// DECIM inputs. The taps are parameters so the same module serves both
// stages of the decimation chain; the filter structure is this design's
// choice; the reference architecture fixes only the overall response.
module decim_fir
  import amc_pkg::*;
#(
  parameter int NTAPS = FIR_S1_N,
  parameter int DECIM = 8,
  parameter int COEF [NTAPS] = FIR_S1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  act_t in_data,
  output logic out_valid,
  output act_t out_data
);
  act_t dly [NTAPS-1];          // previous samples, dly[0] newest
  logic [$clog2(DECIM+1)-1:0] phase;
  acc_t sum;

  always_comb begin
    sum = acc_t'(COEF[0]) * acc_t'(in_data);
    for (int t = 1; t < NTAPS; t++)
      sum += acc_t'(COEF[t]) * acc_t'(dly[t-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int t = 0; t < NTAPS-1; t++) dly[t] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        dly[0] <= in_data;
        for (int t = 1; t < NTAPS-1; t++) dly[t] <= dly[t-1];
        if (phase == ($bits(phase))'(DECIM-1)) begin
          phase     <= '0;
          out_valid <= 1'b1;
          out_data  <= sat16((sum + acc_t'(1 << 14)) >>> 15);
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end
endmodule
