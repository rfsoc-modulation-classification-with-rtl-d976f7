// decim_chain - decimation filter chain in front of the classifier (DDC
// back end). Reduces complex baseband from 128 Msps to 4 Msps (factor 32).
//
// The I and Q paths are filtered by identical two-stage chains, as the
// model prescribes: stage 1 low-pass decimate-by-8 (16 taps), stage 2
// low-pass decimate-by-4 (48 taps), together giving a stop band edge at
// fs/64 = 2 MHz while keeping the 1 MHz signal band. The split into 8 x 4 and
// the tap sets (amc_pkg::FIR_S1/FIR_S2) are this design's choice.
// Interface: in_valid qualifies one complex sample (I, Q) per clock;
// out_valid pulses once per 32 valid inputs with the decimated pair, two
// clocks after the 32nd input.
module decim_chain
  import amc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  act_t in_i,
  input  act_t in_q,
  output logic out_valid,
  output act_t out_i,
  output act_t out_q
);
  logic s1_vi, s1_vq, s2_vq;
  act_t s1_i, s1_q;

  decim_fir #(.NTAPS(FIR_S1_N), .DECIM(8), .COEF(FIR_S1)) u_s1_i (
    .clk, .rst_n, .in_valid, .in_data(in_i), .out_valid(s1_vi), .out_data(s1_i));
  decim_fir #(.NTAPS(FIR_S1_N), .DECIM(8), .COEF(FIR_S1)) u_s1_q (
    .clk, .rst_n, .in_valid, .in_data(in_q), .out_valid(s1_vq), .out_data(s1_q));
  decim_fir #(.NTAPS(FIR_S2_N), .DECIM(4), .COEF(FIR_S2)) u_s2_i (
    .clk, .rst_n, .in_valid(s1_vi), .in_data(s1_i), .out_valid(out_valid), .out_data(out_i));
  decim_fir #(.NTAPS(FIR_S2_N), .DECIM(4), .COEF(FIR_S2)) u_s2_q (
    .clk, .rst_n, .in_valid(s1_vq), .in_data(s1_q), .out_valid(s2_vq), .out_data(out_q));

  // Both paths run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) s1_vi == s1_vq);
  assert property (@(posedge clk) disable iff (!rst_n) out_valid == s2_vq);
endmodule
