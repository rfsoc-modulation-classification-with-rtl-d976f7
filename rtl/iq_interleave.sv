// iq_interleave - turns the decimated complex stream into the one-dimensional
// input of the CNN: I0, Q0, I1, Q1, ...
//
// A complex sample accepted with in_valid is emitted as two consecutive
// output beats, I first (the cycle after acceptance) then Q. This doubles
// the sample rate, which is the factor of 2 the model budgets for
// interleaving. Inputs must be at least two clocks apart (they are 32 apart
// after decimation); a sample arriving while Q is still pending sets the
// sticky overrun flag and is dropped. The I-before-Q order is this design's
// choice.
module iq_interleave
  import amc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  act_t in_i,
  input  act_t in_q,
  output logic out_valid,
  output act_t out_data,
  output logic overrun
);
  act_t q_hold;
  logic q_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_hold    <= '0;
      q_pend    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      overrun   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (q_pend) begin
        out_valid <= 1'b1;
        out_data  <= q_hold;
        q_pend    <= 1'b0;
        if (in_valid) overrun <= 1'b1;
      end else if (in_valid) begin
        out_valid <= 1'b1;
        out_data  <= in_i;
        q_hold    <= in_q;
        q_pend    <= 1'b1;
      end
    end
  end
endmodule
