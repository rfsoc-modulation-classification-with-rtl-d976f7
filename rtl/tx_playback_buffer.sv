// tx_playback_buffer - transmit side of the data set generation loop.
//
// A frame of up to DEPTH complex samples (2 x 4096 in the data set) is
// received from the DMA over an AXI4-Stream slave (tdata = {Q, I}, 16 bits
// each, tlast on the final sample) while playback is stopped, and its
// length is taken from tlast. After a start pulse the stored frame is read
// cyclically, one sample per clock on which sample_en is high (the rate
// the DAC path takes samples), until a stop pulse. A new frame can be
// loaded only while stopped (s_tready low during playback). Loading over
// the stream and cyclic replay follow the data set generation flow; the
// control pulses and stream format are this design's choice.
// Timing: out_valid/out_i/out_q follow sample_en by one clock.
module tx_playback_buffer
  import amc_pkg::*;
#(
  parameter int DEPTH = 4096
) (
  input  logic clk,
  input  logic rst_n,
  input  logic s_tvalid,
  output logic s_tready,
  input  logic [31:0] s_tdata,
  input  logic s_tlast,
  input  logic start,
  input  logic stop,
  input  logic sample_en,
  output logic playing,
  output logic loaded,
  output logic out_valid,
  output act_t out_i,
  output act_t out_q,
  output logic wrapped      // pulses when replay restarts from sample 0
);
  localparam int AW = $clog2(DEPTH);

  logic [31:0]   mem [DEPTH];
  logic [AW-1:0] wr_addr, rd_addr;
  logic [AW:0]   len;
  logic [31:0]   rd_word;

  assign s_tready = !playing;
  assign out_i    = act_t'(rd_word[15:0]);
  assign out_q    = act_t'(rd_word[31:16]);

  always_ff @(posedge clk) begin
    if (s_tvalid && s_tready) mem[wr_addr] <= s_tdata;
    if (playing && sample_en) rd_word <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr   <= '0;
      rd_addr   <= '0;
      len       <= '0;
      playing   <= 1'b0;
      loaded    <= 1'b0;
      out_valid <= 1'b0;
      wrapped   <= 1'b0;
    end else begin
      if (s_tvalid && s_tready) begin
        loaded <= 1'b0;
        if (s_tlast || wr_addr == AW'(DEPTH-1)) begin
          len     <= (AW+1)'(wr_addr) + 1'b1;
          wr_addr <= '0;
          loaded  <= 1'b1;
        end else begin
          wr_addr <= wr_addr + 1'b1;
        end
      end
      if (stop)
        playing <= 1'b0;
      else if (start && loaded && !playing) begin
        playing <= 1'b1;
        rd_addr <= '0;
      end
      out_valid <= playing && sample_en;
      wrapped   <= 1'b0;
      if (playing && sample_en) begin
        if ((AW+1)'(rd_addr) == len - 1'b1) begin
          rd_addr <= '0;
          wrapped <= 1'b1;
        end else begin
          rd_addr <= rd_addr + 1'b1;
        end
      end
    end
  end
endmodule
