// pingpong_burst_buffer - rate adapter between the slow decimated stream and
// the CNN clock.
//
// Two 256-sample banks. Incoming interleaved samples fill one bank; when it
// holds a full frame (128 I/Q pairs) the banks swap and the full bank is read
// out as a burst of 256 back-to-back samples at the clock rate while the
// other bank fills. out_first/out_last mark the first and last sample of a
// burst; the burst starts three clocks after the frame's last input sample
// (one to swap, one RAM read). If a bank is completed while the other is
// still bursting, the later burst waits, and if the writer would overwrite
// a bank that has not been read yet the sticky overrun flag is set.
// Frame alignment starts from reset; the ping-pong behaviour follows the
// model, the exact handshake is this design's choice.
module pingpong_burst_buffer
  import amc_pkg::*;
#(
  parameter int DEPTH = FRAME_LEN
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  act_t in_data,
  output logic out_valid,
  output logic out_first,
  output logic out_last,
  output act_t out_data,
  output logic overrun
);
  localparam int AW = $clog2(DEPTH);

  act_t mem [2][DEPTH];
  logic          wr_bank;
  logic [AW-1:0] wr_addr;
  logic [1:0]    full;          // bank holds an unread frame
  logic          rd_active, rd_bank;
  logic [AW-1:0] rd_addr;

  always_ff @(posedge clk) begin
    if (in_valid) mem[wr_bank][wr_addr] <= in_data;
    out_data <= mem[rd_bank][rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank   <= 1'b0;
      wr_addr   <= '0;
      full      <= '0;
      rd_active <= 1'b0;
      rd_bank   <= 1'b0;
      rd_addr   <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      // write side
      if (in_valid) begin
        if (full[wr_bank]) overrun <= 1'b1;
        if (wr_addr == AW'(DEPTH-1)) begin
          wr_addr       <= '0;
          wr_bank       <= ~wr_bank;
          full[wr_bank] <= 1'b1;
        end else begin
          wr_addr <= wr_addr + 1'b1;
        end
      end
      // read side: one burst at a time
      out_valid <= rd_active;
      out_first <= rd_active && (rd_addr == '0);
      out_last  <= rd_active && (rd_addr == AW'(DEPTH-1));
      if (rd_active) begin
        if (rd_addr == AW'(DEPTH-1)) begin
          rd_active     <= 1'b0;
          rd_addr       <= '0;
          full[rd_bank] <= 1'b0;
        end else begin
          rd_addr <= rd_addr + 1'b1;
        end
      end else if (full[~wr_bank]) begin
        rd_active <= 1'b1;
        rd_bank   <= ~wr_bank;
        rd_addr   <= '0;
      end
    end
  end
endmodule
