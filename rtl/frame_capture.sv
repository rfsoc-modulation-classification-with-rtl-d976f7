// frame_capture - captures one frame of the decimated receive stream on a
// command from the processor and sends it to the DMA.
//
// Control is an AXI4-Lite slave with two 32-bit registers:
//   0x0 CTRL   write bit 0 = 1: arm a capture (self-clearing)
//   0x4 STATUS read: bit 0 busy (armed, capturing or sending),
//              bits 31:16 number of frames captured since reset
// When armed, the next FRAME complex samples of the input stream (after
// the register write) are stored, then sent over an AXI4-Stream master as
// {Q, I} words with tlast on the last one, honouring tready. Commands that
// arrive while busy are ignored. Capturing FRAME = 128 samples on a
// processor command and handing them to the DMA follows the data set
// generation flow; the register map is this design's choice.
// Timing: one write response per write (OKAY), read data one clock after
// the address is accepted; the stream starts the clock after the last
// sample is stored.
module frame_capture
  import amc_pkg::*;
#(
  parameter int FRAME = FRAME_IQ
) (
  input  logic clk,
  input  logic rst_n,
  // sample stream
  input  logic in_valid,
  input  act_t in_i,
  input  act_t in_q,
  // AXI4-Lite slave
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [3:0]  s_awaddr,
  input  logic        s_wvalid,
  output logic        s_wready,
  input  logic [31:0] s_wdata,
  output logic        s_bvalid,
  input  logic        s_bready,
  output logic [1:0]  s_bresp,
  input  logic        s_arvalid,
  output logic        s_arready,
  input  logic [3:0]  s_araddr,
  output logic        s_rvalid,
  input  logic        s_rready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  // AXI4-Stream master to the DMA
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic [31:0] m_tdata,
  output logic        m_tlast
);
  localparam int AW = $clog2(FRAME);
  typedef enum logic [1:0] {IDLE, ARMED, SEND} state_e;

  state_e        state;
  logic [31:0]   buffer [FRAME];
  logic [AW-1:0] cnt;
  logic [15:0]   frames;
  logic          wr_fire, arm;

  // write channel: address and data taken together
  assign s_awready = !s_bvalid && s_awvalid && s_wvalid;
  assign s_wready  = s_awready;
  assign wr_fire   = s_awready;
  assign arm       = wr_fire && s_awaddr[3:2] == 2'd0 && s_wdata[0];
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_arready = !s_rvalid;

  assign m_tvalid = (state == SEND);
  assign m_tdata  = buffer[cnt];
  assign m_tlast  = (state == SEND) && (cnt == AW'(FRAME-1));

  always_ff @(posedge clk) begin
    if (state == ARMED && in_valid) buffer[cnt] <= {in_q, in_i};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      cnt      <= '0;
      frames   <= '0;
      s_bvalid <= 1'b0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (wr_fire)                s_bvalid <= 1'b1;
      else if (s_bready)          s_bvalid <= 1'b0;
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        s_rdata  <= (s_araddr[3:2] == 2'd1) ? {frames, 15'd0, state != IDLE} : 32'd0;
      end else if (s_rready) begin
        s_rvalid <= 1'b0;
      end
      unique case (state)
        IDLE:  if (arm) begin
                 state <= ARMED;
                 cnt   <= '0;
               end
        ARMED: if (in_valid) begin
                 cnt <= cnt + 1'b1;
                 if (cnt == AW'(FRAME-1)) begin
                   state  <= SEND;
                   frames <= frames + 1'b1;
                 end
               end
        SEND:  if (m_tready) begin
                 cnt <= cnt + 1'b1;
                 if (cnt == AW'(FRAME-1)) state <= IDLE;
               end
        default: state <= IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata));
  assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid);
endmodule
