// tb_amc_top - end-to-end test of the whole receive and transmit system at
// its default sizes.
// Loads all CNN weights, then drives NFRAMES x 4096 complex ADC samples at
// one per clock (128 Msps). The reference decimates them with a direct
// FIR model, interleaves I/Q and runs the plain network model; the 8 scores
// of every frame must match on the scores port and on the DMA stream, which
// is drained with a toggling tready. Meanwhile the processor side arms a
// frame capture over AXI4-Lite (the 128 captured samples must equal the
// reference decimator output at the right place, and the status register
// must count one frame) and the transmit buffer is loaded with a short
// frame, replayed cyclically and stopped. Each mechanism is counted and
// must occur: bursts, conv1/conv2 vectors, fc1 stalls, stream backpressure,
// capture, transmit wrap-around.
module tb_amc_top;
  import amc_pkg::*;
  import amc_ref_pkg::*;
  localparam int NFRAMES = 2;
  localparam int NADC = NFRAMES*4096;
  localparam int TXLEN = 40;
  logic clk = 0, rst_n = 0;
  logic adc_valid = 0;
  act_t adc_i = '0, adc_q = '0;
  logic w_we = 0;
  wlayer_e w_layer = WL_CONV1;
  logic [17:0] w_addr = '0;
  logic signed [15:0] w_data = '0;
  logic scores_valid, m_cls_tvalid, m_cls_tlast, overrun;
  logic m_cls_tready = 1;
  act_t scores [FC2_N];
  act_t m_cls_tdata;
  logic [3:0] cnn_evt;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 1, s_arvalid = 0, s_rready = 1;
  logic [3:0] s_awaddr = '0, s_araddr = '0;
  logic [31:0] s_wdata = '0;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  logic [31:0] s_rdata;
  logic m_cap_tvalid, m_cap_tlast;
  logic m_cap_tready = 1;
  logic [31:0] m_cap_tdata;
  logic s_tx_tvalid = 0, s_tx_tlast = 0, tx_start = 0, tx_stop = 0, dac_sample_en = 0;
  logic [31:0] s_tx_tdata = '0;
  logic s_tx_tready, tx_playing, tx_loaded, dac_valid, tx_wrapped;
  act_t dac_i, dac_q;

  amc_top dut (.*);

  int checks = 0, failures = 0;
  int ai [], aq [], di1 [], dq1 [], di [], dq [];
  int z [NFRAMES][8];
  int txd [TXLEN];
  int cyc, nsc, beat, bframe, cap_n, cap_start, dac_n;
  int n_burst, n_c1, n_c2, n_stall, n_bp, n_wrap, n_cap;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    n_burst += int'(cnn_evt[0]);
    n_c1    += int'(cnn_evt[1]);
    n_c2    += int'(cnn_evt[2]);
    n_stall += int'(cnn_evt[3]);
    n_wrap  += int'(tx_wrapped);
    if (m_cls_tvalid && !m_cls_tready) n_bp++;
    if (scores_valid) begin
      for (int m = 0; m < 8; m++)
        check(scores[m] == act_t'(z[nsc][m]),
              $sformatf("frame %0d class %0d got %0d exp %0d", nsc, m, scores[m], z[nsc][m]));
      nsc++;
    end
    if (m_cls_tvalid && m_cls_tready) begin
      check(m_cls_tdata == act_t'(z[bframe][beat]), "stream beat");
      check(m_cls_tlast == (beat == 7), "stream tlast");
      if (beat == 7) begin beat = 0; bframe++; end
      else beat++;
    end
    if (m_cap_tvalid && m_cap_tready) begin
      check(m_cap_tdata == {16'(dq[cap_start + cap_n]), 16'(di[cap_start + cap_n])},
            $sformatf("capture sample %0d", cap_n));
      check(m_cap_tlast == (cap_n == 127), "capture tlast");
      cap_n++;
      if (cap_n == 128) n_cap++;
    end
    if (dac_valid) begin
      check(dac_i == act_t'(txd[dac_n % TXLEN]) && dac_q == act_t'(-txd[dac_n % TXLEN]),
            $sformatf("dac sample %0d", dac_n));
      dac_n++;
    end
  end

  // decimated sample index currently arriving, for the capture check
  int dec_cnt;
  always @(posedge clk) if (rst_n && dut.dec_valid) dec_cnt++;

  task automatic load(input wlayer_e l, input int n);
    for (int a = 0; a < n; a++) begin
      @(negedge clk); w_we = 1; w_layer = l; w_addr = 18'(a); w_data = 16'(wgt_init(int'(l), a, 16));
    end
  endtask

  task automatic axil_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); s_awvalid = 1; s_wvalid = 1; s_awaddr = a; s_wdata = d;
    do @(posedge clk); while (!s_awready);
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
  endtask

  task automatic axil_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); s_arvalid = 1; s_araddr = a;
    do @(posedge clk); while (!s_arready);
    @(negedge clk); s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
  endtask

  initial begin
    logic [31:0] st;
    int x [256];
    // stimulus: random symbols held for 8 samples (8 samples per symbol)
    ai = new[NADC]; aq = new[NADC];
    for (int n = 0; n < NADC; n += 8) begin
      int si = $urandom_range(0, 3), sq = $urandom_range(0, 3);
      for (int k = 0; k < 8; k++) begin
        ai[n+k] = (si - 2) * 9000 + 4500;
        aq[n+k] = (sq - 2) * 9000 + 4500;
      end
    end
    fir_decim(ai, FIR_S1, 8, di1); fir_decim(di1, FIR_S2, 4, di);
    fir_decim(aq, FIR_S1, 8, dq1); fir_decim(dq1, FIR_S2, 4, dq);
    for (int f = 0; f < NFRAMES; f++) begin
      for (int i = 0; i < 128; i++) begin
        x[2*i] = di[128*f + i];
        x[2*i+1] = dq[128*f + i];
      end
      forward(x, 16, z[f]);
    end
    for (int i = 0; i < TXLEN; i++) txd[i] = $urandom_range(0, 20000) - 10000;

    repeat (3) @(negedge clk);
    rst_n = 1;
    load(WL_CONV1, 64*3);
    load(WL_CONV2, 16*384);
    load(WL_FC1, 128*1984);
    load(WL_FC2, 8*128);
    @(negedge clk); w_we = 0;
    // transmit buffer: load a short frame over the stream
    for (int i = 0; i < TXLEN; i++) begin
      @(negedge clk); s_tx_tvalid = 1; s_tx_tdata = {16'(-txd[i]), 16'(txd[i])};
      s_tx_tlast = (i == TXLEN-1);
    end
    @(negedge clk); s_tx_tvalid = 0; s_tx_tlast = 0;
    check(tx_loaded, "tx frame loaded");
    @(negedge clk); tx_start = 1;
    @(negedge clk); tx_start = 0;

    fork
      // processor arms a capture during the first frame
      begin
        repeat (600) @(negedge clk);
        axil_write(4'h0, 32'h1);
        cap_start = dec_cnt;
        axil_read(4'h4, st);
        check(st[0], "capture busy after arming");
      end
      // the classification DMA applies backpressure now and then
      forever begin
        @(negedge clk); m_cls_tready = ($urandom_range(0, 3) != 0);
      end
    join_none
    // ADC samples, one per clock; the DAC takes one sample per 4 clocks
    for (int n = 0; n < NADC; n++) begin
      @(negedge clk); adc_valid = 1; adc_i = act_t'(ai[n]); adc_q = act_t'(aq[n]);
      dac_sample_en = (n % 4 == 0) && (n < 1000);
      tx_stop = (n == 1000);
    end
    @(negedge clk); adc_valid = 0; dac_sample_en = 0;
    repeat (9000) @(negedge clk);
    disable fork;
    m_cls_tready = 1;
    repeat (20) @(negedge clk);
    axil_read(4'h4, st);
    check(st == 32'h0001_0000, $sformatf("capture status %h", st));
    check(nsc == NFRAMES, $sformatf("classifications %0d", nsc));
    check(bframe == NFRAMES, "all scores streamed");
    check(!overrun, "no overrun");
    check(!tx_playing, "tx stopped");
    check(dac_n == 250, $sformatf("dac samples %0d", dac_n));
    check(n_burst == NFRAMES, "bursts");
    check(n_c1 == 252*NFRAMES, "conv1 vectors");
    check(n_c2 == 124*NFRAMES, "conv2 vectors");
    check(n_stall > 0, "fc1 stalls");
    check(n_bp > 0, "classification stream backpressure");
    check(n_wrap > 0, "tx replay wrapped");
    check(n_cap == 1, "one frame captured");
    $display("bursts %0d conv1 %0d conv2 %0d fc1-stalls %0d backpressure %0d tx-wraps %0d captures %0d",
             n_burst, n_c1, n_c2, n_stall, n_bp, n_wrap, n_cap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
