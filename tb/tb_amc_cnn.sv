// tb_amc_cnn - runs whole frames through the streaming CNN, in its 16-bit,
// 8-bit and 4-bit weight versions side by side on the same input.
// Loads all weights through the weight port, then streams interleaved I/Q
// samples at the decimated rate (one per 16 clocks, i.e. 4 Msps complex at
// 128 MHz) for NFRAMES consecutive frames. Each frame's 8 scores are
// compared with the reference model, on scores and on the output stream;
// the latency from a frame's last sample to its scores must be the same for
// every frame, and no overrun may occur. Bursts, conv1/conv2 vectors and
// fc1 stalls are counted and must all occur.
module tb_amc_cnn;
  import amc_pkg::*;
  import amc_ref_pkg::*;
  localparam int NFRAMES = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  act_t in_data = '0;
  logic w_we = 0;
  wlayer_e w_layer = WL_CONV1;
  logic [17:0] w_addr = '0;
  logic signed [15:0] w_data16 = '0;
  logic signed [7:0]  w_data8 = '0;
  logic signed [3:0]  w_data4 = '0;
  logic sv16, sv8, sv4, tv16, tv8, tv4, tl16, tl8, tl4, ovr16, ovr8, ovr4;
  act_t sc16 [FC2_N], sc8 [FC2_N], sc4 [FC2_N];
  act_t td16, td8, td4;
  logic [3:0] evt16, evt8, evt4;
  int checks = 0, failures = 0;
  int x [NFRAMES][256];
  int z16 [NFRAMES][8], z8 [NFRAMES][8], z4 [NFRAMES][8];
  int cyc, nsc16, nsc8, nsc4, beat16, bframe16, lat0, last_in_cyc [NFRAMES];
  int n_burst, n_c1, n_c2, n_stall;

  amc_cnn #(.WBITS(16)) dut16 (.clk, .rst_n, .in_valid, .in_data, .w_we, .w_layer,
    .w_addr, .w_data(w_data16), .scores_valid(sv16), .scores(sc16), .m_tvalid(tv16),
    .m_tready(1'b1), .m_tdata(td16), .m_tlast(tl16), .evt(evt16), .overrun(ovr16));
  amc_cnn #(.WBITS(8)) dut8 (.clk, .rst_n, .in_valid, .in_data, .w_we, .w_layer,
    .w_addr, .w_data(w_data8), .scores_valid(sv8), .scores(sc8), .m_tvalid(tv8),
    .m_tready(1'b1), .m_tdata(td8), .m_tlast(tl8), .evt(evt8), .overrun(ovr8));
  amc_cnn #(.WBITS(4)) dut4 (.clk, .rst_n, .in_valid, .in_data, .w_we, .w_layer,
    .w_addr, .w_data(w_data4), .scores_valid(sv4), .scores(sc4), .m_tvalid(tv4),
    .m_tready(1'b1), .m_tdata(td4), .m_tlast(tl4), .evt(evt4), .overrun(ovr4));

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
    n_burst += int'(evt16[0]);
    n_c1    += int'(evt16[1]);
    n_c2    += int'(evt16[2]);
    n_stall += int'(evt16[3]);
    if (sv16) begin
      int lat;
      lat = cyc - last_in_cyc[nsc16];
      if (nsc16 == 0) lat0 = lat;
      check(lat == lat0 && lat > 3700 && lat < 4300, $sformatf("latency %0d vs %0d", lat, lat0));
      for (int m = 0; m < 8; m++)
        check(sc16[m] == act_t'(z16[nsc16][m]),
              $sformatf("16w frame %0d class %0d got %0d exp %0d", nsc16, m, sc16[m], z16[nsc16][m]));
      nsc16++;
    end
    if (sv8) begin
      for (int m = 0; m < 8; m++)
        check(sc8[m] == act_t'(z8[nsc8][m]),
              $sformatf("8w frame %0d class %0d got %0d exp %0d", nsc8, m, sc8[m], z8[nsc8][m]));
      nsc8++;
    end
    if (sv4) begin
      for (int m = 0; m < 8; m++)
        check(sc4[m] == act_t'(z4[nsc4][m]),
              $sformatf("4w frame %0d class %0d got %0d exp %0d", nsc4, m, sc4[m], z4[nsc4][m]));
      nsc4++;
    end
    if (tv16) begin
      check(td16 == act_t'(z16[bframe16][beat16]), "16w stream beat");
      check(tl16 == (beat16 == 7), "16w tlast");
      if (beat16 == 7) begin beat16 = 0; bframe16++; end
      else beat16++;
    end
  end

  task automatic load(input wlayer_e l, input int n);
    for (int a = 0; a < n; a++) begin
      @(negedge clk);
      w_we = 1; w_layer = l; w_addr = 18'(a);
      w_data16 = 16'(wgt_init(int'(l), a, 16));
      w_data8  = 8'(wgt_init(int'(l), a, 8));
      w_data4  = 4'(wgt_init(int'(l), a, 4));
    end
  endtask

  initial begin
    for (int f = 0; f < NFRAMES; f++) begin
      for (int i = 0; i < 256; i++) x[f][i] = $signed($urandom_range(0, 6000)) - 3000;
      forward(x[f], 16, z16[f]);
      forward(x[f], 8, z8[f]);
      forward(x[f], 4, z4[f]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(WL_CONV1, 64*3);
    load(WL_CONV2, 16*384);
    load(WL_FC1, 128*1984);
    load(WL_FC2, 8*128);
    @(negedge clk); w_we = 0;
    for (int f = 0; f < NFRAMES; f++)
      for (int i = 0; i < 256; i++) begin
        @(negedge clk); in_valid = 1; in_data = act_t'(x[f][i]);
        if (i == 255) last_in_cyc[f] = cyc + 1;
        @(negedge clk); in_valid = 0;
        repeat (14) @(negedge clk);
      end
    repeat (9000) @(negedge clk);
    check(nsc16 == NFRAMES && nsc8 == NFRAMES && nsc4 == NFRAMES, "one classification per frame");
    check(bframe16 == NFRAMES, "all scores streamed");
    check(!ovr16 && !ovr8 && !ovr4, "no overrun");
    check(n_burst == NFRAMES, $sformatf("bursts %0d", n_burst));
    check(n_c1 == 252*NFRAMES, $sformatf("conv1 vectors %0d", n_c1));
    check(n_c2 == 124*NFRAMES, $sformatf("conv2 vectors %0d", n_c2));
    check(n_stall > 0, "fc1 stalled waiting for conv2");
    $display("latency last sample -> scores: %0d clocks; bursts %0d conv1 %0d conv2 %0d fc1 stalls %0d",
             lat0, n_burst, n_c1, n_c2, n_stall);
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
