// tb_fc2_layer - checks the final dense layer and its output stream.
// Loads weights, sends three random 128-value vectors, compares the 8
// scores against a direct product, then drains the 8-beat stream with a
// randomly toggling tready and checks order, tlast and the 128-clock
// accumulation time. A vector arriving while busy must set overrun.
module tb_fc2_layer;
  import amc_pkg::*;
  import amc_ref_pkg::*;
  localparam int WB = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  act_t in_vec [FC1_N];
  logic w_we = 0;
  logic [9:0] w_addr = '0;
  logic signed [WB-1:0] w_data = '0;
  logic scores_valid, m_tvalid, m_tlast, overrun;
  logic m_tready = 0;
  act_t scores [FC2_N];
  act_t m_tdata;
  int checks = 0, failures = 0;
  int y [128];
  int z [8];
  int beat, cyc, in_cyc, nsc, stalls;

  fc2_layer #(.WBITS(WB)) dut (.*);

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
    if (scores_valid) begin
      nsc++;
      check(cyc - in_cyc == 130, $sformatf("score latency %0d", cyc - in_cyc));
      for (int m = 0; m < 8; m++)
        check(scores[m] == act_t'(z[m]), $sformatf("score %0d got %0d exp %0d", m, scores[m], z[m]));
    end
    if (m_tvalid && !m_tready) stalls++;
    if (m_tvalid && m_tready) begin
      check(m_tdata == act_t'(z[beat]), $sformatf("beat %0d got %0d exp %0d", beat, m_tdata, z[beat]));
      check(m_tlast == (beat == 7), "tlast");
      beat = (beat + 1) % 8;
    end
  end

  initial begin
    for (int j = 0; j < 128; j++) in_vec[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); w_we = 1; w_addr = 10'(a); w_data = WB'(wgt_init(3, a, WB));
    end
    @(negedge clk); w_we = 0;
    for (int fr = 0; fr < 3; fr++) begin
      for (int j = 0; j < 128; j++) y[j] = $urandom_range(0, 4000);
      fc2(y, WB, z);
      @(negedge clk); in_valid = 1;
      for (int j = 0; j < 128; j++) in_vec[j] = act_t'(y[j]);
      in_cyc = cyc + 1;
      @(negedge clk); in_valid = 0;
      for (int i = 0; i < 200; i++) begin
        @(negedge clk); m_tready = $urandom_range(0, 1);
      end
      m_tready = 1;
      repeat (10) @(negedge clk);
      m_tready = 0;
    end
    check(nsc == 3, "three score sets");
    check(beat == 0, "whole stream drained");
    check(stalls > 0, "backpressure exercised");
    check(!overrun, "no overrun");
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    check(overrun, "overrun flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
