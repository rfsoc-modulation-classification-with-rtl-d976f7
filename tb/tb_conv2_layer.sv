// tb_conv2_layer - checks conv2 against a direct 3-D convolution.
// Feeds two frames of 252 random non-negative 64-wide vectors (one per 3
// clocks, the conv1 rate) and checks all 124 output vectors per frame, the
// 24-clock output spacing (2976 clocks per frame) and the overrun flag.
module tb_conv2_layer;
  import amc_pkg::*;
  import amc_ref_pkg::*;
  localparam int WB = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  act_t in_vec [C1_N];
  logic w_we = 0;
  logic [12:0] w_addr = '0;
  logic signed [WB-1:0] w_data = '0;
  logic out_valid, busy, overrun;
  act_t out_vec [C2_N];
  int checks = 0, failures = 0;
  int c1 [64][2][126];
  int c2 [16][124];
  bit mon_en = 1;
  int nout, cyc, first_cyc, prev_cyc, nonzero;

  conv2_layer #(.WBITS(WB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid && mon_en) begin
    if (nout == 0) first_cyc = cyc;
    else check(cyc - prev_cyc == 24, "output spacing 24");
    prev_cyc = cyc;
    for (int f = 0; f < 16; f++) begin
      check(out_vec[f] == act_t'(c2[f][nout]),
            $sformatf("col %0d filter %0d got %0d exp %0d", nout, f, out_vec[f], c2[f][nout]));
      if (out_vec[f] != 0) nonzero++;
    end
    nout++;
  end

  task automatic run_frame();
    nout = 0;
    for (int c = 0; c < 64; c++) for (int h = 0; h < 2; h++) for (int w = 0; w < 126; w++)
      c1[c][h][w] = $urandom_range(0, 3000);
    conv2(c1, WB, c2);
    for (int p = 0; p < 252; p++) begin
      @(negedge clk);
      in_valid = 1;
      for (int c = 0; c < 64; c++) in_vec[c] = act_t'(c1[c][p % 2][p / 2]);
      @(negedge clk); in_valid = 0;
      @(negedge clk);
    end
    wait (nout == 124);
    repeat (30) @(negedge clk);
    check(nout == 124, "vector count");
    check(prev_cyc - first_cyc == 24*123, "2976 clocks per frame");
  endtask

  initial begin
    for (int c = 0; c < 64; c++) in_vec[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 16*384; a++) begin
      @(negedge clk); w_we = 1; w_addr = 13'(a); w_data = WB'(wgt_init(1, a, WB));
    end
    @(negedge clk); w_we = 0;
    run_frame();
    run_frame();
    check(!overrun, "no overrun");
    check(nonzero > 100, "outputs not trivially zero");
    mon_en = 0;
    for (int p = 0; p < 253; p++) begin
      @(negedge clk); in_valid = 1;
    end
    @(negedge clk); in_valid = 0;
    check(overrun, "overrun flagged");
    repeat (3000) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
