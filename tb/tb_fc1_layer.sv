// tb_fc1_layer - checks the first dense layer against a direct
// matrix-vector product. Weights are loaded through the weight port; two
// frames of 124 vectors arrive at the conv2 rate (one per 24 clocks), so the
// reader stalls waiting for data; a third frame arrives back to back to
// overrun the vector buffer. Checks all 128 outputs per frame, that the
// result follows the last vector within 16 + 3 clocks, stalls and overrun.
module tb_fc1_layer;
  import amc_pkg::*;
  import amc_ref_pkg::*;
  localparam int WB = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  act_t in_vec [C2_N];
  logic w_we = 0;
  logic [17:0] w_addr = '0;
  logic signed [WB-1:0] w_data = '0;
  logic out_valid, stall, overrun;
  act_t out_vec [FC1_N];
  int checks = 0, failures = 0;
  int c2 [16][124];
  int y [128];
  int nres, cyc, last_in_cyc, stalls, nonzero;
  bit mon_en = 1;

  fc1_layer #(.WBITS(WB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && stall) stalls++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid && mon_en) begin
    check(cyc - last_in_cyc <= 19, $sformatf("latency %0d", cyc - last_in_cyc));
    for (int n = 0; n < 128; n++) begin
      check(out_vec[n] == act_t'(y[n]), $sformatf("neuron %0d got %0d exp %0d", n, out_vec[n], y[n]));
      if (y[n] != 0) nonzero++;
    end
    nres++;
  end

  task automatic run_frame(input int gap);
    for (int w = 0; w < 124; w++) for (int f = 0; f < 16; f++) c2[f][w] = $urandom_range(0, 600);
    fc1(c2, WB, y);
    for (int w = 0; w < 124; w++) begin
      @(negedge clk); in_valid = 1;
      for (int f = 0; f < 16; f++) in_vec[f] = act_t'(c2[f][w]);
      last_in_cyc = cyc + 1;
      @(negedge clk); in_valid = 0;
      repeat (gap - 2) @(negedge clk);
    end
  endtask

  initial begin
    for (int f = 0; f < 16; f++) in_vec[f] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 128*1984; a++) begin
      @(negedge clk); w_we = 1; w_addr = 18'(a); w_data = WB'(wgt_init(2, a, WB));
    end
    @(negedge clk); w_we = 0;
    run_frame(24);
    repeat (40) @(negedge clk);
    check(nres == 1, "first result");
    run_frame(24);
    repeat (40) @(negedge clk);
    check(nres == 2, "second result");
    check(stalls > 1000, $sformatf("reader stalled waiting for conv2 (%0d)", stalls));
    check(!overrun, "no overrun");
    check(nonzero > 50, "outputs not trivially zero");
    mon_en = 0;
    for (int w = 0; w < 130; w++) begin
      @(negedge clk); in_valid = 1;
    end
    @(negedge clk); in_valid = 0;
    check(overrun, "overrun flagged");
    repeat (2100) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
