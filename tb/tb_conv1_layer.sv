// tb_conv1_layer - checks conv1 against a direct convolution.
// Two frames of random samples; after the first, one filter's weights are
// rewritten through the weight port. Checks every output vector, the number
// of vectors (252), the output spacing of 3 clocks, the latency, and the
// overrun flag for a sample arriving while the window controller runs.
module tb_conv1_layer;
  import amc_pkg::*;
  localparam int WB = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  act_t in_data = '0;
  logic w_we = 0;
  logic [7:0] w_addr = '0;
  logic signed [WB-1:0] w_data = '0;
  logic out_valid, busy, overrun;
  act_t out_vec [C1_N];
  int checks = 0, failures = 0;
  int x [256];
  int wt [64][3];
  bit mon_en = 1;
  int npos, last_in_cyc, first_out_cyc, prev_out_cyc, cyc;

  conv1_layer #(.WBITS(WB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int expect_out(input int n, input int p);
    int h = p % 2, w = p / 2;
    longint s = 0;
    for (int k = 0; k < 3; k++) s += longint'(x[2*(w+k)+h]) * wt[n][k];
    s = s >>> (WB-1);
    if (s > 32767) s = 32767;
    if (s < 0) s = 0;
    return int'(s);
  endfunction

  // output monitor
  always @(posedge clk) if (rst_n && out_valid && mon_en) begin
    if (npos == 0) begin
      first_out_cyc = cyc;
      check(cyc - last_in_cyc == 5, $sformatf("latency %0d", cyc - last_in_cyc));
    end else
      check(cyc - prev_out_cyc == 3, "output spacing");
    prev_out_cyc = cyc;
    for (int n = 0; n < C1_N; n++)
      check(out_vec[n] == act_t'(expect_out(n, npos)),
            $sformatf("pos %0d lane %0d got %0d exp %0d", npos, n, out_vec[n], expect_out(n, npos)));
    npos++;
  end

  task automatic run_frame();
    npos = 0;
    for (int i = 0; i < 256; i++) x[i] = $signed($urandom_range(0, 16000)) - 8000;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); in_valid = 1; in_data = act_t'(x[i]);
    end
    @(negedge clk); in_valid = 0;
    last_in_cyc = cyc;
    wait (npos == 252);
    repeat (10) @(negedge clk);
    check(npos == 252, "vector count");
    check(prev_out_cyc - first_out_cyc == 3*251, "frame takes 756 clocks");
  endtask

  initial begin
    for (int n = 0; n < 64; n++) for (int k = 0; k < 3; k++) wt[n][k] = wgt_init(0, n*3+k, WB);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 192; a++) begin
      @(negedge clk); w_we = 1; w_addr = 8'(a); w_data = WB'(wt[a / 3][a % 3]);
    end
    @(negedge clk); w_we = 0;
    run_frame();
    check(!overrun, "no overrun in normal operation");
    // reload filter 5
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); w_we = 1; w_addr = 8'(5*3 + k); wt[5][k] = (k == 1) ? 16384 : -1000*k;
      w_data = WB'(wt[5][k]);
    end
    @(negedge clk); w_we = 0;
    run_frame();
    // overrun: start a frame, then push a sample while busy
    mon_en = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); in_valid = 1; in_data = '0;
    end
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    check(overrun, "overrun flagged");
    repeat (800) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
