// tb_decim_chain - checks the 32:1 decimation chain against a direct FIR
// model of both stages. Drives random I and Q samples, one per clock and
// then with gaps, and compares every decimated output; checks that exactly
// one output appears per 32 inputs and that a DC input passes with unity
// gain.
module tb_decim_chain;
  import amc_pkg::*;
  import amc_ref_pkg::*;
  localparam int N = 32*200;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  act_t in_i = '0, in_q = '0;
  logic out_valid;
  act_t out_i, out_q;
  int checks = 0, failures = 0;
  int xi [], xq [], yi1 [], yq1 [], yi [], yq [];
  int nout, cyc;
  int in_cyc [N];

  decim_chain dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    if (nout < yi.size())
      check(out_i == act_t'(yi[nout]) && out_q == act_t'(yq[nout]),
            $sformatf("out %0d got %0d,%0d exp %0d,%0d", nout, out_i, out_q, yi[nout], yq[nout]));
    check(cyc - in_cyc[32*nout + 31] inside {[2:3]},
          $sformatf("output %0d %0d clocks after its last input", nout, cyc - in_cyc[32*nout + 31]));
    nout++;
  end

  initial begin
    xi = new[N]; xq = new[N];
    for (int n = 0; n < N; n++) begin
      xi[n] = (n < N/2) ? $urandom_range(0, 30000) - 15000 : 12000;
      xq[n] = (n < N/2) ? $urandom_range(0, 30000) - 15000 : -7000;
    end
    fir_decim(xi, FIR_S1, 8, yi1); fir_decim(yi1, FIR_S2, 4, yi);
    fir_decim(xq, FIR_S1, 8, yq1); fir_decim(yq1, FIR_S2, 4, yq);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk); in_valid = 1; in_i = act_t'(xi[n]); in_q = act_t'(xq[n]);
      in_cyc[n] = cyc;
      if (n > N/4 && n % 3 == 0) begin
        @(negedge clk); in_valid = 0;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    check(nout == N/32, "output count");
    check(out_i == 12000 && out_q == -7000, $sformatf("DC gain %0d %0d", out_i, out_q));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
