// tb_iq_interleave - checks that each complex input becomes I then Q on two
// consecutive output beats, for inputs spaced 32 and 2 clocks apart, and
// that an input one clock after another sets the overrun flag.
module tb_iq_interleave;
  import amc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  act_t in_i = '0, in_q = '0;
  logic out_valid, overrun;
  act_t out_data;
  int checks = 0, failures = 0;
  int exp_q [$];
  int nbeat;
  bit mon_en = 1;

  iq_interleave dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid && mon_en) begin
    if (exp_q.size() > 0) begin
      check(out_data == act_t'(exp_q.pop_front()), $sformatf("beat %0d", nbeat));
    end else check(0, "unexpected beat");
    nbeat++;
  end

  task automatic send(input int gap);
    int i = $urandom_range(0, 60000) - 30000, q = $urandom_range(0, 60000) - 30000;
    @(negedge clk); in_valid = 1; in_i = act_t'(i); in_q = act_t'(q);
    exp_q.push_back(i); exp_q.push_back(q);
    @(negedge clk); in_valid = 0;
    repeat (gap - 1) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 50; k++) send(32);
    for (int k = 0; k < 50; k++) send(2);
    repeat (4) @(negedge clk);
    check(nbeat == 200, "beat count");
    check(!overrun, "no overrun at spacing 2");
    mon_en = 0;
    @(negedge clk); in_valid = 1;
    @(negedge clk);
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
