// tb_pingpong_burst_buffer - checks the ping-pong frame buffer.
// Writes frames of 256 samples at one per 16 clocks (the decimated rate)
// and back to back; every frame must come out as one burst of 256
// consecutive samples with first/last marks, starting 3 clocks after the
// frame's last sample, in order. Back-to-back frames at the full clock
// rate must not overrun, since the reader drains a bank as fast as the
// writer fills the other.
module tb_pingpong_burst_buffer;
  import amc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  act_t in_data = '0;
  logic out_valid, out_first, out_last, overrun;
  act_t out_data;
  int checks = 0, failures = 0;
  int q [$];
  int cyc, run, nburst, last_in_cyc, prev_valid_cyc;

  pingpong_burst_buffer dut (.*);

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
    if (out_first) begin
      check(run == 0, "burst starts fresh");
      if (nburst == 0) check(cyc - last_in_cyc == 3, $sformatf("start delay %0d", cyc - last_in_cyc));
    end else check(cyc == prev_valid_cyc + 1, "burst is contiguous");
    prev_valid_cyc = cyc;
    check(q.size() > 0 && out_data == act_t'(q.pop_front()), "data in order");
    run++;
    if (out_last) begin
      check(run == 256, $sformatf("burst length %0d", run));
      run = 0;
      nburst++;
    end
  end

  task automatic frame(input int gap);
    for (int i = 0; i < 256; i++) begin
      int v = $urandom_range(0, 65535) - 32768;
      @(negedge clk); in_valid = 1; in_data = act_t'(v); q.push_back(v);
      if (i == 255) last_in_cyc = cyc + 1;
      if (gap > 1) begin
        @(negedge clk); in_valid = 0;
        repeat (gap - 2) @(negedge clk);
      end
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(16); frame(16); frame(1); frame(1); frame(16);
    repeat (300) @(negedge clk);
    check(nburst == 5, "five bursts");
    check(!overrun, "no overrun");
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
