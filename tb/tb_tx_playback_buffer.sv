// tb_tx_playback_buffer - loads a frame over the stream (with gaps in
// tvalid), starts playback with an irregular sample enable and checks that
// the frame is replayed cyclically sample for sample with a wrap pulse at
// each restart, that loading is refused while playing, and that stop halts
// the output. A second, shorter frame is then loaded and replayed.
module tb_tx_playback_buffer;
  import amc_pkg::*;
  localparam int DEPTH = 4096;
  logic clk = 0, rst_n = 0;
  logic s_tvalid = 0, s_tlast = 0, start = 0, stop = 0, sample_en = 0;
  logic [31:0] s_tdata = '0;
  logic s_tready, playing, loaded, out_valid, wrapped;
  act_t out_i, out_q;
  int checks = 0, failures = 0;
  int fr [$];
  int len, nout, nwrap;

  tx_playback_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      check({out_q, out_i} == 32'(fr[nout % len]), $sformatf("sample %0d", nout));
      nout++;
    end
    if (wrapped) begin
      nwrap++;
      check(nout % len == len - 1 || (nout + 1) % len == 0 || nout % len == 0, "wrap position");
    end
  end

  task automatic load_frame(input int n);
    fr.delete();
    for (int i = 0; i < n; i++) begin
      fr.push_back($urandom());
      @(negedge clk); s_tvalid = 1; s_tdata = fr[i]; s_tlast = (i == n-1);
      if (!s_tready) check(0, "tready during load");
      if (i % 7 == 3) begin
        @(negedge clk); s_tvalid = 0;
      end
    end
    @(negedge clk); s_tvalid = 0; s_tlast = 0;
    len = n;
  endtask

  task automatic play(input int clocks);
    nout = 0; nwrap = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int c = 0; c < clocks; c++) begin
      @(negedge clk); sample_en = ($urandom_range(0, 2) != 0);
      s_tvalid = (c == 10);
    end
    check(!s_tready, "no loading while playing");
    @(negedge clk); stop = 1; sample_en = 0; s_tvalid = 0;
    @(negedge clk); stop = 0; sample_en = 1;
    repeat (5) @(negedge clk);
    sample_en = 0;
    check(!playing, "stopped");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_frame(DEPTH);
    check(loaded, "loaded");
    play(3*DEPTH);
    check(nout > 2*DEPTH, "replayed more than twice");
    check(nwrap >= 2, $sformatf("wraps %0d", nwrap));
    load_frame(100);
    play(1000);
    check(nwrap >= 5, "short frame wraps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
