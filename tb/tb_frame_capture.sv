// tb_frame_capture - arms captures over AXI4-Lite while a counting sample
// stream runs at one sample per 32 clocks, and checks that each capture
// returns the 128 samples that followed the command, in order, with tlast
// on the last, under DMA backpressure; that the status register shows busy
// and counts frames; and that a command while busy is ignored.
module tb_frame_capture;
  import amc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  act_t in_i = '0, in_q = '0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 1, s_arvalid = 0, s_rready = 1;
  logic [3:0] s_awaddr = '0, s_araddr = '0;
  logic [31:0] s_wdata = '0;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  logic [31:0] s_rdata;
  logic m_tvalid, m_tlast;
  logic m_tready = 1;
  logic [31:0] m_tdata;
  int checks = 0, failures = 0;
  int sample_no, first_exp, nrx, nframes, nbp;

  frame_capture dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // sample n carries I = n, Q = -n
  always begin
    repeat (31) @(negedge clk);
    in_valid = rst_n; in_i = act_t'(sample_no); in_q = act_t'(-sample_no);
    @(negedge clk); in_valid = 0;
    if (rst_n) sample_no++;
  end

  always @(posedge clk) if (rst_n) begin
    if (m_tvalid && !m_tready) nbp++;
    if (m_tvalid && m_tready) begin
      check(m_tdata == {16'(-(first_exp + nrx)), 16'(first_exp + nrx)},
            $sformatf("sample %0d got %h", nrx, m_tdata));
      check(m_tlast == (nrx == 127), "tlast");
      nrx++;
      if (nrx == 128) begin nrx = 0; nframes++; end
    end
  end

  always @(negedge clk) m_tready = ($urandom_range(0, 2) != 0);

  task automatic axil_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); s_awvalid = 1; s_wvalid = 1; s_awaddr = a; s_wdata = d;
    do @(posedge clk); while (!s_awready);
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
    check(s_bvalid && s_bresp == 2'b00, "write response");
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
    repeat (3) @(negedge clk);
    rst_n = 1;
    axil_read(4'h4, st);
    check(st == 0, "idle status");
    for (int k = 0; k < 3; k++) begin
      repeat ($urandom_range(50, 400)) @(negedge clk);
      first_exp = sample_no;
      axil_write(4'h0, 32'h1);
      axil_read(4'h4, st);
      check(st[0] == 1, "busy");
      axil_write(4'h0, 32'h1);         // ignored while busy
      while (nframes == k) @(negedge clk);
      repeat (5) @(negedge clk);
      axil_read(4'h4, st);
      check(st == {16'(k + 1), 16'h0}, $sformatf("status %h", st));
    end
    check(nframes == 3, "three frames");
    check(nbp > 0, "backpressure seen");
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
