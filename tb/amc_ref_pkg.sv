// amc_ref_pkg - plain reference model of the classifier for the testbenches.
//
// Computes each layer straight from its mathematical definition on ordinary
// integer arrays (no GEMM, no buffering, no timing), so the RTL's data
// ordering and scheduling are checked against it rather than repeated.
// Weights come from the same default pattern the RTL memories are
// initialised with (amc_pkg::wgt_init).
package amc_ref_pkg;
  import amc_pkg::wgt_init;

  function automatic int sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int q(input longint acc, input int shift, input bit relu);
    int s = sat(acc >>> shift);
    return (relu && s < 0) ? 0 : s;
  endfunction

  // Direct-form FIR + decimation of a whole record, output sample m uses
  // inputs up to index D*m + D - 1 (zeros before the record).
  function automatic void fir_decim(input int x[], input int h[], input int d,
                                    output int y[]);
    int n = x.size() / d;
    y = new[n];
    for (int m = 0; m < n; m++) begin
      longint s = 0;
      int last = d*m + d - 1;
      for (int t = 0; t < h.size(); t++)
        if (last - t >= 0) s += longint'(h[t]) * x[last - t];
      y[m] = sat((s + 16384) >>> 15);
    end
  endfunction

  // conv1: x is the interleaved frame, x[2*w + h]. Result c1[n][h][w].
  function automatic void conv1(input int x[256], input int wb,
                                output int c1[64][2][126]);
    for (int n = 0; n < 64; n++)
      for (int h = 0; h < 2; h++)
        for (int w = 0; w < 126; w++) begin
          longint s = 0;
          for (int k = 0; k < 3; k++)
            s += longint'(x[2*(w+k)+h]) * wgt_init(0, n*3+k, wb);
          c1[n][h][w] = q(s, wb-1, 1);
        end
  endfunction

  // conv2 weight of filter f, channel c, row j, column k
  function automatic int w2(input int f, input int c, input int j, input int k, input int wb);
    return wgt_init(1, f*384 + 64*(2*k + j) + c, wb);
  endfunction

  function automatic void conv2(input int c1[64][2][126], input int wb,
                                output int c2[16][124]);
    for (int f = 0; f < 16; f++)
      for (int w = 0; w < 124; w++) begin
        longint s = 0;
        for (int c = 0; c < 64; c++)
          for (int j = 0; j < 2; j++)
            for (int k = 0; k < 3; k++)
              s += longint'(c1[c][j][w+k]) * w2(f, c, j, k, wb);
        c2[f][w] = q(s, wb-1, 1);
      end
  endfunction

  // fc1 input index r = 16*w + f
  function automatic void fc1(input int c2[16][124], input int wb, output int y[128]);
    for (int n = 0; n < 128; n++) begin
      longint s = 0;
      for (int w = 0; w < 124; w++)
        for (int f = 0; f < 16; f++)
          s += longint'(c2[f][w]) * wgt_init(2, n*1984 + 16*w + f, wb);
      y[n] = q(s, wb-1, 1);
    end
  endfunction

  function automatic void fc2(input int y[128], input int wb, output int z[8]);
    for (int m = 0; m < 8; m++) begin
      longint s = 0;
      for (int j = 0; j < 128; j++)
        s += longint'(y[j]) * wgt_init(3, m*128 + j, wb);
      z[m] = q(s, wb-1, 0);
    end
  endfunction

  function automatic void forward(input int x[256], input int wb, output int z[8]);
    int c1[64][2][126];
    int c2[16][124];
    int y[128];
    conv1(x, wb, c1);
    conv2(c1, wb, c2);
    fc1(c2, wb, y);
    fc2(y, wb, z);
  endfunction
endpackage
