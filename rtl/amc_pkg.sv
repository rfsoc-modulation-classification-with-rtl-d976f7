// amc_pkg - shared constants, types and arithmetic helpers of the streaming
// modulation-classification CNN.
//
// Network shape (fixed by the model): input 2x128 (I row, Q row), conv1 with
// 64 filters of 1x3, conv2 with 16 filters of 64x2x3, dense 1984->128,
// dense 128->8. Activations are signed 16-bit everywhere; weights are
// signed WBITS (16, 8 or 4). Every layer output is the accumulator shifted
// right arithmetically, saturated to 16 bits and, except for the last layer,
// passed through ReLU. No biases are used.
//
// Decimation filter taps: Hamming-windowed sinc, scaled to unity DC gain in
// Q1.15 (sum of taps = 32768), rounding residue added to the centre tap:
//   h[m] = 2*fc*sinc(2*fc*(m-(N-1)/2)) * (0.54 - 0.46*cos(2*pi*m/(N-1)))
//   stage 1: N = 16, fc = 4 MHz / 128 MHz   (decimate by 8)
//   stage 2: N = 48, fc = 1.5 MHz / 16 MHz  (decimate by 4)
// The tap counts and cut-offs are this design's own choice; the model only
// fixes the overall stop band at fs/64 and the 1 MHz signal bandwidth.
//
// Weights: every layer keeps its weights in on-chip RAM, written through a
// weight port after reset (by the processor, before classification starts).
// wgt_init() is a fixed pseudo-random pattern of the right width that the
// testbenches load in place of trained weights.
package amc_pkg;

  localparam int ACT_W      = 16;          // activation width
  localparam int FRAME_IQ   = 128;         // complex samples per frame
  localparam int FRAME_LEN  = 2*FRAME_IQ;  // interleaved samples per frame
  // conv1: input (c,h,w) = (1,2,128), filter (n,c,j,k) = (64,1,1,3)
  localparam int C1_N       = 64;
  localparam int C1_K       = 3;
  localparam int C1_W       = FRAME_IQ - C1_K + 1;   // 126
  localparam int C1_POS     = 2*C1_W;                // 252 strides
  // conv2: input (64,2,126), filter (16,64,2,3)
  localparam int C2_N       = 16;
  localparam int C2_J       = 2;
  localparam int C2_K       = 3;
  localparam int C2_TAPS    = C2_J*C2_K;             // 6
  localparam int C2_IN      = C1_N*C2_TAPS;          // 384 = CJK
  localparam int C2_POS     = C1_W - C2_K + 1;       // 124 strides
  localparam int C2_VEC     = 16;                    // samples per SWC vector
  localparam int C2_CG      = C1_N/C2_VEC;           // 4 channel groups
  localparam int C2_CYC     = C2_IN/C2_VEC;          // 24 cycles per output
  // dense layers
  localparam int FC1_IN     = C2_N*C2_POS;           // 1984
  localparam int FC1_N      = 128;
  localparam int FC2_N      = 8;
  localparam int ACC_W      = 48;

  typedef logic signed [ACT_W-1:0] act_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Layer selector of the shared weight load port.
  typedef enum logic [1:0] {
    WL_CONV1 = 2'd0,
    WL_CONV2 = 2'd1,
    WL_FC1   = 2'd2,
    WL_FC2   = 2'd3
  } wlayer_e;

  localparam int FIR_S1_N = 16;
  localparam int FIR_S2_N = 48;
  localparam int FIR_S1 [FIR_S1_N] = '{
    230, 382, 807, 1481, 2309, 3146, 3825, 4205,
    4203, 3825, 3146, 2309, 1481, 807, 382, 230};
  localparam int FIR_S2 [FIR_S2_N] = '{
    34, 25, 5, -28, -68, -100, -101, -49,
    62, 208, 333, 363, 237, -60, -471, -861,
    -1048, -852, -164, 1004, 2498, 4045, 5324, 6048,
    6048, 5324, 4045, 2498, 1004, -164, -852, -1048,
    -861, -471, -60, 237, 363, 333, 208, 62,
    -49, -101, -100, -68, -28, 5, 25, 34};

  // Saturate an accumulator, already shifted, to a signed 16-bit activation.
  function automatic act_t sat16(input acc_t v);
    if (v > acc_t'(32767))       return act_t'(16'sh7fff);
    else if (v < acc_t'(-32768)) return act_t'(-32768);
    else                         return act_t'(v);
  endfunction

  // Layer output: arithmetic shift, saturate, optional ReLU.
  function automatic act_t requant(input acc_t v, input int shift, input bit relu);
    act_t s;
    s = sat16(v >>> shift);
    if (relu && s[ACT_W-1]) s = '0;
    return s;
  endfunction

  // Stand-in weight pattern: a 32-bit integer hash of (layer, index),
  // truncated to wbits and sign-extended to 32 bits.
  function automatic int wgt_init(input int layer, input int idx, input int wbits);
    logic [31:0] h;
    h = 32'(idx) * 32'h9E37_79B1 + 32'(layer) * 32'h85EB_CA6B + 32'h2545_F491;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h << (32 - wbits);
    return $signed(h) >>> (32 - wbits);
  endfunction

endpackage
