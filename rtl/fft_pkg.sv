// Shared types and constants of the four-channel parallel FFT core.
//
// Sample and coefficient formats used throughout:
//   - input samples: DATA_W-bit two's complement (24 bits, as in the 192-bit DATA word);
//   - FFT datapath: FFT_W = DATA_W + 1 bits, one guard bit so that a complex value of
//     magnitude up to sqrt(2) * full scale never overflows (every radix-2 stage divides by 2);
//   - twiddles: TW_W-bit signed, 1.0 = 2**(TW_W-2);
//   - window coefficients: WIN_W-bit unsigned, 1.0 = 2**(WIN_W-1);
//   - magnitudes: MAG_W = 24 bits unsigned (width of the FFT output RAM);
//   - trace store words: 32-bit value plus an 8-bit count of folded-in frames.
// The 24-bit sample, the 24-bit output RAM and the 32-bit store follow the document;
// the other widths and the fixed-point scaling are this design's choices.
// A block checked on its own uses only some of these constants, so lint then lists the
// rest as unused parameters; no circuit is behind those warnings.
package fft_pkg;

  localparam int DATA_W    = 24;
  localparam int FFT_W     = DATA_W + 1;
  localparam int TW_W      = 18;
  localparam int WIN_W     = 18;
  localparam int MAG_W     = 24;
  localparam int STORE_W   = 32;
  localparam int CNT_W     = 8;
  localparam int LANES     = 4;     // complex samples per DATA beat
  localparam int NCH       = 4;     // parallel FFT channels
  localparam int LOG2N_MAX = 15;    // 32K points
  localparam int LOG2N_MIN = 4;     // 16 points

  // Latency of the power calculation: two multiply/add registers plus one register per
  // result bit of the square root of a (2*FFT_W+2)-bit radicand.
  localparam int ROOT_W    = FFT_W + 1;
  localparam int POWER_LAT = 2 + ROOT_W;

  typedef struct packed {
    logic signed [DATA_W-1:0] im;
    logic signed [DATA_W-1:0] re;
  } cplx_t;

  // One DATA beat, laid out exactly like the 192-bit DATA register
  // {IM[n-3],RE[n-3],IM[n-2],RE[n-2],IM[n-1],RE[n-1],IM[n],RE[n]}: the lanes are numbered
  // from the top, so lane 0 (DATA[191:144]) is the oldest sample n-3 and lane 3
  // (DATA[47:0]) the newest sample n. The ascending packed range is deliberate, and lint
  // notes it as such.
  typedef cplx_t [0:LANES-1] beat_t;

  typedef enum logic [1:0] {
    OVL_0  = 2'd0,
    OVL_25 = 2'd1,
    OVL_50 = 2'd2,
    OVL_75 = 2'd3
  } overlap_e;

  typedef enum logic [1:0] {
    TR_MAX   = 2'd0,
    TR_MIN   = 2'd1,
    TR_CLRWR = 2'd2,
    TR_AVG   = 2'd3
  } trace_e;

  // FFT configuration register, static while the core runs (change it under reset).
  typedef struct packed {
    logic [3:0]       log2n;     // 4 .. 15 (16 .. 32768 points)
    logic [2:0]       nch;       // enabled channels, 1 .. 4
    overlap_e         overlap;   // frame overlap
    logic             win_en;    // apply the window coefficients
    trace_e           trace;     // trace function
    logic [CNT_W-1:0] avg_num;   // number of frames summed per bin in AVG mode
    logic             abw_full;  // 1200 MHz analysis bandwidth: input FIFOs on the 2x clock
  } fft_cfg_t;

  // Word read from an FFT output RAM: the magnitude and the bin's toggle bit, which flips
  // on every write (it tells the trace unit which bins are new since its last visit).
  typedef struct packed {
    logic             par;
    logic [MAG_W-1:0] mag;
  } mag_word_t;

  // Word of a trace store: folded value and number of frames folded into it (0 = empty).
  typedef struct packed {
    logic [CNT_W-1:0]   cnt;
    logic [STORE_W-1:0] val;
  } store_t;

  // Reverse the low `bits` bits of `v`.
  function automatic logic [LOG2N_MAX-1:0] bitrev(input logic [LOG2N_MAX-1:0] v, input int bits);
    logic [LOG2N_MAX-1:0] r;
    r = '0;
    for (int i = 0; i < LOG2N_MAX; i++)
      if (i < bits) r[i] = v[bits-1-i];
    return r;
  endfunction

  // cos or sin of pi*j/n (0 <= 2*j <= n) in Q30, by a Taylor series in 64-bit integers.
  // Integer-only so that it can fill ROMs at elaboration in every tool.
  // Any 0 <= j <= n is accepted: cos(pi - a) = -cos(a), sin(pi - a) = sin(a).
  function automatic longint sincos_q30(input longint j, input longint n, input bit want_sin);
    longint x, x2, term, sum;
    bit     neg;
    neg = 1'b0;
    if (2 * j > n) begin
      j   = n - j;
      neg = !want_sin;
    end
    x    = (64'sd3373259426 * j) / n;          // pi * 2**30 = 3373259426.3
    x2   = (x * x) >>> 30;
    term = want_sin ? x : 64'sd1073741824;
    sum  = term;
    for (longint k = (want_sin ? 1 : 0); k < 16; k += 2) begin
      term = -((term * x2) >>> 30) / ((k + 1) * (k + 2));
      sum  = sum + term;
    end
    return neg ? -sum : sum;
  endfunction

endpackage
