// End-to-end self-checking testbench of the parallel FFT core at reduced sizes
// (LOG2N = 6, i.e. up to 64 points, and 64-word input FIFOs).
// Each scenario resets the core with one configuration, streams random full-scale
// complex samples as 4-sample beats at the rate of an analysis bandwidth (a beat every
// clock for 1200 MHz, every 2nd for 600 MHz, 4th for 300 MHz, 8th for 150 MHz), lets the
// trace sweeps fold the results, switches the trace store and reads every bin.
// The reference is built independently: the stream is cut into frames (hop N*(1-overlap)),
// frame f goes to channel f mod nch, a channel's result position p (bin bitrev(p mod N)
// of its (p div N)-th frame) is out once N-1+p of its samples are in, and every bin of the
// store must equal the fold (max, min, last value, or sum with count) of the magnitudes
// |DFT(window * x)|/N of the results that are out, within a few LSBs.
// It counts each mechanism of the design as it happens: 2x and 1x FIFO write clock, each
// overlap, 1, 2 and 4 channels, windowing on and off, each trace function, store switch,
// all four FFTs delivering in the same clock, frame-busy error and FIFO overflow.
// A mechanism that never happens counts as a failure.
module tb_parallel_fft_top;
  import fft_pkg::*;
  localparam int LOG2N = 6;
  localparam int NMAX  = 1 << LOG2N;

  logic clk = 1'b0, clk_2x = 1'b0, rst = 1'b1;
  fft_cfg_t cfg;
  logic data_valid = 1'b0;
  logic [LANES*2*DATA_W-1:0] data;
  logic coef_we = 1'b0;
  logic [NCH-1:0] coef_ch_mask = '1;
  logic [LOG2N-1:0] coef_addr, host_raddr;
  logic [WIN_W-1:0] coef_data;
  logic host_req = 1'b0, host_ready;
  store_t host_rdata;
  logic [NCH-1:0] fifo_overflow, ch_fft_valid;
  logic busy_err, frame_start, sweep_wrap;
  int checks = 0, failures = 0;

  parallel_fft_top #(.LOG2N(LOG2N), .FIFO_DEPTH(64)) dut (.*);

  initial forever #4 clk = ~clk;
  initial forever #2 clk_2x = ~clk_2x;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  typedef enum int {M_CLK2X, M_CLK1X, M_OVL0, M_OVL25, M_OVL50, M_OVL75, M_CH1, M_CH2, M_CH4,
                    M_WIN_ON, M_WIN_OFF, M_MAX, M_MIN, M_CLRWR, M_AVG, M_SWITCH, M_ALL4,
                    M_BUSY, M_OVERFLOW, M_NUM} mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"2x FIFO clock", "1x FIFO clock", "overlap 0%", "overlap 25%",
    "overlap 50%", "overlap 75%", "1 channel", "2 channels", "4 channels", "window on",
    "window off", "MAX-HOLD", "MIN-HOLD", "CLR-WR", "AVG", "store switch",
    "4 FFTs in parallel", "frame busy error", "FIFO overflow"};

  always @(posedge clk) if (!rst && ch_fft_valid == '1) mech[M_ALL4]++;

  // ---------------- stimulus and reference ----------------
  int coef [NMAX];
  int sr_ [$];       // stream, real parts
  int si_ [$];

  function automatic int scale(input int x, input int c);
    longint p;
    p = (longint'(x) * c + (1 << 16)) >>> 17;
    if (p > 2**23 - 1) p = 2**23 - 1;
    if (p < -(2**23)) p = -(2**23);
    return int'(p);
  endfunction

  function automatic real frame_mag(input int start, input int n, input int k, input bit win);
    real re, im, a;
    int  xr, xi;
    re = 0.0; im = 0.0;
    for (int i = 0; i < n; i++) begin
      xr = win ? scale(sr_[start + i], coef[i]) : sr_[start + i];
      xi = win ? scale(si_[start + i], coef[i]) : si_[start + i];
      a  = -2.0 * 3.141592653589793 * k * i / n;
      re = re + xr * $cos(a) - xi * $sin(a);
      im = im + xr * $sin(a) + xi * $cos(a);
    end
    return $sqrt(re * re + im * im) / n;
  endfunction

  function automatic int bitrev_n(input int v, input int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++) if (v[i]) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  task automatic scenario(input int l2, input int nch, input int ovl, input bit abw_full,
                          input int period, input trace_e tr, input bit win, input int beats,
                          input bit expect_err);
    int n, hop, nframes;
    int recv [NCH];                 // samples received per channel
    int fr_list [NCH][$];           // frame start sample per frame, per channel
    int chan_end [NCH];
    real rv [NMAX];
    int  rc [NMAX];
    real rt [NMAX];
    bit  saw_busy, saw_ovf;
    n = 1 << l2;
    hop = (ovl == 0) ? n : (ovl == 1) ? n - n / 4 : (ovl == 2) ? n / 2 : n / 4;
    cfg = '{log2n: 4'(l2), nch: 3'(nch), overlap: overlap_e'(ovl), win_en: win, trace: tr,
            avg_num: 8'd255, abw_full: abw_full};
    rst = 1;
    repeat (10) @(posedge clk);
    rst = 0;
    repeat (2 * n + 8) @(posedge clk);
    sr_.delete(); si_.delete();
    saw_busy = 0; saw_ovf = 0;
    for (int b = 0; b < beats; b++) begin
      logic [LANES*2*DATA_W-1:0] d;   // packed as the DATA register: oldest sample on top
      for (int l = 0; l < LANES; l++) begin
        int xr, xi;
        xr = int'($urandom_range(0, 2**24 - 1)) - 2**23;
        xi = int'($urandom_range(0, 2**24 - 1)) - 2**23;
        sr_.push_back(xr); si_.push_back(xi);
        d[2*DATA_W*(LANES-1-l) +: DATA_W] = DATA_W'(xr); d[2*DATA_W*(LANES-1-l) + DATA_W +: DATA_W] = DATA_W'(xi);
      end
      data <= d; data_valid <= 1;
      @(posedge clk);
      if (period > 1) begin
        data_valid <= 0;
        repeat (period - 1) @(posedge clk);
      end
      if (busy_err) saw_busy = 1;
      if (fifo_overflow != '0) saw_ovf = 1;
    end
    data_valid <= 0;
    repeat (8 * n + 200) @(posedge clk);
    if (busy_err) saw_busy = 1;
    if (fifo_overflow != '0) saw_ovf = 1;
    if (saw_busy) mech[M_BUSY]++;
    if (saw_ovf) mech[M_OVERFLOW]++;
    checks++;
    if ((saw_busy || saw_ovf) != expect_err) begin
      failures++;
      $display("scenario l2=%0d nch=%0d ovl=%0d: busy %0d overflow %0d, expected error %0d", l2, nch, ovl, saw_busy, saw_ovf, expect_err);
    end
    if (expect_err) return;
    // bookkeeping of mechanisms
    mech[abw_full ? M_CLK2X : M_CLK1X]++;
    mech[M_OVL0 + ovl]++;
    mech[(nch == 1) ? M_CH1 : (nch == 2) ? M_CH2 : M_CH4]++;
    mech[win ? M_WIN_ON : M_WIN_OFF]++;
    mech[M_MAX + int'(tr)]++;
    // reference: frames and channels
    for (int c = 0; c < NCH; c++) begin recv[c] = 0; fr_list[c].delete(); chan_end[c] = 0; end
    nframes = 0;
    for (int f = 0; f * hop < 4 * beats; f++) begin
      int c, st, len;
      c = f % nch; st = f * hop;
      len = (st + n <= 4 * beats) ? n : 4 * beats - st;
      fr_list[c].push_back(st);
      recv[c] += len;
      nframes++;
    end
    for (int k = 0; k < n; k++) begin rv[k] = 0.0; rc[k] = 0; rt[k] = 0.0; end
    for (int c = 0; c < nch; c++) begin
      int outs;
      outs = recv[c] - (n - 1);
      for (int p = 0; p < outs; p++) begin
        int g, k; real m;
        g = p / n; k = bitrev_n(p % n, l2);
        m = frame_mag(fr_list[c][g], n, k, win);
        unique case (tr)
          TR_MAX:   if (rc[k] == 0 || m > rv[k]) rv[k] = m;
          TR_MIN:   if (rc[k] == 0 || m < rv[k]) rv[k] = m;
          TR_CLRWR: rv[k] = m;
          default:  rv[k] += m;
        endcase
        rc[k]++;
        rt[k] += 16.0 + 8.0 * m / 65536.0;
      end
    end
    // switch the store and read it
    host_req <= 1;
    @(posedge clk);
    host_req <= 0;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    mech[M_SWITCH]++;
    for (int k = 0; k < n; k++) begin
      real tol;
      host_raddr <= LOG2N'(k);
      @(posedge clk);
      #1;
      tol = (tr == TR_AVG) ? rt[k] : 16.0 + 8.0 * rv[k] / 65536.0;
      checks++;
      if (real'(host_rdata.val) - rv[k] > tol || rv[k] - real'(host_rdata.val) > tol || int'(host_rdata.cnt) != rc[k]) begin
        failures++;
        if (failures < 12)
          $display("MISMATCH l2=%0d nch=%0d ovl=%0d mode=%0d bin %0d: got %0d/%0d exp %f/%0d",
                   l2, nch, ovl, tr, k, host_rdata.val, host_rdata.cnt, rv[k], rc[k]);
      end
    end
  endtask

  initial begin
    cfg = '{log2n: 4'd4, nch: 3'd4, overlap: OVL_0, win_en: 1'b0, trace: TR_MAX,
            avg_num: 8'd255, abw_full: 1'b1};
    // window coefficients, shared by all channels
    for (int a = 0; a < NMAX; a++) begin
      coef[a] = int'($urandom_range(2**15, 2**17));
      coef_we <= 1; coef_addr <= LOG2N'(a); coef_data <= WIN_W'(coef[a]);
      @(posedge clk);
    end
    coef_we <= 0;
    //        l2 nch ovl 2x  per  trace     win beats err
    scenario(4, 4,  0,  1,  1,  TR_MAX,   1,  60,  0);   // 1200 MHz
    scenario(6, 4,  0,  1,  1,  TR_AVG,   0,  200, 0);   // 1200 MHz, 64 points
    scenario(4, 4,  2,  0,  2,  TR_MIN,   1,  60,  0);   // 600 MHz, 50 %
    scenario(5, 4,  3,  0,  4,  TR_AVG,   1,  60,  0);   // 300 MHz, 75 %
    scenario(4, 2,  1,  0,  8,  TR_MAX,   0,  50,  0);   // 150 MHz, 25 %
    scenario(4, 1,  0,  0,  4,  TR_CLRWR, 1,  40,  0);   // 300 MHz, one channel
    scenario(4, 1,  2,  0,  4,  TR_MAX,   0,  20,  1);   // 50 % with one channel: busy
    scenario(6, 1,  0,  1,  1,  TR_MAX,   0,  200, 1);   // 1200 MHz into one channel: overflow
    for (int m = 0; m < int'(M_NUM); m++) begin
      checks++;
      if (mech[m] == 0) begin failures++; $display("mechanism never exercised: %s", mech_name[m]); end
      else $display("mechanism %-20s %0d", mech_name[m], mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
