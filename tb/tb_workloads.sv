// Workload test of the parallel FFT core at its default sizes (32K-point FFTs, 8K-word
// input FIFOs): the analysis-bandwidth / overlap combinations of the supported-overlap
// table, each with the number of channels it needs, at the largest FFT size that the input
// FIFOs can hold for it. For each: a complex tone on one bin is streamed at the
// bandwidth's beat rate (a beat every clock at 1200 MHz, every 2nd at 600 MHz, every 4th
// at 300 MHz, every 8th for a lower bandwidth), MAX-HOLD is read back after a store
// switch, and the tone bin must hold the tone amplitude, every other bin must stay near
// zero, and neither FIFO overflow nor a busy error may occur.
// The last two cases stream 32K-point frames at 600 MHz and 1200 MHz. A channel then has
// to buffer 1/2 of a frame (16384 samples, plus the few clocks the read side needs to see
// the first write) or 3/4 of a frame (24576 samples), but holds 16384, so the core must
// report the loss on fifo_overflow.
module tb_workloads;
  import fft_pkg::*;
  localparam real A0 = 3000000.0;

  logic clk = 1'b0, clk_2x = 1'b0, rst = 1'b1;
  fft_cfg_t cfg;
  logic data_valid = 1'b0;
  logic [LANES*2*DATA_W-1:0] data;
  logic coef_we = 1'b0;
  logic [NCH-1:0] coef_ch_mask = '0;
  logic [LOG2N_MAX-1:0] coef_addr = '0, host_raddr = '0;
  logic [WIN_W-1:0] coef_data = '0;
  logic host_req = 1'b0, host_ready;
  store_t host_rdata;
  logic [NCH-1:0] fifo_overflow, ch_fft_valid;
  logic busy_err, frame_start, sweep_wrap;
  int checks = 0, failures = 0;

  parallel_fft_top dut (.*);

  initial forever #4 clk = ~clk;
  initial forever #2 clk_2x = ~clk_2x;

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input string name, input int l2, input int nch, input overlap_e ovl,
                     input int period, input bit abw_full, input bit fits);
    int n, b0, s, hop, beats, bad;
    bit lost;
    n = 1 << l2;
    b0 = n / 3 + 5;
    hop = (ovl == OVL_0) ? n : (ovl == OVL_25) ? n - n / 4 : (ovl == OVL_50) ? n / 2 : n / 4;
    beats = (hop * (nch + 1) + n) / 4;      // every channel delivers at least one frame
    cfg = '{log2n: 4'(l2), nch: 3'(nch), overlap: ovl, win_en: 1'b0, trace: TR_MAX,
            avg_num: 8'd255, abw_full: abw_full};
    rst <= 1;
    repeat (12) @(posedge clk);
    rst <= 0;
    repeat (n + 16) @(posedge clk);
    s = 0; lost = 0;
    for (int b = 0; b < beats; b++) begin
      logic [LANES*2*DATA_W-1:0] d;   // packed as the DATA register: oldest sample on top
      for (int l = 0; l < LANES; l++) begin
        real a0;
        int  p0;
        p0 = int'((longint'(b0) * s) % n);
        a0 = 2.0 * 3.141592653589793 * p0 / n;
        d[2*DATA_W*(LANES-1-l) +: DATA_W] = DATA_W'($rtoi(A0 * $cos(a0)));
        d[2*DATA_W*(LANES-1-l) + DATA_W +: DATA_W] = DATA_W'($rtoi(A0 * $sin(a0)));
        s++;
      end
      data <= d; data_valid <= 1;
      @(posedge clk);
      if (period > 1) begin
        data_valid <= 0;
        repeat (period - 1) @(posedge clk);
      end
      if (fifo_overflow != '0 || busy_err) lost = 1;
    end
    data_valid <= 0;
    repeat (2 * n + 200) @(posedge clk);
    if (fifo_overflow != '0 || busy_err) lost = 1;
    checks++;
    if (lost == fits) begin
      failures++;
      $display("%s: data loss flagged %0d, expected %0d", name, lost, !fits);
    end
    if (!fits) begin
      $display("%s: loss flagged as expected", name);
      return;
    end
    host_req <= 1;
    @(posedge clk);
    host_req <= 0;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    bad = 0;
    for (int k = 0; k < n; k++) begin
      real e, tol;
      host_raddr <= LOG2N_MAX'(k);
      @(posedge clk);
      #1;
      e   = (k == b0) ? A0 : 0.0;
      tol = 40.0 + e / 20000.0;
      checks++;
      if (real'(host_rdata.val) > e + tol || real'(host_rdata.val) < e - tol || host_rdata.cnt == '0) begin
        failures++; bad++;
        if (bad < 5) $display("%s: bin %0d got %0d (count %0d) expected %f", name, k, host_rdata.val, host_rdata.cnt, e);
      end
    end
    $display("%s: %0d bins checked, %0d wrong", name, n, bad);
  endtask

  initial begin
    cfg = '{log2n: 4'd15, nch: 3'd4, overlap: OVL_0, win_en: 1'b0, trace: TR_MAX,
            avg_num: 8'd255, abw_full: 1'b0};
    //   name                          l2  nch ovl     per 2x fits
    run("1200 MHz,  0 %, 16K points", 14, 4, OVL_0,  1,  1, 1);
    run("600 MHz,   0 %, 16K points", 14, 4, OVL_0,  2,  0, 1);
    run("600 MHz,  50 %, 16K points", 14, 4, OVL_50, 2,  0, 1);
    run("300 MHz,   0 %, 32K points", 15, 1, OVL_0,  4,  0, 1);
    run("300 MHz,  25 %, 32K points", 15, 2, OVL_25, 4,  0, 1);
    run("300 MHz,  50 %, 32K points", 15, 2, OVL_50, 4,  0, 1);
    run("300 MHz,  75 %, 32K points", 15, 4, OVL_75, 4,  0, 1);
    run("150 MHz,  75 %, 32K points", 15, 4, OVL_75, 8,  0, 1);
    run("150 MHz,  75 %, 16 points",   4, 4, OVL_75, 8,  0, 1);
    run("600 MHz,  50 %, 32K points", 15, 4, OVL_50, 2,  0, 0);
    run("1200 MHz,  0 %, 32K points", 15, 4, OVL_0,  1,  1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
