// Full-size test of the parallel FFT core: every RTL parameter at its default (32K-point
// FFTs, 8K-word input FIFOs). Configuration: 32768 points, all four channels, 75 % overlap,
// one beat every 4th clock (the 300 MHz analysis bandwidth case), no window, MAX-HOLD.
// The input is a complex tone exactly on bin B0 plus a weaker tone on bin B1, so every
// frame's spectrum is known in closed form: magnitude A0 at B0, A1 at B1 (after the
// core's 1/N scaling) and nearly zero elsewhere. After all four channels have delivered
// frames, the store is switched and every bin is read: B0 and B1 must hold their
// amplitudes within a few LSBs and every other bin must stay below a small noise bound.
// Also checked: no FIFO overflow or busy error, all four FFTs ran in parallel, and the
// number of frames folded into the tone bins.
module tb_full_size;
  import fft_pkg::*;
  localparam int N  = 32768;
  localparam int B0 = 1234, B1 = 20000;
  localparam real A0 = 3000000.0, A1 = 250000.0;
  localparam int BEATS = 24 * 1024;          // 96K samples

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
  int checks = 0, failures = 0, all4 = 0, frames = 0;

  parallel_fft_top dut (.*);

  initial forever #4 clk = ~clk;
  initial forever #2 clk_2x = ~clk_2x;

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && ch_fft_valid == '1) all4++;
    if (!rst && frame_start) frames++;
  end

  initial begin
    int s;
    cfg = '{log2n: 4'd15, nch: 3'd4, overlap: OVL_75, win_en: 1'b0, trace: TR_MAX,
            avg_num: 8'd255, abw_full: 1'b0};
    repeat (12) @(posedge clk);
    rst <= 0;
    repeat (N + 16) @(posedge clk);          // first trace sweep
    s = 0;
    for (int b = 0; b < BEATS; b++) begin
      logic [LANES*2*DATA_W-1:0] d;   // packed as the DATA register: oldest sample on top
      for (int l = 0; l < LANES; l++) begin
        real a0, a1;
        int  p0, p1;
        p0 = (B0 * s) % N;
        p1 = (B1 * s) % N;
        a0 = 2.0 * 3.141592653589793 * p0 / N;
        a1 = 2.0 * 3.141592653589793 * p1 / N;
        d[2*DATA_W*(LANES-1-l) +: DATA_W] = DATA_W'($rtoi(A0 * $cos(a0) + A1 * $cos(a1)));
        d[2*DATA_W*(LANES-1-l) + DATA_W +: DATA_W] = DATA_W'($rtoi(A0 * $sin(a0) + A1 * $sin(a1)));
        s++;
      end
      data <= d; data_valid <= 1;
      @(posedge clk);
      data_valid <= 0;
      repeat (3) @(posedge clk);
    end
    repeat (2 * N + 200) @(posedge clk);
    host_req <= 1;
    @(posedge clk);
    host_req <= 0;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      real e, tol;
      host_raddr <= LOG2N_MAX'(k);
      @(posedge clk);
      #1;
      e   = (k == B0) ? A0 : (k == B1) ? A1 : 0.0;
      tol = 40.0 + e / 20000.0;
      checks++;
      if (real'(host_rdata.val) > e + tol || real'(host_rdata.val) < e - tol || host_rdata.cnt == '0) begin
        failures++;
        if (failures < 10) $display("MISMATCH bin %0d got %0d (count %0d) expected %f", k, host_rdata.val, host_rdata.cnt, e);
      end
      if (k == B0) $display("bin %0d: %0d, %0d frames folded", k, host_rdata.val, host_rdata.cnt);
    end
    checks++;
    if (fifo_overflow != '0 || busy_err) begin failures++; $display("overflow %b busy %0d", fifo_overflow, busy_err); end
    checks++;
    if (all4 == 0) begin failures++; $display("the four FFTs never delivered in the same clock"); end
    $display("frames started %0d, clocks with all four FFTs delivering %0d", frames, all4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
