// Self-checking testbench of one complete channel at 16 points (LOG2N = 5, FIFO depth
// 64), input FIFOs on the 2x clock. It loads random window coefficients, sends frames
// as 4-sample beats, and after each frame reads back the output RAM, which must then hold
// the previous frame (bin 0 already the newest one): |DFT(window * x)| / N per bin,
// within a few LSBs, with a toggle bit that flips from one check to the next.
// Runs once with the window on and once with it off.
module tb_fft_channel;
  import fft_pkg::*;
  localparam int LOG2N = 5, N = 16;
  logic clk = 1'b0, clk2 = 1'b0, rst = 1'b1, wr_rst = 1'b1;
  logic [3:0] log2n = 4'd4;
  logic win_en;
  logic beat_tgl = 1'b0;
  beat_t beat_data;
  logic coef_we = 1'b0;
  logic [LOG2N-1:0] coef_addr, rd_addr;
  logic [WIN_W-1:0] coef_data;
  mag_word_t rd_word;
  logic overflow, fft_valid;
  int checks = 0, failures = 0;
  int coef [N];
  int last_par [N];
  int xr [8][N];
  int xi [8][N];

  fft_channel #(.LOG2N(LOG2N), .FIFO_DEPTH(64)) dut (
    .clk(clk), .rst(rst), .wr_clk(clk2), .wr_rst(wr_rst), .log2n(log2n), .win_en(win_en),
    .beat_tgl(beat_tgl), .beat_data(beat_data), .coef_we(coef_we), .coef_addr(coef_addr),
    .coef_data(coef_data), .rd_addr(rd_addr), .rd_word(rd_word), .overflow(overflow),
    .fft_valid(fft_valid));

  initial forever #4 clk = ~clk;
  initial forever #2 clk2 = ~clk2;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int scale(input int x, input int c);
    longint p;
    p = (longint'(x) * c + (1 << 16)) >>> 17;
    if (p > 2**23 - 1) p = 2**23 - 1;
    if (p < -(2**23)) p = -(2**23);
    return int'(p);
  endfunction

  // Bin 0 is the first result the FFT delivers and leaves as soon as the last sample of
  // its frame is in, so when frame f+1 has been sent, bin 0 already belongs to frame f+1.
  task automatic check_frame(input int f0);
    for (int k = 0; k < N; k++) begin
      real sr, si, a, m, tol;
      int wr, wi, f;
      f = (k == 0) ? f0 + 1 : f0;
      sr = 0.0; si = 0.0;
      for (int i = 0; i < N; i++) begin
        wr = win_en ? scale(xr[f][i], coef[i]) : xr[f][i];
        wi = win_en ? scale(xi[f][i], coef[i]) : xi[f][i];
        a  = -2.0 * 3.141592653589793 * k * i / N;
        sr = sr + wr * $cos(a) - wi * $sin(a);
        si = si + wr * $sin(a) + wi * $cos(a);
      end
      m = $sqrt(sr * sr + si * si) / N;
      tol = 14.0 + 6.0 * m / 65536.0;
      rd_addr <= LOG2N'(k);
      @(posedge clk);
      @(posedge clk);
      #1;
      checks++;
      if (real'(rd_word.mag) - m > tol || m - real'(rd_word.mag) > tol || (last_par[k] >= 0 && int'(rd_word.par) == last_par[k])) begin
        failures++;
        if (failures < 10) $display("MISMATCH frame %0d bin %0d got %0d par %0d exp %f", f, k, rd_word.mag, rd_word.par, m);
      end
      last_par[k] = int'(rd_word.par);
    end
  endtask

  task automatic send_frame(input int f);
    for (int b = 0; b < N / 4; b++) begin
      beat_t d;
      for (int l = 0; l < 4; l++) begin
        xr[f][4*b+l] = int'($urandom_range(0, 2**24 - 1)) - 2**23;
        xi[f][4*b+l] = int'($urandom_range(0, 2**24 - 1)) - 2**23;
        d[l].re = DATA_W'(xr[f][4*b+l]);
        d[l].im = DATA_W'(xi[f][4*b+l]);
      end
      beat_data <= d;
      beat_tgl  <= !beat_tgl;
      @(posedge clk);
    end
  endtask

  initial begin
    for (int a = 0; a < N; a++) begin
      coef[a] = int'($urandom_range(0, 2**17));
      coef_we <= 1; coef_addr <= LOG2N'(a); coef_data <= WIN_W'(coef[a]);
      @(posedge clk);
    end
    coef_we <= 0;
    for (int pass = 0; pass < 2; pass++) begin
      win_en = (pass == 0);
      for (int k = 0; k < N; k++) last_par[k] = -1;
      rst <= 1; wr_rst <= 1;
      repeat (4) @(posedge clk);
      rst <= 0; wr_rst <= 0;
      repeat (2) @(posedge clk);
      for (int f = 0; f < 6; f++) begin
        send_frame(f);
        repeat (100) @(posedge clk);
        if (f > 0) check_frame(f - 1);
      end
      checks++;
      if (overflow) begin failures++; $display("unexpected overflow"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
