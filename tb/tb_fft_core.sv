// Self-checking testbench of the streaming FFT core at a reduced maximum size (64 points).
// For each configured size (16, 32 and 64 points, the first two with bypassed stages)
// it streams random frames, computes the DFT of each frame in floating point, scaled by
// 1/N, and compares every bin (real and imaginary) within a few LSBs plus a tolerance
// for the 18-bit twiddles. It also checks that each bin index appears once per frame,
// that output runs at one sample per clock under continuous input, and that input gaps
// are tolerated.
module tb_fft_core;
  import fft_pkg::*;
  localparam int LOG2N  = 6;
  localparam int FRAMES = 4;

  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] log2n;
  logic in_valid;
  cplx_t in_data;
  logic out_valid;
  logic signed [FFT_W-1:0] out_re, out_im;
  logic [LOG2N-1:0] out_bin;
  int checks = 0, failures = 0;

  fft_core #(.LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [FRAMES][64];
  int xi [FRAMES][64];
  int got_re [FRAMES][64];
  int got_im [FRAMES][64];
  int seen   [FRAMES][64];
  int out_frame, out_pos, gaps;

  task automatic run(input int l2, input bit with_gaps);
    int n;
    n = 1 << l2;
    log2n = 4'(l2);
    in_valid = 0;
    rst = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < FRAMES; f++)
      for (int i = 0; i < n; i++) begin
        xr[f][i] = int'($urandom_range(0, 2**24 - 1)) - 2**23;
        xi[f][i] = int'($urandom_range(0, 2**24 - 1)) - 2**23;
        seen[f][i] = 0;
      end
    out_frame = 0; out_pos = 0; gaps = 0;
    // stream FRAMES frames plus one more (zeros) to push the last one out
    for (int f = 0; f <= FRAMES; f++)
      for (int i = 0; i < n; i++) begin
        if (with_gaps && ($urandom_range(0, 3) == 0)) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_data.re <= (f < FRAMES) ? DATA_W'(xr[f][i]) : '0;
        in_data.im <= (f < FRAMES) ? DATA_W'(xi[f][i]) : '0;
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (4 * LOG2N + 10) @(posedge clk);
    // compare
    for (int f = 0; f < FRAMES - 1; f++)
      for (int k = 0; k < n; k++) begin
        real sr, si, a, er, ei, tol;
        sr = 0.0; si = 0.0;
        for (int i = 0; i < n; i++) begin
          a  = -2.0 * 3.141592653589793 * k * i / n;
          sr = sr + xr[f][i] * $cos(a) - xi[f][i] * $sin(a);
          si = si + xr[f][i] * $sin(a) + xi[f][i] * $cos(a);
        end
        sr = sr / n; si = si / n;
        er = got_re[f][k] - sr; ei = got_im[f][k] - si;
        // truncation of the 1/2 per stage plus 18-bit twiddle rounding
        tol = 2.0 * l2 + 4.0 + 1.0 * l2 * ((sr < 0 ? -sr : sr) + (si < 0 ? -si : si)) / 65536.0;
        checks++;
        if (seen[f][k] != 1 || er > tol || er < -tol || ei > tol || ei < -tol) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH n=%0d frame %0d bin %0d seen %0d got (%0d,%0d) exp (%f,%f)",
                     n, f, k, seen[f][k], got_re[f][k], got_im[f][k], sr, si);
        end
      end
    if (!with_gaps) begin
      checks++;
      if (gaps != 0) begin
        failures++;
        $display("output not continuous under continuous input: %0d gaps", gaps);
      end
    end
  endtask

  // output collector
  logic started;
  always @(posedge clk) begin
    if (rst) started <= 0;
    else if (out_valid) begin
      started <= 1;
      if (out_frame < FRAMES) begin
        got_re[out_frame][out_bin] = out_re;
        got_im[out_frame][out_bin] = out_im;
        seen[out_frame][out_bin]++;
      end
      out_pos++;
      if (out_pos == (1 << log2n)) begin out_pos = 0; out_frame++; end
    end else if (started && out_frame < FRAMES - 1) gaps++;
  end

  initial begin
    run(4, 0);
    run(5, 0);
    run(6, 0);
    run(6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
