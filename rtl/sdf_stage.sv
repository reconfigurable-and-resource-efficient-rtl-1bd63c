// One radix-2 decimation-in-frequency stage of the single-path delay-feedback streaming FFT.
// The stage pairs samples D = 2**LOG2D apart. For the first D samples of each 2D-sample
// block the input is parked in the delay line while the delay line's previous content
// (the differences of the previous block) leaves, rotated by the twiddle W(2D)^m,
// m = position in the block. For the second D samples the butterfly forms (a+b)/2, which
// leaves at once, and (a-b)/2, which is parked (both rounded half up).
// Every stage divides by two, so the transform is scaled by 1/N and never overflows the
// FFT_W-bit datapath.
// The stage only advances on in_valid (gaps allowed). Two-clock latency; the twiddle ROM
// is read synchronously and filled at elaboration from an integer Taylor series, with
// cos/sin of an angle split into a coarse and a fine part to keep elaboration short.
// bypass=1 (stage not used at the configured FFT size) passes samples with the same
// latency. This whole stage structure is this design's choice: the document uses a
// reconfigurable streaming FFT core without describing its insides.
module sdf_stage
  import fft_pkg::*;
#(
  parameter int LOG2D = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    bypass,
  input  logic                    in_valid,
  input  logic signed [FFT_W-1:0] in_re,
  input  logic signed [FFT_W-1:0] in_im,
  output logic                    out_valid,
  output logic signed [FFT_W-1:0] out_re,
  output logic signed [FFT_W-1:0] out_im
);
  localparam int D   = 1 << LOG2D;
  localparam int PW  = (LOG2D == 0) ? 1 : LOG2D;
  localparam int FINE = (D < 128) ? D : 128;
  localparam longint TW_ROUND = 64'sd1 << (30 - (TW_W - 2) - 1);

  // ---------------- twiddle ROM: W(2D)^m = cos(pi m/D) - j sin(pi m/D) ----------------
  logic [2*TW_W-1:0] tw_rom [D];
  initial begin
    longint cf [FINE];
    longint sf [FINE];
    longint ch, sh, c, s;
    for (int lo = 0; lo < FINE; lo++) begin
      cf[lo] = sincos_q30(longint'(lo), longint'(D), 1'b0);
      sf[lo] = sincos_q30(longint'(lo), longint'(D), 1'b1);
    end
    for (int hi = 0; hi < D / FINE; hi++) begin
      ch = sincos_q30(longint'(hi * FINE), longint'(D), 1'b0);
      sh = sincos_q30(longint'(hi * FINE), longint'(D), 1'b1);
      for (int lo = 0; lo < FINE; lo++) begin
        c = ((ch * cf[lo]) >>> 30) - ((sh * sf[lo]) >>> 30);
        s = ((sh * cf[lo]) >>> 30) + ((ch * sf[lo]) >>> 30);
        tw_rom[hi*FINE + lo] = {TW_W'((c + TW_ROUND) >>> (30 - (TW_W - 2))),
                                TW_W'(-((s + TW_ROUND) >>> (30 - (TW_W - 2))))};
      end
    end
  end

  // ---------------- butterfly and delay line ----------------
  logic [LOG2D:0]            cnt;
  logic [PW-1:0]             ptr;
  logic                      phase2;
  logic [2*FFT_W-1:0]        dl [D];
  logic signed [FFT_W-1:0]   a_re, a_im;
  logic signed [FFT_W:0]     s_re, s_im, d_re, d_im;

  assign ptr    = (LOG2D == 0) ? '0 : PW'(cnt[PW-1:0]);
  assign phase2 = cnt[LOG2D];
  assign {a_re, a_im} = dl[(LOG2D == 0) ? 0 : ptr];
  assign s_re = a_re + in_re;
  assign s_im = a_im + in_im;
  assign d_re = a_re - in_re;
  assign d_im = a_im - in_im;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else if (in_valid && !bypass) cnt <= cnt + 1'b1;
  end

  // halve a butterfly sum or difference, rounding half up
  function automatic logic signed [FFT_W-1:0] half(input logic signed [FFT_W:0] v);
    return FFT_W'((v + (FFT_W+1)'(1)) >>> 1);
  endfunction

  always_ff @(posedge clk)
    if (in_valid && !bypass)
      dl[(LOG2D == 0) ? 0 : ptr] <= phase2 ? {half(d_re), half(d_im)} : {in_re, in_im};

  // first pipeline register: the value leaving the stage, and whether it needs rotation
  logic                    v1, rot1;
  logic signed [FFT_W-1:0] x1_re, x1_im;
  logic [2*TW_W-1:0]       tw1;

  always_ff @(posedge clk) begin
    if (rst) v1 <= 1'b0;
    else     v1 <= in_valid;
  end

  always_ff @(posedge clk)
    if (in_valid) begin
      rot1 <= !bypass && !phase2;
      if (bypass) begin
        x1_re <= in_re;
        x1_im <= in_im;
      end else if (phase2) begin
        x1_re <= half(s_re);
        x1_im <= half(s_im);
      end else begin
        x1_re <= a_re;
        x1_im <= a_im;
      end
      tw1 <= tw_rom[(LOG2D == 0) ? 0 : ptr];
    end

  // second pipeline register: complex rotation
  logic signed [TW_W-1:0]         w_re, w_im;
  logic signed [FFT_W+TW_W:0]     p_re, p_im;
  logic signed [FFT_W+TW_W-TW_W+3:0] r_re, r_im;

  assign {w_re, w_im} = tw1;
  assign p_re = x1_re * w_re - x1_im * w_im + (FFT_W+TW_W+1)'(1 << (TW_W - 3));
  assign p_im = x1_re * w_im + x1_im * w_re + (FFT_W+TW_W+1)'(1 << (TW_W - 3));
  assign r_re = ($bits(r_re))'(p_re >>> (TW_W - 2));
  assign r_im = ($bits(r_im))'(p_im >>> (TW_W - 2));

  function automatic logic signed [FFT_W-1:0] sat(input logic signed [FFT_W+3:0] v);
    if (v > (FFT_W+4)'(2**(FFT_W-1) - 1))   return {1'b0, {(FFT_W-1){1'b1}}};
    else if (v < -(FFT_W+4)'(2**(FFT_W-1))) return {1'b1, {(FFT_W-1){1'b0}}};
    else                                     return v[FFT_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= v1;
  end

  always_ff @(posedge clk)
    if (v1) begin
      out_re <= rot1 ? sat(r_re) : x1_re;
      out_im <= rot1 ? sat(r_im) : x1_im;
    end
endmodule
