// One channel of the parallel FFT core: input FIFO block -> windowing -> streaming FFT ->
// power calculation -> FFT output RAM, with FFT_BIN_INDEX and FFT_DATA_VALID delayed by
// the power calculation latency to form the RAM's write address and enable.
// The channel receives whole frames as 4-sample beats (beat_tgl/beat_data, FPGA_CLK
// domain, captured on wr_clk) and leaves each frame's magnitudes in its output RAM, read
// by the trace unit through rd_addr/rd_word (one clock latency).
// fft_valid exposes the FFT core's output strobe (FFT_DATA_VALID) for observation.
// Timing: a sample is read from the FIFOs a few clocks after it is written, spends 2
// clocks in the window stage, and its FFT result position p appears 2*LOG2N clocks after
// sample N-1+p of the channel's stream has entered the FFT; the magnitude is written to
// the RAM POWER_LAT + 1 clocks later. Bin 0 of a frame is therefore stored together with
// the frame's last sample, the other bins while the next frame streams in.
// Structure as in the document's channel diagram; interfaces are this design's choice.
module fft_channel
  import fft_pkg::*;
#(
  parameter int LOG2N      = LOG2N_MAX,
  parameter int FIFO_DEPTH = 8192
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic [3:0]       log2n,
  input  logic             win_en,
  input  logic             beat_tgl,
  input  beat_t            beat_data,
  input  logic             coef_we,
  input  logic [LOG2N-1:0] coef_addr,
  input  logic [WIN_W-1:0] coef_data,
  input  logic [LOG2N-1:0] rd_addr,
  output mag_word_t        rd_word,
  output logic             overflow,
  output logic             fft_valid
);
  logic  fifo_v, win_v;
  cplx_t fifo_d, win_d;
  logic signed [FFT_W-1:0] f_re, f_im;
  logic             mag_v, dly_v;
  logic [MAG_W-1:0] mag;
  logic [LOG2N-1:0] dly_bin, fft_bin;

  input_fifo_block #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk   (wr_clk),
    .wr_rst   (wr_rst),
    .beat_tgl (beat_tgl),
    .beat_data(beat_data),
    .rd_clk   (clk),
    .rd_rst   (rst),
    .out_valid(fifo_v),
    .out_data (fifo_d),
    .overflow (overflow)
  );

  window_unit #(.LOG2N(LOG2N)) u_win (
    .clk      (clk),
    .rst      (rst),
    .log2n    (log2n),
    .win_en   (win_en),
    .coef_we  (coef_we),
    .coef_addr(coef_addr),
    .coef_data(coef_data),
    .in_valid (fifo_v),
    .in_data  (fifo_d),
    .out_valid(win_v),
    .out_data (win_d)
  );

  fft_core #(.LOG2N(LOG2N)) u_fft (
    .clk      (clk),
    .rst      (rst),
    .log2n    (log2n),
    .in_valid (win_v),
    .in_data  (win_d),
    .out_valid(fft_valid),
    .out_re   (f_re),
    .out_im   (f_im),
    .out_bin  (fft_bin)
  );

  power_calc u_pow (
    .clk      (clk),
    .rst      (rst),
    .in_valid (fft_valid),
    .in_re    (f_re),
    .in_im    (f_im),
    .out_valid(mag_v),
    .out_mag  (mag)
  );

  delay_line #(.WIDTH(LOG2N), .DELAY(POWER_LAT)) u_dly (
    .clk      (clk),
    .rst      (rst),
    .in_valid (fft_valid),
    .in_data  (fft_bin),
    .out_valid(dly_v),
    .out_data (dly_bin)
  );

  fft_output_ram #(.LOG2N(LOG2N)) u_oram (
    .clk    (clk),
    .wr_en  (dly_v),
    .wr_addr(dly_bin),
    .wr_mag (mag),
    .rd_addr(rd_addr),
    .rd_word(rd_word)
  );

  // the delayed strobe and the magnitude must leave the two pipelines together
  assert property (@(posedge clk) disable iff (rst) dly_v == mag_v);
endmodule
