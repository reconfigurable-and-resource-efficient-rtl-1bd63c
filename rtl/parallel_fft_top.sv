// Parallel FFT core, top level: four streaming FFT channels fed from a 4-sample-per-clock
// complex baseband stream, with windowing, magnitude calculation and a real-time trace
// (max/min hold, clear-write, average) into a double-buffered store read by the host.
//
// Inputs on FPGA_CLK (clk): DATA (192 bits, {IM[n-3],RE[n-3],...,IM[n],RE[n]}) with
// DATA_VALID, the static configuration register cfg, the window coefficient write port
// (coef_ch_mask picks the channels' coefficient RAMs to write) and the host read port of
// the trace store. clk_2x is the phase-aligned 2xFPGA_CLK from the clock manager; the
// input FIFOs are written on it when cfg.abw_full is set (1200 MHz analysis bandwidth,
// a beat on every clock) and on clk otherwise (a beat at most every other clock).
// rst is synchronous to clk and must be held for at least 8 clocks; the write-clock
// domain gets its own synchronised copy.
// cfg.log2n outside 4 .. LOG2N is treated as the nearest supported size.
// Configuration changes need a reset. Error flags: fifo_overflow per channel (samples
// lost), busy_err (a frame found its channel still busy). ch_fft_valid shows each
// channel's FFT_DATA_VALID, frame_start each frame handed to a channel and sweep_wrap
// the last bin of each trace sweep.
module parallel_fft_top
  import fft_pkg::*;
#(
  parameter int LOG2N      = LOG2N_MAX,
  parameter int FIFO_DEPTH = 8192
) (
  input  logic                  clk,
  input  logic                  clk_2x,
  input  logic                  rst,
  input  fft_cfg_t              cfg,
  input  logic                  data_valid,
  input  logic [LANES*2*DATA_W-1:0] data,
  input  logic                  coef_we,
  input  logic [NCH-1:0]        coef_ch_mask,
  input  logic [LOG2N-1:0]      coef_addr,
  input  logic [WIN_W-1:0]      coef_data,
  input  logic                  host_req,
  output logic                  host_ready,
  input  logic [LOG2N-1:0]      host_raddr,
  output store_t                host_rdata,
  output logic [NCH-1:0]        fifo_overflow,
  output logic                  busy_err,
  output logic [NCH-1:0]        ch_fft_valid,
  output logic                  frame_start,
  output logic                  sweep_wrap
);
  // ---------------- FFT size, limited to the supported 16 .. 2**LOG2N points ----------------
  logic [3:0] log2n;

  assign log2n = (cfg.log2n < 4'(LOG2N_MIN)) ? 4'(LOG2N_MIN) :
                 (cfg.log2n >= 4'(LOG2N))    ? 4'(LOG2N)     : cfg.log2n;

  // ---------------- input FIFO write clock ----------------
  logic wr_clk, wr_rst_s1, wr_rst;

  clock_mux u_clk_mux (
    .clk0   (clk),
    .clk1   (clk_2x),
    .sel    (cfg.abw_full),
    .clk_out(wr_clk)
  );

  always_ff @(posedge wr_clk) begin
    wr_rst_s1 <= rst;
    wr_rst    <= wr_rst_s1;
  end

  // ---------------- frame distribution ----------------
  logic [NCH-1:0] beat_tgl;
  beat_t          beat_data;

  frame_distributor #(.N_CH(NCH), .LOG2N(LOG2N)) u_dist (
    .clk        (clk),
    .rst        (rst),
    .log2n      (log2n),
    .nch        (cfg.nch),
    .overlap    (cfg.overlap),
    .data_valid (data_valid),
    .data       (beat_t'(data)),
    .beat_tgl   (beat_tgl),
    .beat_data  (beat_data),
    .busy_err   (busy_err),
    .frame_start(frame_start)
  );

  // ---------------- channels ----------------
  logic [LOG2N-1:0] ch_raddr;
  mag_word_t        ch_rword [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    fft_channel #(.LOG2N(LOG2N), .FIFO_DEPTH(FIFO_DEPTH)) u_ch (
      .clk      (clk),
      .rst      (rst),
      .wr_clk   (wr_clk),
      .wr_rst   (wr_rst),
      .log2n    (log2n),
      .win_en   (cfg.win_en),
      .beat_tgl (beat_tgl[c]),
      .beat_data(beat_data),
      .coef_we  (coef_we && coef_ch_mask[c]),
      .coef_addr(coef_addr),
      .coef_data(coef_data),
      .rd_addr  (ch_raddr),
      .rd_word  (ch_rword[c]),
      .overflow (fifo_overflow[c]),
      .fft_valid(ch_fft_valid[c])
    );
  end

  // ---------------- trace ----------------
  trace_unit #(.N_CH(NCH), .LOG2N(LOG2N)) u_trace (
    .clk       (clk),
    .rst       (rst),
    .log2n     (log2n),
    .nch       (cfg.nch),
    .mode      (cfg.trace),
    .avg_num   (cfg.avg_num),
    .ch_raddr  (ch_raddr),
    .ch_rword  (ch_rword),
    .host_req  (host_req),
    .host_ready(host_ready),
    .host_raddr(host_raddr),
    .host_rdata(host_rdata),
    .sweep_wrap(sweep_wrap)
  );
endmodule
