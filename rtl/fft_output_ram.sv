// FFT output block RAM of one channel: 2**LOG2N words of MAG_W-bit magnitude.
// The write address is the (delayed) FFT_BIN_INDEX and the write enable the (delayed)
// FFT_DATA_VALID, so a frame is stored in natural bin order although the FFT delivers it
// bit-reversed. Beside the magnitudes sits a one-bit-per-bin toggle array: every write
// to a bin flips that bin's bit. A reader that remembers the bit it last saw at a bin can
// therefore tell a new value from one it has already used, whatever the contents were
// at power-up or reset (the array needs no reset).
// Read port: rd_addr -> rd_word {toggle bit, magnitude} one clock later, read-first
// against a same-clock write.
// The RAM, its size and its address/enable sources follow the document; the toggle
// array is this design's addition for the trace unit.
module fft_output_ram
  import fft_pkg::*;
#(
  parameter int LOG2N = LOG2N_MAX
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [LOG2N-1:0] wr_addr,
  input  logic [MAG_W-1:0] wr_mag,
  input  logic [LOG2N-1:0] rd_addr,
  output mag_word_t        rd_word
);
  logic             tgl [1 << LOG2N];
  logic             tgl_q;
  logic [MAG_W-1:0] mag_q;

  always_ff @(posedge clk) begin
    if (wr_en) tgl[wr_addr] <= !tgl[wr_addr];
    tgl_q <= tgl[rd_addr];
  end

  sdp_ram #(.WIDTH(MAG_W), .DEPTH(1 << LOG2N)) u_ram (
    .clk  (clk),
    .we   (wr_en),
    .waddr(wr_addr),
    .wdata(wr_mag),
    .re   (1'b1),
    .raddr(rd_addr),
    .rdata(mag_q)
  );

  assign rd_word = '{par: tgl_q, mag: mag_q};
endmodule
