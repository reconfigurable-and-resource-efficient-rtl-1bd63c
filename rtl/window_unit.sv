// Windowing stage of one FFT channel: a coefficient block RAM loaded by the host before
// the FFT runs, and two real multipliers that scale the real and imaginary parts of each
// sample by the coefficient of its position in the FFT frame.
// A sample counter (reset to frame position 0, wrapping at 2**log2n) addresses the RAM,
// so samples must arrive as whole frames, which the channel guarantees.
// Coefficients are WIN_W-bit unsigned with 1.0 = 2**(WIN_W-1); products are rounded and
// saturated back to DATA_W bits. With win_en low the samples pass unscaled.
// Latency: two clocks from in_valid to out_valid; gaps in in_valid are allowed.
// One RAM per channel written by the host and the two multipliers follow the document;
// number formats, rounding and the host write port are this design's choices.
module window_unit
  import fft_pkg::*;
#(
  parameter int LOG2N = LOG2N_MAX
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       log2n,
  input  logic             win_en,
  // host coefficient write port
  input  logic             coef_we,
  input  logic [LOG2N-1:0] coef_addr,
  input  logic [WIN_W-1:0] coef_data,
  // sample stream
  input  logic             in_valid,
  input  cplx_t            in_data,
  output logic             out_valid,
  output cplx_t            out_data
);
  logic [LOG2N-1:0] idx;
  logic [LOG2N-1:0] mask;
  logic [WIN_W-1:0] coef;
  logic             v1;
  cplx_t            d1;

  assign mask = LOG2N'((1 << log2n) - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      idx       <= '0;
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (in_valid) idx <= (idx + 1'b1) & mask;
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

  sdp_ram #(.WIDTH(WIN_W), .DEPTH(1 << LOG2N)) u_coef_ram (
    .clk  (clk),
    .we   (coef_we),
    .waddr(coef_addr),
    .wdata(coef_data),
    .re   (in_valid),
    .raddr(idx),
    .rdata(coef)
  );

  always_ff @(posedge clk)
    if (in_valid) d1 <= in_data;

  function automatic logic signed [DATA_W-1:0] scale(input logic signed [DATA_W-1:0] x,
                                                     input logic [WIN_W-1:0] c);
    logic signed [DATA_W+WIN_W:0] p;
    logic signed [DATA_W+1:0]     r;
    p = (x * $signed({1'b0, c})) + (DATA_W+WIN_W+1)'(1 << (WIN_W-2));
    r = (DATA_W+2)'(p >>> (WIN_W-1));
    if (r > (DATA_W+2)'(2**(DATA_W-1) - 1))   return {1'b0, {(DATA_W-1){1'b1}}};
    else if (r < -(DATA_W+2)'(2**(DATA_W-1))) return {1'b1, {(DATA_W-1){1'b0}}};
    else                                       return r[DATA_W-1:0];
  endfunction

  always_ff @(posedge clk)
    if (v1) begin
      out_data.re <= win_en ? scale(d1.re, coef) : d1.re;
      out_data.im <= win_en ? scale(d1.im, coef) : d1.im;
    end
endmodule
