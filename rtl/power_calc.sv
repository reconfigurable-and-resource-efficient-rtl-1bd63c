// Power calculation: MAG = sqrt(re*re + im*im) of each FFT output sample.
// Pipeline: squares (1 clock), their sum (1 clock), then a restoring square root that
// settles one result bit per clock (ROOT_W clocks). Total latency POWER_LAT clocks, fully
// pipelined, one sample per clock. The root is rounded down and saturated to MAG_W bits.
// The formula and the purpose (narrowing the output RAM) follow the document; the
// pipelined bit-serial root is this design's choice. Only the valid bit is reset.
module power_calc
  import fft_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [FFT_W-1:0] in_re,
  input  logic signed [FFT_W-1:0] in_im,
  output logic                    out_valid,
  output logic [MAG_W-1:0]        out_mag
);
  localparam int RW = 2 * ROOT_W;          // radicand width (even)

  logic [2*FFT_W-1:0] sq_re, sq_im;
  logic [RW-1:0]      rad0;
  logic [1:0]         v0;

  logic signed [2*FFT_W-1:0] p_re, p_im;
  assign p_re = in_re * in_re;
  assign p_im = in_im * in_im;

  always_ff @(posedge clk) begin
    sq_re <= $unsigned(p_re);
    sq_im <= $unsigned(p_im);
    rad0  <= RW'(sq_re) + RW'(sq_im);
  end

  // square-root pipeline: stage i consumes radicand bits [RW-1-2i -: 2]
  logic [RW-1:0]     rad  [ROOT_W+1];
  logic [ROOT_W+1:0] rem  [ROOT_W+1];
  logic [ROOT_W-1:0] root [ROOT_W+1];
  logic [ROOT_W-1:0] vld;

  assign rad[0]  = rad0;
  assign rem[0]  = '0;
  assign root[0] = '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      v0  <= '0;
      vld <= '0;
    end else begin
      v0  <= {v0[0], in_valid};
      vld <= {vld[ROOT_W-2:0], v0[1]};
    end
  end

  for (genvar i = 0; i < ROOT_W; i++) begin : g_root
    logic [ROOT_W+1:0] r_in, trial;
    assign r_in  = {rem[i][ROOT_W-1:0], rad[i][RW-1 -: 2]};
    assign trial = {root[i], 2'b01};
    always_ff @(posedge clk) begin
      rad[i+1] <= rad[i] << 2;
      if (r_in >= trial) begin
        rem[i+1]  <= r_in - trial;
        root[i+1] <= {root[i][ROOT_W-2:0], 1'b1};
      end else begin
        rem[i+1]  <= r_in;
        root[i+1] <= {root[i][ROOT_W-2:0], 1'b0};
      end
    end
  end

  assign out_valid = vld[ROOT_W-1];
  assign out_mag   = (root[ROOT_W] > ROOT_W'(2**MAG_W - 1)) ? {MAG_W{1'b1}} : root[ROOT_W][MAG_W-1:0];
endmodule
