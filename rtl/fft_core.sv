// Streaming FFT core, run-time configurable from 16 to 2**LOG2N points (32K by default).
// A chain of LOG2N radix-2 single-path delay-feedback stages (sdf_stage) with delays
// N/2 ... 1; for a configured size 2**log2n the first LOG2N-log2n stages are bypassed.
// Accepts one complex sample per clock (in_valid may have gaps), the first sample after
// reset being sample 0 of frame 0, and delivers X(k)/N for every frame, in bit-reversed
// bin order, with FFT_DATA_VALID (out_valid) and FFT_BIN_INDEX (out_bin).
// Latency: a frame's results leave while the next frame enters (the pipeline holds N-1
// samples) plus 2 clocks per stage; the first N-1 outputs after reset are suppressed.
// The function, the size range and the two output signals follow the document, which
// uses a vendor core; the delay-feedback architecture and 1/N scaling are this design's.
// log2n must stay constant between resets.
module fft_core
  import fft_pkg::*;
#(
  parameter int LOG2N = LOG2N_MAX
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [3:0]              log2n,
  input  logic                    in_valid,
  input  cplx_t                   in_data,
  output logic                    out_valid,
  output logic signed [FFT_W-1:0] out_re,
  output logic signed [FFT_W-1:0] out_im,
  output logic [LOG2N-1:0]        out_bin
);
  logic                    v  [LOG2N+1];
  logic signed [FFT_W-1:0] xr [LOG2N+1];
  logic signed [FFT_W-1:0] xi [LOG2N+1];

  assign v[0]  = in_valid;
  assign xr[0] = FFT_W'(in_data.re);
  assign xi[0] = FFT_W'(in_data.im);

  // stage s pairs samples 2**(LOG2N-1-s) apart
  for (genvar s = 0; s < LOG2N; s++) begin : g_stage
    sdf_stage #(.LOG2D(LOG2N - 1 - s)) u_stage (
      .clk      (clk),
      .rst      (rst),
      .bypass   (32'(LOG2N - 1 - s) >= 32'(log2n)),
      .in_valid (v[s]),
      .in_re    (xr[s]),
      .in_im    (xi[s]),
      .out_valid(v[s+1]),
      .out_re   (xr[s+1]),
      .out_im   (xi[s+1])
    );
  end

  // output sequencing: skip the N-1 start-up outputs, then count positions in the frame
  logic [LOG2N:0]   skip;
  logic [LOG2N-1:0] pos, mask;
  assign mask = LOG2N'((1 << log2n) - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      skip <= (LOG2N+1)'((1 << log2n) - 1);
      pos  <= '0;
    end else if (v[LOG2N]) begin
      if (skip != 0) skip <= skip - 1'b1;
      else           pos  <= (pos + 1'b1) & mask;
    end
  end

  assign out_valid = v[LOG2N] && (skip == 0);
  assign out_re    = xr[LOG2N];
  assign out_im    = xi[LOG2N];
  assign out_bin   = LOG2N'(bitrev(LOG2N_MAX'(pos), int'(log2n)));
endmodule
