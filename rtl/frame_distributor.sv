// Frame distributor: the part of the FFT configuration logic that decides which channel
// gets which DATA beat. The incoming stream (one 4-sample beat per DATA_VALID) is cut
// into frames of N = 2**log2n samples (N/4 beats) that start every hop H = N*(1-overlap)
// samples; frame f goes to channel f mod nch. A beat inside several overlapping frames
// is sent to each of their channels. For every beat a channel receives, its beat_tgl
// toggles; beat_data holds the beat until the next DATA_VALID.
// Channels nch..NCH-1 stay idle (disabled). If a new frame falls on a channel whose
// previous frame is still being sent (too few channels for the overlap), the new frame
// is dropped and busy_err is set (sticky). frame_start pulses with each started frame.
// Channel enabling, overlap and round-robin use follow the document's description;
// the exact frame-to-channel rule is this design's choice. Configuration is static
// between resets.
module frame_distributor
  import fft_pkg::*;
#(
  parameter int N_CH  = NCH,
  parameter int LOG2N = LOG2N_MAX
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [3:0]      log2n,
  input  logic [2:0]      nch,
  input  overlap_e        overlap,
  input  logic            data_valid,
  input  beat_t           data,
  output logic [N_CH-1:0] beat_tgl,
  output beat_t           beat_data,
  output logic            busy_err,
  output logic            frame_start
);
  localparam int BW = LOG2N - 1;            // beats-per-frame counter width

  logic [BW-1:0] fb, hb;                    // beats per frame, beats per hop
  logic [BW-1:0] hop_cnt;
  logic [BW-1:0] rem [N_CH];
  logic [2:0]    next_ch;
  logic          start, busy;

  always_comb begin
    fb = BW'(1 << (log2n - 2));
    unique case (overlap)
      OVL_0:   hb = fb;
      OVL_25:  hb = BW'(fb - (fb >> 2));
      OVL_50:  hb = BW'(fb >> 1);
      default: hb = BW'(fb >> 2);
    endcase
  end

  assign start = data_valid && (hop_cnt == '0);
  assign busy  = (rem[next_ch[$clog2(N_CH)-1:0]] != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      hop_cnt     <= '0;
      next_ch     <= '0;
      busy_err    <= 1'b0;
      beat_tgl    <= '0;
      frame_start <= 1'b0;
      for (int c = 0; c < N_CH; c++) rem[c] <= '0;
    end else begin
      frame_start <= 1'b0;
      if (data_valid) begin
        beat_data <= data;
        hop_cnt   <= start ? hb - 1'b1 : hop_cnt - 1'b1;
        if (start) begin
          next_ch <= (next_ch + 1'b1 >= nch) ? '0 : next_ch + 1'b1;
          if (busy) busy_err <= 1'b1;
          else      frame_start <= 1'b1;
        end
        for (int c = 0; c < N_CH; c++) begin
          if (start && !busy && 3'(c) == next_ch) begin
            beat_tgl[c] <= !beat_tgl[c];
            rem[c]      <= fb - 1'b1;
          end else if (rem[c] != '0) begin
            beat_tgl[c] <= !beat_tgl[c];
            rem[c]      <= rem[c] - 1'b1;
          end
        end
      end
    end
  end
endmodule
