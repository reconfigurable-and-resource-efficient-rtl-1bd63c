// Self-checking testbench of the frame distributor (16-point frames, 4 beats each).
// For every channel count 1..4 and overlap 0/25/50/75 % it sends 200 beats with random
// gaps and compares, beat by beat, which channels toggled against a reference built from
// the frame list: frame f starts at beat f*H/4 and goes to channel f mod nch, unless that
// channel is still receiving its previous frame, in which case the frame is dropped and
// busy_err must be set. The forwarded beat data and the frame_start pulses are checked too.
module tb_frame_distributor;
  import fft_pkg::*;
  localparam int LOG2N = 6;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] log2n = 4'd4;
  logic [2:0] nch;
  overlap_e overlap;
  logic data_valid = 1'b0;
  beat_t data, beat_data;
  logic [NCH-1:0] beat_tgl;
  logic busy_err, frame_start;
  int checks = 0, failures = 0;

  frame_distributor #(.N_CH(NCH), .LOG2N(LOG2N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nc, input int ov);
    int fb, hb, nbeats, starts;
    int frame_end [NCH];       // beat index after the last beat of the channel's frame
    logic [NCH-1:0] tgl_prev;
    bit dropped_any;
    fb = 4;
    hb = (ov == 0) ? 4 : (ov == 1) ? 3 : (ov == 2) ? 2 : 1;
    nch = 3'(nc); overlap = overlap_e'(ov);
    rst = 1; data_valid = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < NCH; c++) frame_end[c] = 0;
    dropped_any = 0;
    starts = 0;
    for (int b = 0; b < 200; b++) begin
      logic [NCH-1:0] exp_sel;
      beat_t d;
      bit exp_start;
      while ($urandom_range(0, 2) == 0) @(posedge clk);
      for (int l = 0; l < LANES; l++) d[l] = {DATA_W'($urandom), DATA_W'($urandom)};
      // reference
      exp_start = 0;
      if (b % hb == 0) begin
        int f, ch;
        f = b / hb; ch = f % nc;
        if (frame_end[ch] > b) dropped_any = 1;
        else begin frame_end[ch] = b + fb; exp_start = 1; end
      end
      for (int c = 0; c < NCH; c++) exp_sel[c] = (frame_end[c] > b);
      tgl_prev = beat_tgl;
      data_valid <= 1; data <= d;
      @(posedge clk);
      data_valid <= 0;
      #1;
      checks++;
      if ((beat_tgl ^ tgl_prev) != exp_sel || beat_data != d || frame_start != exp_start) begin
        failures++;
        if (failures < 10) $display("MISMATCH nch %0d ovl %0d beat %0d: channels %b exp %b start %0d", nc, ov, b, beat_tgl ^ tgl_prev, exp_sel, frame_start);
      end
    end
    checks++;
    if (busy_err != dropped_any) begin failures++; $display("busy_err %0d, expected %0d (nch %0d ovl %0d)", busy_err, dropped_any, nc, ov); end
  endtask

  initial begin
    for (int nc = 1; nc <= 4; nc++)
      for (int ov = 0; ov < 4; ov++) run(nc, ov);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
