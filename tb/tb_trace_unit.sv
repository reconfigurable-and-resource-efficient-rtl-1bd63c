// Self-checking testbench of the trace unit at 32 bins with behavioural channel RAMs.
// For each trace mode it writes whole frames of random magnitudes into the channel RAMs
// (flipping their toggle bit, as the real output RAMs do), waits for the sweeps to fold
// them, requests a store switch, and reads every bin of the released store through the
// host port. Values and counts must match a reference fold of the frames written since
// the previous switch: max, min, last written, or the sum of the first avg_num frames.
// Two switches per mode check that a released store starts empty again. A frame written
// to a disabled channel (nch = 3) must be ignored.
module tb_trace_unit;
  import fft_pkg::*;
  localparam int LOG2N = 5, NB = 32;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] log2n = 4'd5;
  logic [2:0] nch = 3'd3;
  trace_e mode;
  logic [CNT_W-1:0] avg_num = 8'd3;
  logic [LOG2N-1:0] ch_raddr, host_raddr;
  mag_word_t ch_rword [NCH];
  logic host_req = 1'b0, host_ready, sweep_wrap;
  store_t host_rdata;
  int checks = 0, failures = 0;

  int  mag [NCH][NB];
  bit  par [NCH][NB];
  longint ref_val [NB];
  int  ref_cnt [NB];

  trace_unit #(.N_CH(NCH), .LOG2N(LOG2N)) dut (.*);
  always #5 clk = ~clk;

  // channel RAM read port model: one clock latency
  always @(posedge clk)
    for (int c = 0; c < NCH; c++) ch_rword[c] <= '{par: par[c][ch_raddr], mag: MAG_W'(mag[c][ch_raddr])};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_frame(input int c);
    @(negedge clk);
    for (int k = 0; k < NB; k++) begin
      mag[c][k] = int'($urandom_range(0, 2**24 - 1));
      par[c][k] = !par[c][k];
      if (c < int'(nch)) begin
        unique case (mode)
          TR_MAX:   if (ref_cnt[k] == 0 || mag[c][k] > ref_val[k]) ref_val[k] = mag[c][k];
          TR_MIN:   if (ref_cnt[k] == 0 || mag[c][k] < ref_val[k]) ref_val[k] = mag[c][k];
          TR_CLRWR: ref_val[k] = mag[c][k];
          default:  if (ref_cnt[k] < int'(avg_num)) ref_val[k] += mag[c][k];
        endcase
        if (mode != TR_AVG || ref_cnt[k] < int'(avg_num)) ref_cnt[k]++;
      end
    end
    repeat (2 * NB + 4) @(posedge clk);      // two sweeps fold it in
  endtask

  task automatic switch_and_check();
    host_req <= 1;
    @(posedge clk);
    host_req <= 0;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    for (int k = 0; k < NB; k++) begin
      host_raddr <= LOG2N'(k);
      @(posedge clk);
      #1;
      checks++;
      if (longint'(host_rdata.val) != ref_val[k] || int'(host_rdata.cnt) != ref_cnt[k]) begin
        failures++;
        if (failures < 10) $display("MISMATCH mode %0d bin %0d got %0d/%0d exp %0d/%0d", mode, k,
                                    host_rdata.val, host_rdata.cnt, ref_val[k], ref_cnt[k]);
      end
    end
    for (int k = 0; k < NB; k++) begin ref_val[k] = 0; ref_cnt[k] = 0; end
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) for (int k = 0; k < NB; k++) begin par[c][k] = 1'($urandom); mag[c][k] = 0; end
    for (int m = 0; m < 4; m++) begin
      mode = trace_e'(m);
      rst = 1;
      repeat (3) @(posedge clk);
      rst = 0;
      repeat (2 * NB + 4) @(posedge clk);
      for (int k = 0; k < NB; k++) begin ref_val[k] = 0; ref_cnt[k] = 0; end
      for (int r = 0; r < 2; r++) begin
        for (int i = 0; i < 5; i++) write_frame(int'($urandom_range(0, NCH - 1)));
        write_frame(0);
        write_frame(3);                      // disabled channel
        switch_and_check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
